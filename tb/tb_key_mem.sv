// tb_key_mem: writes every slot of the key store word by word with distinct
// patterns, overwrites the secret as a whole, and reads all slots back.
module tb_key_mem;
  import tls_pkg::*;
  localparam int unsigned W = 512;
  localparam int unsigned NW = W / 128;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic         wr_en, sec_wr_en;
  slot_e        wr_slot;
  logic [$clog2(NW)-1:0] wr_word;
  logic [127:0] wr_data;
  logic [W-1:0] sec_wr_data, priv_key, pub_e, modulus, pub_val, secret;
  int checks = 0, failures = 0;

  key_mem #(.W(W)) dut (.*);

  function automatic logic [127:0] pat(int s, int w);
    return {32'(s * 1000 + w), 32'hdeadbeef ^ 32'(s), 32'(w * 77), 32'h0123_4567 + 32'(s + w)};
  endfunction

  function automatic logic [W-1:0] full(int s);
    logic [W-1:0] v;
    for (int w = 0; w < NW; w++) v[128*w +: 128] = pat(s, w);
    return v;
  endfunction

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    wr_en = 0; sec_wr_en = 0; wr_slot = SLOT_PRIV; wr_word = '0; wr_data = '0; sec_wr_data = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    check(secret, '0, "reset");
    for (int s = 0; s < NSLOTS; s++)
      for (int w = 0; w < NW; w++) begin
        wr_en = 1; wr_slot = slot_e'(s); wr_word = ($clog2(NW))'(w); wr_data = pat(s, w);
        @(negedge clk);
      end
    wr_en = 0;
    check(priv_key, full(0), "priv");
    check(pub_e,    full(1), "pub_e");
    check(modulus,  full(2), "modulus");
    check(pub_val,  full(3), "pub_val");
    check(secret,   full(4), "secret");
    sec_wr_en = 1; sec_wr_data = ~full(4);
    @(negedge clk); sec_wr_en = 0;
    check(secret, ~full(4), "secret overwrite");
    check(priv_key, full(0), "priv kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
