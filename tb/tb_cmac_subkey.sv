// tb_cmac_subkey: checks the CMAC subkey doubling against SP 800-38B D.1
// (L = 7df76b0c..., K1 = fbeed618..., K2 = f7ddac30...) and against a value
// with the top bit clear, where doubling is a plain shift.
module tb_cmac_subkey;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic         load, valid;
  logic [127:0] l_in, k1, k2;
  int checks = 0, failures = 0;

  cmac_subkey dut (.*);

  task automatic run(input logic [127:0] l, input logic [127:0] e1, input logic [127:0] e2);
    l_in = l; load = 1;
    @(negedge clk); load = 0;
    checks++;
    if (!valid || k1 !== e1 || k2 !== e2) begin
      failures++; $display("FAIL L=%h: k1=%h k2=%h", l, k1, k2);
    end
  endtask

  initial begin
    load = 0; l_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    checks++;
    if (valid) begin failures++; $display("FAIL valid after reset"); end
    run(128'h7df76b0c1ab899b33e42f047b91b546f,
        128'hfbeed618357133667c85e08f7236a8de, 128'hf7ddac306ae266ccf90bc11ee46d513b);
    run(128'h00000000000000000000000000000001,
        128'h00000000000000000000000000000002, 128'h00000000000000000000000000000004);
    run(128'h40000000000000000000000000000000,
        128'h80000000000000000000000000000000, 128'h00000000000000000000000000000087);
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
