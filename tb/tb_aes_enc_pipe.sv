// tb_aes_enc_pipe: checks the AES-128 cipher pipeline with the FIPS-197 C.1
// example and the four ECB blocks of SP 800-38A F.1.1, streamed back to back
// (one block per clock). Checks the 11-cycle latency, the results in order
// and that each tag returns with its block.
module tb_aes_enc_pipe;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic          ke_start, ke_ready;
  logic [127:0]  key;
  logic [1407:0] round_keys;
  logic          in_valid, out_valid;
  logic [127:0]  in_data, out_data;
  logic [1:0]    in_tag, out_tag;
  int checks = 0, failures = 0;

  aes_key_expand u_ke (.clk, .rst, .start(ke_start), .key, .round_keys, .ready(ke_ready));
  aes_enc_pipe dut (.*);

  logic [127:0] pt [4] = '{128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
                           128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
  logic [127:0] ct [4] = '{128'h3ad77bb40d7a3660a89ecaf32466ef97, 128'hf5d3d58503b9699de785895a96fdbaaf,
                           128'h43b1cd7f598ece23881b00e3ed030688, 128'h7b0c785e27e8ad3f8223207104725dd4};

  int nout = 0, t_in = 0, t_first = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid && !rst && key == 128'h2b7e151628aed2a6abf7158809cf4f3c) begin
      checks++;
      if (out_data !== ct[nout] || out_tag !== 2'(nout)) begin
        failures++; $display("FAIL block %0d: %h tag %0d", nout, out_data, out_tag);
      end
      if (t_first < 0) t_first = cyc;
      nout++;
    end
  end

  initial begin
    ke_start = 0; key = '0; in_valid = 0; in_data = '0; in_tag = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    key = 128'h000102030405060708090a0b0c0d0e0f;
    ke_start = 1; @(negedge clk); ke_start = 0;
    while (!ke_ready) @(negedge clk);
    in_valid = 1; in_data = 128'h00112233445566778899aabbccddeeff;
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (!out_valid || out_data !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++; $display("FAIL C.1: valid %b %h", out_valid, out_data);
    end
    @(negedge clk);
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    ke_start = 1; @(negedge clk); ke_start = 0;
    while (!ke_ready) @(negedge clk);
    t_in = cyc;
    for (int i = 0; i < 4; i++) begin
      in_valid = 1; in_data = pt[i]; in_tag = 2'(i);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (nout != 4) begin failures++; $display("FAIL %0d blocks out", nout); end
    checks++;
    if (t_first - t_in != 11) begin failures++; $display("FAIL latency %0d", t_first - t_in); end
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
