// tb_aes_key_expand: checks the AES-128 key schedule against the FIPS-197
// Appendix A.1 example (round keys 1, 2, 9 and 10 of key 2b7e1516...) and
// checks that `ready` rises ten cycles after `start`.
module tb_aes_key_expand;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic          start, ready;
  logic [127:0]  key;
  logic [1407:0] round_keys;
  int checks = 0, failures = 0;

  aes_key_expand dut (.*);

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  initial begin
    int cyc;
    start = 0; key = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!ready) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 11) begin failures++; $display("FAIL ready after %0d cycles", cyc); end
    check(round_keys[127:0],       128'h2b7e151628aed2a6abf7158809cf4f3c, "rk0");
    check(round_keys[128*1 +: 128], 128'ha0fafe1788542cb123a339392a6c7605, "rk1");
    check(round_keys[128*2 +: 128], 128'hf2c295f27a96b9435935807a7359f67f, "rk2");
    check(round_keys[128*9 +: 128], 128'hac7766f319fadc2128d12941575c006e, "rk9");
    check(round_keys[128*10 +: 128], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "rk10");
    // a second key: FIPS-197 C.1, last round key
    key = 128'h000102030405060708090a0b0c0d0e0f;
    start = 1;
    @(negedge clk); start = 0;
    while (!ready) @(negedge clk);
    check(round_keys[128*10 +: 128], 128'h13111d7fe3944a17f307a78b4d2b30c5, "C.1 rk10");
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
