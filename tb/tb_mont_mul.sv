// tb_mont_mul: random Montgomery products at W = 256. For each result r it
// checks r < n and r * 2^W == a * b (mod n), computed with the simulator's
// wide arithmetic, and that `done` comes W + 3 cycles after `start`.
module tb_mont_mul;
  localparam int unsigned W = 256;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic         start, done, busy;
  logic [W-1:0] a, b, n, r;
  int checks = 0, failures = 0;

  mont_mul #(.W(W)) dut (.*);

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    logic [2*W-1:0] lhs, rhs;
    int cyc;
    start = 0; a = '0; b = '0; n = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 40; t++) begin
      n = rnd() | 1'b1;
      if (t % 4 == 0) n[W-1] = 1'b1;                 // full-width modulus
      if (t == 1) n = {W{1'b1}};                     // largest odd modulus
      a = W'({W'(0), rnd()} % {W'(0), n});
      b = W'({W'(0), rnd()} % {W'(0), n});
      if (t == 2) b = W'(1);
      if (t == 3) a = n - 1;
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      lhs = ({{W{1'b0}}, r} << W) % {{W{1'b0}}, n};
      rhs = ({{W{1'b0}}, a} * {{W{1'b0}}, b}) % {{W{1'b0}}, n};
      checks++;
      if (lhs !== rhs || r >= n) begin failures++; $display("FAIL t=%0d r=%h", t, r); end
      checks++;
      if (cyc != W + 3) begin failures++; $display("FAIL cycles %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * (W + 10) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
