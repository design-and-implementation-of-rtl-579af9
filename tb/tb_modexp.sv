// tb_modexp: modular exponentiation at W = 256 against a square-and-multiply
// reference that uses the simulator's wide % operator. Covers exponents of
// 0, 1 and 2 bits, random exponents of several lengths, a full-width
// exponent, and the Diffie-Hellman identity (g^a)^b == (g^b)^a. Each run's
// cycle count is checked against 2W + (k_e + 2)(W + 5) + 3.
module tb_modexp;
  localparam int unsigned W = 256;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic         start, done, busy;
  logic [W-1:0] m, e, n, c;
  int checks = 0, failures = 0;

  modexp #(.W(W)) dut (.*);

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [W-1:0] ref_modexp(logic [W-1:0] base, logic [W-1:0] ex, logic [W-1:0] md);
    logic [2*W-1:0] r, b;
    r = (2*W)'(1) % {{W{1'b0}}, md};
    b = {{W{1'b0}}, base} % {{W{1'b0}}, md};
    for (int i = 0; i < W; i++) begin
      if (ex[i]) r = (r * b) % {{W{1'b0}}, md};
      b = (b * b) % {{W{1'b0}}, md};
    end
    return r[W-1:0];
  endfunction

  function automatic int bitlen(logic [W-1:0] v);
    for (int i = W - 1; i >= 0; i--) if (v[i]) return i + 1;
    return 0;
  endfunction

  task automatic run(input logic [W-1:0] mm, input logic [W-1:0] ee, output logic [W-1:0] res);
    int cyc;
    m = mm; e = ee;
    start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    res = c;
    checks++;
    if (res !== ref_modexp(mm, ee, n)) begin
      failures++; $display("FAIL m=%h e=%h got %h", mm, ee, res);
    end
    checks++;
    if (cyc != 2*W + (bitlen(ee) + 2) * (W + 5) + 3) begin
      failures++; $display("FAIL cycles %0d for %0d-bit exponent", cyc, bitlen(ee));
    end
  endtask

  initial begin
    logic [W-1:0] res, ga, gb, k1, k2, a_priv, b_priv;
    start = 0; m = '0; e = '0;
    n = rnd() | 1'b1; n[W-1] = 1'b1;
    repeat (3) @(negedge clk);
    rst = 0;
    run(W'(5), W'(0), res);
    run(W'(5), W'(1), res);
    run(W'(7), W'(2), res);
    run(W'(3), W'(3), res);
    for (int t = 0; t < 3; t++) begin
      logic [W-1:0] ex;
      ex = rnd() >> (W - 8 - 24 * t);
      run(W'({W'(0), rnd()} % {W'(0), n}), ex, res);
    end
    run(n - 1, rnd() | {1'b1, {(W-1){1'b0}}}, res);
    // Diffie-Hellman: both sides reach the same key
    a_priv = rnd() >> (W - 40);
    b_priv = rnd() >> (W - 40);
    run(W'(2), a_priv, ga);
    run(W'(2), b_priv, gb);
    run(gb, a_priv, k1);
    run(ga, b_priv, k2);
    checks++;
    if (k1 !== k2) begin failures++; $display("FAIL DH keys differ"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
