// mont_mul: radix-2 Montgomery multiplier with carry-save accumulation.
//
// Computes r = a * b * 2^-W mod n for an odd modulus n, with a, b < n.
// The partial result is kept as two vectors, sum and carry, so each of the W
// iterations is two carry-save additions and a shift, with no carry chain:
//   (s,c) = CSA(s, c, a_i ? b : 0);  q = lsb(s);  (s,c) = CSA(s, c, q ? n : 0);
//   (s,c) = (s,c) >> 1.
// Adding q*n makes the sum even, so the shift is exact; the represented value
// stays below 2n. After W iterations one full addition turns (s,c) into a
// single number and one conditional subtraction of n brings it below n.
// Timing: `start` for one cycle; `done` pulses W+3 cycles later with `r`
// valid and held until the next start. Inputs must stay stable while busy.
// The document gives the algorithm and the carry-save adder; the closing
// full addition and subtraction are this design's way to leave redundant form.
module mont_mul #(
  parameter int unsigned W = 2048
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] n,
  output logic [W-1:0] r,
  output logic         done,
  output logic         busy
);
  typedef enum logic [1:0] {M_IDLE, M_LOOP, M_ADD, M_SUB} mstate_e;

  mstate_e          st;
  logic [W+1:0]     s, c;
  logic [W-1:0]     a_sh;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W+1:0]     sum;

  // one iteration in carry-save form
  logic [W+1:0] ab, s1, c1, qn, s2, c2;
  always_comb begin
    ab = a_sh[0] ? {2'b00, b} : '0;
    s1 = s ^ c ^ ab;
    c1 = ((s & c) | (s & ab) | (c & ab)) << 1;
    qn = s1[0] ? {2'b00, n} : '0;
    s2 = s1 ^ c1 ^ qn;
    c2 = ((s1 & c1) | (s1 & qn) | (c1 & qn)) << 1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= M_IDLE; s <= '0; c <= '0; a_sh <= '0; cnt <= '0; sum <= '0;
      r <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        M_IDLE: if (start) begin
          s <= '0; c <= '0; a_sh <= a; cnt <= '0;
          st <= M_LOOP;
        end
        M_LOOP: begin
          s    <= s2 >> 1;
          c    <= c2 >> 1;
          a_sh <= a_sh >> 1;
          cnt  <= cnt + 1'b1;
          if (cnt == ($clog2(W+1))'(W - 1)) st <= M_ADD;
        end
        M_ADD: begin
          sum <= s + c;
          st  <= M_SUB;
        end
        M_SUB: begin
          r    <= (sum >= {2'b00, n}) ? W'(sum - {2'b00, n}) : sum[W-1:0];
          done <= 1'b1;
          st   <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end

  assign busy = (st != M_IDLE);

  // a new product may only start when the previous one has finished
  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> !busy);
endmodule
