// modexp: modular exponentiation C = M^e mod N with two Montgomery multipliers.
//
// Follows the right-to-left binary method over the exponent bits, LSB first:
//   M* = Mont(M, R^2);  S = R mod N;
//   for each bit e_i up to the highest set bit:
//     if e_i: S = Mont(M*, S)        (multiplier A)
//     M* = Mont(M*, M*)              (multiplier B, in parallel with A)
//   C = Mont(S, 1)
// with R = 2^W. Because the multiply and the square of one step do not depend
// on each other, both multipliers run together and a step costs one
// Montgomery multiplication time (W+5 cycles with hand-over). R mod N and R^2 mod N are
// computed first by 2W modular doublings of 1 (one per clock), so the unit
// needs only M, e and an odd N < 2^W with M < N.
// Timing: `start` for one cycle; `done` pulses when `c` is valid, about
// 2W + (k_e + 2)(W + 5) + 3 cycles after start for a k_e-bit exponent. An exponent of
// zero returns 1 mod N. The document gives the algorithm and the two
// multipliers; the doubling precomputation is this design's choice, since the
// document does not say where R^2 mod N comes from.
module modexp #(
  parameter int unsigned W = 2048
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] m,
  input  logic [W-1:0] e,
  input  logic [W-1:0] n,
  output logic [W-1:0] c,
  output logic         done,
  output logic         busy
);
  typedef enum logic [2:0] {X_IDLE, X_PRE, X_TOMONT, X_LOOP, X_WAIT, X_FROMMONT, X_FWAIT} xstate_e;

  xstate_e st;
  logic [W-1:0]   dbl;        // running 2^k mod N
  logic [W-1:0]   r_mod, r2_mod;
  logic [$clog2(2*W+1)-1:0] pcnt;
  logic [W-1:0]   e_sh, s_reg, mstar;
  logic           mul_s;      // multiplier A used in this step

  logic           a_start, b_start;
  logic [W-1:0]   a_x, a_y, b_x, b_y;
  logic [W-1:0]   a_r, b_r;
  logic           a_done, b_done;

  mont_mul #(.W(W)) u_mul_a (.clk, .rst, .start(a_start), .a(a_x), .b(a_y), .n,
                            .r(a_r), .done(a_done), .busy());
  mont_mul #(.W(W)) u_mul_b (.clk, .rst, .start(b_start), .a(b_x), .b(b_y), .n,
                            .r(b_r), .done(b_done), .busy());

  // operand routing; held for the whole multiplication by `phase`
  typedef enum logic [1:0] {P_TOMONT, P_LOOP, P_FROM} phase_e;
  phase_e phase;

  always_comb begin
    a_x = mstar;  a_y = s_reg;
    b_x = mstar;  b_y = mstar;
    if (phase == P_TOMONT) begin b_x = m;     b_y = r2_mod; end
    if (phase == P_FROM)   begin a_x = s_reg; a_y = W'(1);  end
  end

  logic [W:0] dbl2;
  assign dbl2 = {dbl, 1'b0};

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= X_IDLE; dbl <= '0; r_mod <= '0; r2_mod <= '0; pcnt <= '0;
      e_sh <= '0; s_reg <= '0; mstar <= '0; mul_s <= 1'b0; c <= '0; done <= 1'b0;
      a_start <= 1'b0; b_start <= 1'b0; phase <= P_TOMONT;
    end else begin
      done    <= 1'b0;
      a_start <= 1'b0;
      b_start <= 1'b0;
      unique case (st)
        X_IDLE: if (start) begin
          dbl  <= W'(1);
          pcnt <= '0;
          e_sh <= e;
          phase <= P_TOMONT;
          st   <= X_PRE;
        end
        X_PRE: begin
          dbl  <= (dbl2 >= {1'b0, n}) ? W'(dbl2 - {1'b0, n}) : W'(dbl2);
          pcnt <= pcnt + 1'b1;
          if (pcnt == ($clog2(2*W+1))'(W)) r_mod <= dbl[W-1:0];
          if (pcnt == ($clog2(2*W+1))'(2*W)) begin
            r2_mod  <= dbl[W-1:0];
            st      <= X_TOMONT;
          end
        end
        X_TOMONT: begin
          // M* = Mont(M, R^2) on multiplier B
          b_start <= 1'b1;
          s_reg   <= r_mod;
          st      <= X_WAIT;
          mul_s   <= 1'b0;
        end
        X_WAIT: begin
          if (b_done) begin
            mstar <= b_r;
            if (mul_s) s_reg <= a_r;
            phase <= P_LOOP;
            st <= X_LOOP;
          end
        end
        X_LOOP: begin
          if (e_sh == '0) begin
            st <= X_FROMMONT;
          end else begin
            mul_s   <= e_sh[0];
            a_start <= e_sh[0];
            b_start <= 1'b1;
            e_sh    <= e_sh >> 1;
            st      <= X_WAIT;
          end
        end
        X_FROMMONT: begin
          a_start <= 1'b1;
          phase   <= P_FROM;
          st      <= X_FWAIT;
        end
        X_FWAIT: if (a_done) begin
          c    <= a_r;
          done <= 1'b1;
          st   <= X_IDLE;
        end
        default: st <= X_IDLE;
      endcase
    end
  end

  assign busy = (st != X_IDLE);

  // Montgomery reduction needs an odd modulus; one exponentiation at a time
  a_odd_modulus: assert property (@(posedge clk) disable iff (rst) start |-> n[0]);
  a_start_idle:  assert property (@(posedge clk) disable iff (rst) start |-> !busy);
endmodule
