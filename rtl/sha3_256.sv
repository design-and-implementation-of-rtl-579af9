// sha3_256: SHA-3 hash (Keccak sponge, rate 1088 bits, capacity 512 bits,
// 256-bit digest).
//
// The message arrives as 128-bit words on a valid/ready handshake; byte 0 of
// a word is bits [127:120]. `in_last` marks the final word and `in_nbytes`
// (1..16) says how many of its bytes belong to the message. Bytes are packed
// into a 136-byte block buffer; a word that crosses the block boundary leaves
// its upper half in an overflow register for the next block. Padding is the
// SHA-3 rule: the two domain bits 01 and the first pad bit give the byte 0x06
// right after the message, and 0x80 is XORed into the last byte of the final
// block. Each full block is XORed into the 1600-bit state and Keccak-p[1600]
// runs one round per clock for 24 clocks (theta, rho, pi, chi, iota in one
// combinational round, Eq. 1 of the Keccak definition). The 24 round
// constants are held in a ROM indexed by the round counter, as the design
// stores round indexes in memory instead of computing them in a loop; the ROM
// contents are generated at elaboration from the Keccak LFSR
// x^8+x^6+x^5+x^4+1. `digest` (byte 0 at bits [255:248]) is valid while
// `digest_valid` is high, until the next `start`, which clears the state.
// The SHA-3 variant (SHA3-256) and the word interface are this design's
// choices; the document says only that SHA uses Keccak with 24 rounds.
module sha3_256 (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [127:0] in_data,
  input  logic         in_last,
  input  logic [4:0]   in_nbytes,
  output logic [255:0] digest,
  output logic         digest_valid
);
  localparam int unsigned RATE_BYTES = 136;
  localparam int unsigned ROUNDS     = 24;

  typedef enum logic [1:0] {S_IDLE, S_ABSORB, S_PERM, S_DONE} state_e;

  // ---------------- round constant ROM and rotation offsets ----------------
  function automatic logic [ROUNDS*64-1:0] gen_rc();
    logic [ROUNDS*64-1:0] t = '0;
    logic [8:0] r = 9'h001;
    logic [7:0] bits [7*ROUNDS];
    for (int k = 0; k < 7*ROUNDS; k++) begin
      bits[k] = {7'd0, r[0]};
      r = {r[7:0], 1'b0};
      r[0] ^= r[8]; r[4] ^= r[8]; r[5] ^= r[8]; r[6] ^= r[8];
      r[8] = 1'b0;
    end
    for (int i = 0; i < ROUNDS; i++)
      for (int j = 0; j < 7; j++)
        t[64*i + (1 << j) - 1] = bits[j + 7*i][0];
    return t;
  endfunction

  function automatic logic [25*6-1:0] gen_rot();
    logic [25*6-1:0] t = '0;
    int x = 1, y = 0, nx;
    for (int k = 0; k < 24; k++) begin
      t[6*(x + 5*y) +: 6] = 6'(((k + 1) * (k + 2) / 2) % 64);
      nx = y;
      y  = (2*x + 3*y) % 5;
      x  = nx;
    end
    return t;
  endfunction

  localparam logic [ROUNDS*64-1:0] RC_ROM = gen_rc();
  localparam logic [25*6-1:0]      ROT    = gen_rot();

  function automatic logic [63:0] rotl(logic [63:0] v, int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  function automatic logic [1599:0] keccak_round(logic [1599:0] a, logic [63:0] rc);
    logic [63:0] c [5];
    logic [63:0] d [5];
    logic [63:0] b [25];
    logic [1599:0] r;
    for (int x = 0; x < 5; x++)
      c[x] = a[64*x +: 64] ^ a[64*(x+5) +: 64] ^ a[64*(x+10) +: 64]
           ^ a[64*(x+15) +: 64] ^ a[64*(x+20) +: 64];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    // theta, rho and pi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rotl(a[64*(x+5*y) +: 64] ^ d[x], int'(ROT[6*(x+5*y) +: 6]));
    // chi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        r[64*(x+5*y) +: 64] = b[x+5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    // iota
    r[63:0] ^= rc;
    return r;
  endfunction

  // ---------------- sponge control ----------------
  state_e          st;
  logic [1599:0]   a;
  logic [1087:0]   blk;        // byte j at blk[8j +: 8]
  logic [63:0]     ovf;        // bytes that spilled past the block
  logic [7:0]      pos;        // next free byte in blk (multiple of 8)
  logic [4:0]      rnd;
  logic            final_blk;  // blk holds the 0x06 pad byte
  logic            final_next; // the pad byte spilled into ovf

  logic [1087:0] blk_w;
  logic [63:0]   ovf_w;
  logic [8:0]    pad_pos;

  always_comb begin
    blk_w   = blk;
    ovf_w   = '0;
    pad_pos = 9'(pos) + 9'(in_nbytes);
    for (int b = 0; b < 17; b++) begin
      logic [7:0] v;
      int         q;
      q = int'(pos) + b;
      if (b < 16 && !(in_last && b >= int'(in_nbytes))) v = in_data[127 - 8*b -: 8];
      else if (in_last && b == int'(in_nbytes))          v = 8'h06;
      else                                               v = 8'h00;
      if (q < RATE_BYTES) blk_w[8*q +: 8] = v;
      else if (q < RATE_BYTES + 8) ovf_w[8*(q - RATE_BYTES) +: 8] = v;
    end
  end

  logic [1599:0] a_in;
  always_comb begin
    a_in = a;
    if (rnd == 0) begin
      a_in[1087:0] = a[1087:0] ^ blk;
      if (final_blk) a_in[8*(RATE_BYTES-1) +: 8] = a_in[8*(RATE_BYTES-1) +: 8] ^ 8'h80;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; a <= '0; blk <= '0; ovf <= '0; pos <= '0; rnd <= '0;
      final_blk <= 1'b0; final_next <= 1'b0;
    end else if (start) begin
      st <= S_ABSORB; a <= '0; blk <= '0; ovf <= '0; pos <= '0; rnd <= '0;
      final_blk <= 1'b0; final_next <= 1'b0;
    end else begin
      unique case (st)
        S_ABSORB: if (in_valid) begin
          blk <= blk_w;
          ovf <= ovf_w;
          if (in_last) begin
            final_blk  <= (pad_pos < 9'(RATE_BYTES));
            final_next <= (pad_pos >= 9'(RATE_BYTES));
            st  <= S_PERM;
            rnd <= '0;
          end else if (9'(pos) + 9'd16 >= 9'(RATE_BYTES)) begin
            st  <= S_PERM;
            rnd <= '0;
          end else begin
            pos <= pos + 8'd16;
          end
        end
        S_PERM: begin
          a   <= keccak_round(a_in, RC_ROM[64*rnd +: 64]);
          rnd <= rnd + 5'd1;
          if (rnd == 5'(ROUNDS - 1)) begin
            rnd <= '0;
            blk <= {1024'd0, ovf};
            ovf <= '0;
            pos <= pos + 8'd16 - 8'(RATE_BYTES);
            if (final_blk) begin
              st <= S_DONE;
            end else if (final_next) begin
              final_blk  <= 1'b1;
              final_next <= 1'b0;
              st <= S_PERM;
            end else begin
              st <= S_ABSORB;
            end
          end
        end
        default: ;
      endcase
    end
  end

  assign in_ready     = (st == S_ABSORB);
  assign digest_valid = (st == S_DONE);
  always_comb
    for (int j = 0; j < 32; j++) digest[255 - 8*j -: 8] = a[8*j +: 8];

  // the last word carries 1 to 16 message bytes
  a_nbytes: assert property (@(posedge clk) disable iff (rst)
                            in_valid && in_ready && in_last |-> in_nbytes inside {[5'd1:5'd16]});
endmodule
