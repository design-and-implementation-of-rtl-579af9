// aes_pkg: AES-128 constants and round functions shared by the key schedule and
// the two cipher pipelines.
//
// Byte order follows FIPS-197: byte 0 of a 128-bit block is bits [127:120] and
// the state is filled column by column (bytes 0..3 are column 0). The S-box is
// not typed in as a table: gen_sbox() builds it at elaboration as
// S(x) = affine(x^254) over GF(2^8) with the polynomial x^8+x^4+x^3+x+1, and
// gen_inv_sbox() inverts it. Everything here is synthesizable combinational
// logic; the design's own choice is to build the S-box this way instead of
// storing a literal table.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;

  localparam int unsigned NR = 10;   // AES-128 rounds

  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  function automatic logic [2047:0] gen_sbox();
    logic [2047:0] t;
    for (int x = 0; x < 256; x++) begin
      byte_t inv, acc, s;
      byte_t c = 8'h63;
      // x^254 = multiplicative inverse (0 maps to 0)
      inv = 8'h01;
      acc = byte_t'(x);
      for (int k = 0; k < 8; k++) begin
        if (k != 0) inv = gmul(inv, acc);
        acc = gmul(acc, acc);
      end
      if (x == 0) inv = 8'h00;
      // affine transform
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ c[i];
      t[x*8 +: 8] = s;
    end
    return t;
  endfunction

  localparam logic [2047:0] SBOX = gen_sbox();

  function automatic logic [2047:0] gen_inv_sbox();
    logic [2047:0] t;
    for (int x = 0; x < 256; x++)
      t[SBOX[x*8 +: 8]*8 +: 8] = byte_t'(x);
    return t;
  endfunction

  localparam logic [2047:0] INV_SBOX = gen_inv_sbox();

  function automatic byte_t sbox(byte_t b);
    return SBOX[b*8 +: 8];
  endfunction

  function automatic byte_t inv_sbox(byte_t b);
    return INV_SBOX[b*8 +: 8];
  endfunction

  // byte i of a block (i = 0 is the most significant byte)
  function automatic byte_t get_byte(block_t s, int i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic block_t sub_bytes(block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = sbox(get_byte(s, i));
    return r;
  endfunction

  function automatic block_t inv_sub_bytes(block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = inv_sbox(get_byte(s, i));
    return r;
  endfunction

  // row r of column c is byte 4c+r; row r rotates left by r columns
  function automatic block_t shift_rows(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(4*c + row) -: 8] = get_byte(s, 4*((c + row) % 4) + row);
    return r;
  endfunction

  function automatic block_t inv_shift_rows(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(4*((c + row) % 4) + row) -: 8] = get_byte(s, 4*c + row);
    return r;
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++) begin
      byte_t a0, a1, a2, a3;
      a0 = get_byte(s, 4*c); a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2); a3 = get_byte(s, 4*c+3);
      r[127 - 8*(4*c)   -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      r[127 - 8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      r[127 - 8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      r[127 - 8*(4*c+3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction

  // multiples of a byte by 9, 11, 13 and 14 built from doublings
  function automatic logic [31:0] inv_mul(byte_t a);
    byte_t m2, m4, m8;
    m2 = xtime(a); m4 = xtime(m2); m8 = xtime(m4);
    return {m8 ^ a, m8 ^ m2 ^ a, m8 ^ m4 ^ a, m8 ^ m4 ^ m2};  // {x9, xb, xd, xe}
  endfunction

  function automatic block_t inv_mix_columns(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++) begin
      logic [31:0] t0, t1, t2, t3;   // each {x9, xb, xd, xe}
      t0 = inv_mul(get_byte(s, 4*c));   t1 = inv_mul(get_byte(s, 4*c+1));
      t2 = inv_mul(get_byte(s, 4*c+2)); t3 = inv_mul(get_byte(s, 4*c+3));
      r[127 - 8*(4*c)   -: 8] = t0[7:0]   ^ t1[23:16] ^ t2[15:8]  ^ t3[31:24];
      r[127 - 8*(4*c+1) -: 8] = t0[31:24] ^ t1[7:0]   ^ t2[23:16] ^ t3[15:8];
      r[127 - 8*(4*c+2) -: 8] = t0[15:8]  ^ t1[31:24] ^ t2[7:0]   ^ t3[23:16];
      r[127 - 8*(4*c+3) -: 8] = t0[23:16] ^ t1[15:8]  ^ t2[31:24] ^ t3[7:0];
    end
    return r;
  endfunction

  // one key-schedule step: previous round key -> next round key
  function automatic block_t next_round_key(block_t k, byte_t rcon);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t = {sbox(w3[23:16]) ^ rcon, sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
