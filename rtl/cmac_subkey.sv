// cmac_subkey: CMAC subkey generator (NIST SP 800-38B).
//
// Given L = AES_K(0^128) on `l_in` with `load`, it registers
// K1 = L<<1 xor (0x87 if msb(L)) and K2 = K1<<1 xor (0x87 if msb(K1)) and
// raises `valid` on the next cycle. K1 is used when the last message block is
// complete, K2 when it had to be padded. The document names the subkey
// generator and the two subkeys; the doubling in GF(2^128) is the standard
// CMAC rule.
module cmac_subkey
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   load,
  input  block_t l_in,
  output block_t k1,
  output block_t k2,
  output logic   valid
);
  function automatic block_t dbl(block_t x);
    return {x[126:0], 1'b0} ^ (x[127] ? 128'h87 : 128'h0);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      k1    <= '0;
      k2    <= '0;
      valid <= 1'b0;
    end else if (load) begin
      k1    <= dbl(l_in);
      k2    <= dbl(dbl(l_in));
      valid <= 1'b1;
    end
  end
endmodule
