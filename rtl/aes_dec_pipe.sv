// aes_dec_pipe: fully pipelined AES-128 inverse cipher.
//
// Mirror of aes_enc_pipe: the input stage adds round key 10, stages 1..9 run
// InvShiftRows, InvSubBytes, AddRoundKey(10-r) and InvMixColumns, and stage 10
// runs InvShiftRows, InvSubBytes and AddRoundKey(0). One block may enter per
// clock; its plaintext appears LATENCY = 11 cycles later with `out_valid`.
// It uses the same round keys as the cipher (the straightforward inverse
// cipher of FIPS-197, not the equivalent one). The document says the AES unit
// is used for decryption as well; a separate inverse pipeline is this
// design's choice.
module aes_dec_pipe
  import aes_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic [1407:0] round_keys,
  input  logic          in_valid,
  input  block_t        in_data,
  output logic          out_valid,
  output block_t        out_data
);
  block_t st  [NR+1];
  logic   vld [NR+1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i <= NR; i++) begin
        vld[i] <= 1'b0;
        st[i]  <= '0;
      end
    end else begin
      st[0]  <= in_data ^ round_keys[128*NR +: 128];
      vld[0] <= in_valid;
      for (int r = 1; r <= NR; r++) begin
        if (r < NR)
          st[r] <= inv_mix_columns(inv_sub_bytes(inv_shift_rows(st[r-1])) ^ round_keys[128*(NR-r) +: 128]);
        else
          st[r] <= inv_sub_bytes(inv_shift_rows(st[r-1])) ^ round_keys[127:0];
        vld[r] <= vld[r-1];
      end
    end
  end

  assign out_valid = vld[NR];
  assign out_data  = st[NR];
endmodule
