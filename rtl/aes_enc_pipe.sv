// aes_enc_pipe: fully pipelined AES-128 cipher.
//
// Eleven register stages: the input stage adds round key 0, stages 1..9 each
// run one full round (SubBytes, ShiftRows, MixColumns, AddRoundKey) and stage
// 10 runs the final round without MixColumns. A new block may enter on every
// clock; its ciphertext appears NR + 1 = 11 cycles later with `out_valid`.
// A 2-bit `in_tag` travels with each block so the controller can tell apart
// results of independent chains (CBC and CMAC) that share the pipeline.
// The document asks for a pipelined Rijndael for throughput; one round per
// stage is this design's choice.
module aes_enc_pipe
  import aes_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic [1407:0] round_keys,
  input  logic          in_valid,
  input  block_t        in_data,
  input  logic [1:0]    in_tag,
  output logic          out_valid,
  output block_t        out_data,
  output logic [1:0]    out_tag
);
  block_t     st  [NR+1];
  logic       vld [NR+1];
  logic [1:0] tag [NR+1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i <= NR; i++) begin
        vld[i] <= 1'b0;
        st[i]  <= '0;
        tag[i] <= '0;
      end
    end else begin
      st[0]  <= in_data ^ round_keys[127:0];
      vld[0] <= in_valid;
      tag[0] <= in_tag;
      for (int r = 1; r <= NR; r++) begin
        if (r < NR)
          st[r] <= mix_columns(shift_rows(sub_bytes(st[r-1]))) ^ round_keys[128*r +: 128];
        else
          st[r] <= shift_rows(sub_bytes(st[r-1])) ^ round_keys[128*r +: 128];
        vld[r] <= vld[r-1];
        tag[r] <= tag[r-1];
      end
    end
  end

  assign out_valid = vld[NR];
  assign out_data  = st[NR];
  assign out_tag   = tag[NR];
endmodule
