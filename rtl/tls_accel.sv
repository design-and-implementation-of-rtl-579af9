// tls_accel: top level of the TLS accelerator.
//
// A controller drives a key memory, a modular exponentiation unit with two
// Montgomery multipliers (DHE and RSA), a pipelined AES-128 cipher and
// inverse cipher with their key schedule, a CMAC subkey generator and a SHA-3
// unit. The host sees the ports of the document's block diagram: enable,
// command, 128-bit data input, read request and 128-bit data output. This
// design adds an output strobe, a busy flag, a done pulse and two result
// flags (RSA check and MAC check); see tls_ctrl for the command set and the
// word protocol. W is the width of the big-number operands (2048 bits in the
// document's evaluation) and must be a multiple of 128.
module tls_accel
  import aes_pkg::*;
  import tls_pkg::*;
#(
  parameter int unsigned W = 2048
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [5:0]   cmd,
  input  logic [127:0] data_in,
  output logic         rd_req,
  output logic [127:0] data_out,
  output logic         out_valid,
  output logic         busy,
  output logic         done,
  output logic         auth_ok,
  output logic         mac_ok
);
  logic         mem_wr_en, mem_sec_wr_en;
  slot_e        mem_wr_slot;
  logic [$clog2(W/128)-1:0] mem_wr_word;
  logic [127:0] mem_wr_data;
  logic [W-1:0] mem_priv, mem_pub_e, mem_mod, mem_pubval, mem_secret;

  logic         me_start, me_done;
  logic [W-1:0] me_m, me_e, me_c;

  logic          ke_start, ke_ready;
  block_t        ke_key;
  logic [1407:0] round_keys;

  logic         enc_valid, enc_out_valid;
  block_t       enc_data, enc_out_data;
  logic [1:0]   enc_tag, enc_out_tag;
  logic         dec_valid, dec_out_valid;
  block_t       dec_data, dec_out_data;

  logic         sk_load;
  block_t       sk_k1, sk_k2;

  logic         sha_start, sha_valid, sha_ready, sha_last, sha_digest_valid;
  logic [127:0] sha_data;
  logic [4:0]   sha_nbytes;
  logic [255:0] sha_digest;

  tls_ctrl #(.W(W)) u_ctrl (
    .clk, .rst, .en, .cmd, .data_in, .rd_req, .data_out, .out_valid, .busy, .done,
    .auth_ok, .mac_ok,
    .mem_wr_en, .mem_wr_slot, .mem_wr_word, .mem_wr_data, .mem_sec_wr_en,
    .mem_priv, .mem_pub_e, .mem_pubval, .mem_secret,
    .me_start, .me_m, .me_e, .me_c, .me_done,
    .ke_start, .ke_key, .ke_ready,
    .enc_valid, .enc_data, .enc_tag, .enc_out_valid, .enc_out_data, .enc_out_tag,
    .dec_valid, .dec_data, .dec_out_valid, .dec_out_data,
    .sk_load, .sk_k1, .sk_k2,
    .sha_start, .sha_valid, .sha_ready, .sha_data, .sha_last, .sha_nbytes,
    .sha_digest, .sha_digest_valid
  );

  key_mem #(.W(W)) u_mem (
    .clk, .rst, .wr_en(mem_wr_en), .wr_slot(mem_wr_slot), .wr_word(mem_wr_word),
    .wr_data(mem_wr_data), .sec_wr_en(mem_sec_wr_en), .sec_wr_data(me_c),
    .priv_key(mem_priv), .pub_e(mem_pub_e), .modulus(mem_mod), .pub_val(mem_pubval),
    .secret(mem_secret)
  );

  modexp #(.W(W)) u_modexp (
    .clk, .rst, .start(me_start), .m(me_m), .e(me_e), .n(mem_mod),
    .c(me_c), .done(me_done), .busy()
  );

  aes_key_expand u_keyexp (
    .clk, .rst, .start(ke_start), .key(ke_key), .round_keys, .ready(ke_ready)
  );

  aes_enc_pipe u_aes_enc (
    .clk, .rst, .round_keys, .in_valid(enc_valid), .in_data(enc_data), .in_tag(enc_tag),
    .out_valid(enc_out_valid), .out_data(enc_out_data), .out_tag(enc_out_tag)
  );

  aes_dec_pipe u_aes_dec (
    .clk, .rst, .round_keys, .in_valid(dec_valid), .in_data(dec_data),
    .out_valid(dec_out_valid), .out_data(dec_out_data)
  );

  cmac_subkey u_subkey (
    .clk, .rst, .load(sk_load), .l_in(enc_out_data), .k1(sk_k1), .k2(sk_k2), .valid()
  );

  sha3_256 u_sha (
    .clk, .rst, .start(sha_start), .in_valid(sha_valid), .in_ready(sha_ready),
    .in_data(sha_data), .in_last(sha_last), .in_nbytes(sha_nbytes),
    .digest(sha_digest), .digest_valid(sha_digest_valid)
  );
endmodule
