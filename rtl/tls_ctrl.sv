// tls_ctrl: controller of the TLS accelerator.
//
// It decodes the host command, moves operands between the host, the key
// memory and the computing units, routes intermediate results between them
// (the operand multiplexer in front of the AES unit lives here) and sends
// results back. Nine modes (see tls_pkg): four store a key or value, one runs
// a modular exponentiation for DHE or RSA, and four run CBC-mode AES-128
// together with a hash, CMAC or SHA-3, for encryption or decryption.
//
// Host protocol. While idle (`busy` low) a cycle with `en` high starts the
// command on `cmd`. During a command the controller raises `rd_req` when it
// can take a 128-bit word, and a word moves on every cycle with `rd_req` and
// `en` both high. Results leave on `data_out` with a one-cycle `out_valid`
// strobe and are always accepted. `done` pulses once at the end; `auth_ok`
// and `mac_ok` hold the outcome of the last RSA check and MAC check.
//
// Word sequences:
//   STORE_*      W/128 words, least significant first (STORE_PUB: e, then N)
//   MODEXP       no input; output W/128 words of the result
//   ENC_*        header (byte length L >= 1 in bits [31:0]), IV, ceil(L/16)
//                plaintext words; output one ciphertext word per plaintext
//                word, then the encrypted tag (CMAC: 1 word, SHA-3: 2 words)
//   DEC_*        header, IV, ceil(L/16) ciphertext words, then the tag words;
//                output the plaintext words, then `mac_ok`
// The last message word carries L - 16*(ceil(L/16)-1) valid bytes, the first
// bytes being bits [127:...]; its unused bytes are encrypted as zeros. CMAC
// pads a short last block with 0x80 0x00.. and uses subkey K2, a full one
// uses K1. The AES key is the low 128 bits of the shared secret; the same
// key serves CBC and CMAC. At the start of every CBC command the key schedule
// is rebuilt and, for CMAC, L = AES_K(0) is computed for the subkeys.
// In CBC+CMAC encryption the CBC block and the CMAC block of the same
// plaintext word enter the AES pipeline on consecutive cycles, so both chains
// advance once per pipeline latency. The document gives the controller's
// role and its number of modes; the command set, word order, handshake and
// the key and tag choices are this design's.
module tls_ctrl
  import aes_pkg::*;
  import tls_pkg::*;
#(
  parameter int unsigned W = 2048
) (
  input  logic         clk,
  input  logic         rst,
  // host
  input  logic         en,
  input  logic [5:0]   cmd,
  input  logic [127:0] data_in,
  output logic         rd_req,
  output logic [127:0] data_out,
  output logic         out_valid,
  output logic         busy,
  output logic         done,
  output logic         auth_ok,
  output logic         mac_ok,
  // key memory
  output logic         mem_wr_en,
  output slot_e        mem_wr_slot,
  output logic [$clog2(W/128)-1:0] mem_wr_word,
  output logic [127:0] mem_wr_data,
  output logic         mem_sec_wr_en,
  input  logic [W-1:0] mem_priv,
  input  logic [W-1:0] mem_pub_e,
  input  logic [W-1:0] mem_pubval,
  input  logic [W-1:0] mem_secret,
  // modular exponentiation
  output logic         me_start,
  output logic [W-1:0] me_m,
  output logic [W-1:0] me_e,
  input  logic [W-1:0] me_c,
  input  logic         me_done,
  // AES key schedule
  output logic         ke_start,
  output block_t       ke_key,
  input  logic         ke_ready,
  // AES cipher pipeline
  output logic         enc_valid,
  output block_t       enc_data,
  output logic [1:0]   enc_tag,
  input  logic         enc_out_valid,
  input  block_t       enc_out_data,
  input  logic [1:0]   enc_out_tag,
  // AES inverse cipher pipeline
  output logic         dec_valid,
  output block_t       dec_data,
  input  logic         dec_out_valid,
  input  block_t       dec_out_data,
  // CMAC subkeys
  output logic         sk_load,
  input  block_t       sk_k1,
  input  block_t       sk_k2,
  // SHA-3
  output logic         sha_start,
  output logic         sha_valid,
  input  logic         sha_ready,
  output logic [127:0] sha_data,
  output logic         sha_last,
  output logic [4:0]   sha_nbytes,
  input  logic [255:0] sha_digest,
  input  logic         sha_digest_valid
);
  localparam int unsigned NW = W / 128;
  localparam logic [1:0] TAG_CBC = 2'd0, TAG_MAC = 2'd1, TAG_SUB = 2'd2;

  typedef enum logic [4:0] {
    C_IDLE, C_STORE, C_ME_START, C_ME_RUN, C_ME_OUT,
    C_KEYSTART, C_KEY, C_SUBK, C_SUBWAIT, C_HDR, C_IV,
    C_EBLK, C_EMAC, C_EWAIT, C_ETAG, C_ETWAIT,
    C_DBLK, C_DWAIT, C_DMAC, C_DTAG, C_DTWAIT, C_DCHECK, C_DONE
  } cstate_e;

  cstate_e     st;
  mode_e       mode;
  modexp_op_e  op;
  logic [$clog2(2*NW+1)-1:0] wcnt;
  logic [27:0] nblk, blk_i;
  logic [4:0]  last_nb;
  block_t      prev_c, cur_c, mac, p_reg;
  logic        got_cbc, got_mac, tword;
  logic [255:0] rx_tag;

  logic is_cmac, is_sha, xfer, is_last;
  logic [4:0] nb_cur;
  block_t     din_masked, dec_plain, dec_masked;

  function automatic block_t mask_bytes(block_t x, logic [4:0] nb);
    return x & ~({128{1'b1}} >> (8 * nb));
  endfunction

  // CMAC input for a message block: last block gets padding and a subkey
  function automatic block_t cmac_block(block_t p, logic last, logic [4:0] nb,
                                        block_t k1, block_t k2);
    if (!last)          return p;
    else if (nb == 5'd16) return p ^ k1;
    else                return (p | (128'h80 << (8 * (15 - nb)))) ^ k2;
  endfunction

  assign is_cmac    = (mode == MODE_ENC_CMAC) || (mode == MODE_DEC_CMAC);
  assign is_sha     = (mode == MODE_ENC_SHA)  || (mode == MODE_DEC_SHA);
  assign is_last    = (blk_i == nblk - 28'd1);
  assign nb_cur     = is_last ? last_nb : 5'd16;
  assign xfer       = rd_req && en;
  assign din_masked = mask_bytes(data_in, nb_cur);
  assign dec_plain  = dec_out_data ^ prev_c;
  assign dec_masked = mask_bytes(dec_plain, nb_cur);

  // ---------------- request and datapath routing ----------------
  always_comb begin
    rd_req = 1'b0;
    unique case (st)
      C_STORE, C_HDR, C_IV, C_DTAG: rd_req = 1'b1;
      C_EBLK, C_DBLK:               rd_req = !is_sha || sha_ready;
      default: ;
    endcase
  end

  always_comb begin
    enc_valid = 1'b0;
    enc_data  = '0;
    enc_tag   = TAG_CBC;
    dec_valid = 1'b0;
    dec_data  = data_in;
    unique case (st)
      C_SUBK: begin enc_valid = 1'b1; enc_data = '0; enc_tag = TAG_SUB; end
      C_EBLK: begin enc_valid = xfer; enc_data = din_masked ^ prev_c; end
      C_EMAC: begin
        enc_valid = 1'b1;
        enc_tag   = TAG_MAC;
        enc_data  = mac ^ cmac_block(p_reg, is_last, nb_cur, sk_k1, sk_k2);
      end
      C_ETAG: begin
        enc_valid = !is_sha || sha_digest_valid;
        enc_data  = prev_c ^ (is_cmac ? mac : (tword ? sha_digest[127:0] : sha_digest[255:128]));
      end
      C_DWAIT: if (is_cmac && dec_out_valid) begin
        enc_valid = 1'b1;
        enc_tag   = TAG_MAC;
        enc_data  = mac ^ cmac_block(dec_masked, is_last, nb_cur, sk_k1, sk_k2);
      end
      C_DBLK, C_DTAG: dec_valid = xfer;
      default: ;
    endcase
  end

  // memory, key schedule, subkeys, SHA
  always_comb begin
    mem_wr_en   = (st == C_STORE) && xfer;
    mem_wr_data = data_in;
    mem_wr_word = ($clog2(NW))'(32'(wcnt) % NW);
    unique case (mode)
      MODE_STORE_PRIV:   mem_wr_slot = SLOT_PRIV;
      MODE_STORE_PUB:    mem_wr_slot = (wcnt < ($clog2(2*NW+1))'(NW)) ? SLOT_PUB_E : SLOT_MOD;
      MODE_STORE_PUBVAL: mem_wr_slot = SLOT_PUBVAL;
      default:           mem_wr_slot = SLOT_SECRET;
    endcase
  end
  assign mem_sec_wr_en = (st == C_ME_RUN) && me_done && (op == OP_DHE);

  always_comb begin
    me_m = mem_pubval;
    me_e = mem_priv;
    if (op == OP_RSA_ENC) begin
      me_m = mem_secret;
      me_e = mem_pub_e;
    end
  end
  assign me_start = (st == C_ME_START);

  assign ke_start = (st == C_KEYSTART);
  assign ke_key   = mem_secret[127:0];
  assign sk_load  = enc_out_valid && (enc_out_tag == TAG_SUB);

  assign sha_start  = (st == C_IV) && xfer && is_sha;
  assign sha_valid  = is_sha && (((st == C_EBLK) && xfer) || ((st == C_DWAIT) && dec_out_valid));
  assign sha_data   = (st == C_EBLK) ? din_masked : dec_masked;
  assign sha_last   = is_last;
  assign sha_nbytes = nb_cur;

  always_comb begin
    out_valid = 1'b0;
    data_out  = '0;
    unique case (st)
      C_ME_OUT: begin out_valid = 1'b1; data_out = me_c[128*(32'(wcnt) % NW) +: 128]; end
      C_EWAIT, C_ETWAIT: if (enc_out_valid && enc_out_tag == TAG_CBC) begin
        out_valid = 1'b1; data_out = enc_out_data;
      end
      C_DWAIT: if (dec_out_valid) begin out_valid = 1'b1; data_out = dec_masked; end
      default: ;
    endcase
  end

  assign busy = (st != C_IDLE);
  assign done = (st == C_DONE);

  // ---------------- state machine ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      st <= C_IDLE; mode <= MODE_STORE_PRIV; op <= OP_DHE; wcnt <= '0;
      nblk <= '0; blk_i <= '0; last_nb <= '0;
      prev_c <= '0; cur_c <= '0; mac <= '0; p_reg <= '0;
      got_cbc <= 1'b0; got_mac <= 1'b0; tword <= 1'b0; rx_tag <= '0;
      auth_ok <= 1'b0; mac_ok <= 1'b0;
    end else begin
      unique case (st)
        C_IDLE: if (en) begin
          mode <= mode_e'(cmd[3:0]);
          op   <= modexp_op_e'(cmd[5:4]);
          wcnt <= '0;
          unique case (cmd[3:0])
            MODE_STORE_PRIV, MODE_STORE_PUB, MODE_STORE_PUBVAL, MODE_STORE_SECRET:
              st <= C_STORE;
            MODE_MODEXP:
              st <= C_ME_START;
            MODE_ENC_CMAC, MODE_DEC_CMAC, MODE_ENC_SHA, MODE_DEC_SHA:
              st <= C_KEYSTART;
            default: st <= C_IDLE;   // undefined command: ignored
          endcase
        end
        C_STORE: if (xfer) begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == ($clog2(2*NW+1))'((mode == MODE_STORE_PUB) ? 2*NW-1 : NW-1)) st <= C_DONE;
        end
        // ---- modular exponentiation ----
        C_ME_START: st <= C_ME_RUN;
        C_ME_RUN: if (me_done) begin
          if (op == OP_RSA_VERIFY) auth_ok <= (me_c == mem_secret);
          wcnt <= '0;
          st   <= C_ME_OUT;
        end
        C_ME_OUT: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == ($clog2(2*NW+1))'(NW - 1)) st <= C_DONE;
        end
        // ---- CBC set-up ----
        C_KEYSTART: st <= C_KEY;
        C_KEY: if (ke_ready) st <= is_cmac ? C_SUBK : C_HDR;
        C_SUBK: st <= C_SUBWAIT;
        C_SUBWAIT: if (sk_load) st <= C_HDR;
        C_HDR: if (xfer) begin
          nblk    <= 28'((data_in[31:0] + 32'd15) >> 4);
          last_nb <= (data_in[3:0] == 4'd0) ? 5'd16 : {1'b0, data_in[3:0]};
          blk_i   <= '0;
          st      <= C_IV;
        end
        C_IV: if (xfer) begin
          prev_c <= data_in;
          mac    <= '0;
          tword  <= 1'b0;
          st     <= (mode == MODE_ENC_CMAC || mode == MODE_ENC_SHA) ? C_EBLK : C_DBLK;
        end
        // ---- encryption ----
        C_EBLK: if (xfer) begin
          p_reg   <= din_masked;
          got_cbc <= 1'b0;
          got_mac <= !is_cmac;
          st      <= is_cmac ? C_EMAC : C_EWAIT;
        end
        C_EMAC: st <= C_EWAIT;
        C_EWAIT: begin
          if (enc_out_valid && enc_out_tag == TAG_CBC) begin
            prev_c  <= enc_out_data;
            got_cbc <= 1'b1;
          end
          if (enc_out_valid && enc_out_tag == TAG_MAC) begin
            mac     <= enc_out_data;
            got_mac <= 1'b1;
          end
          if ((got_cbc || (enc_out_valid && enc_out_tag == TAG_CBC)) &&
              (got_mac || (enc_out_valid && enc_out_tag == TAG_MAC))) begin
            blk_i <= blk_i + 28'd1;
            st    <= is_last ? C_ETAG : C_EBLK;
          end
        end
        C_ETAG: if (enc_valid) st <= C_ETWAIT;
        C_ETWAIT: if (enc_out_valid && enc_out_tag == TAG_CBC) begin
          prev_c <= enc_out_data;
          if (is_sha && !tword) begin
            tword <= 1'b1;
            st    <= C_ETAG;
          end else begin
            st <= C_DONE;
          end
        end
        // ---- decryption ----
        C_DBLK: if (xfer) begin
          cur_c <= data_in;
          st    <= C_DWAIT;
        end
        C_DWAIT: if (dec_out_valid) begin
          prev_c <= cur_c;
          if (is_cmac) begin
            st <= C_DMAC;
          end else begin
            blk_i <= blk_i + 28'd1;
            st    <= is_last ? C_DTAG : C_DBLK;
          end
        end
        C_DMAC: if (enc_out_valid && enc_out_tag == TAG_MAC) begin
          mac   <= enc_out_data;
          blk_i <= blk_i + 28'd1;
          st    <= is_last ? C_DTAG : C_DBLK;
        end
        C_DTAG: if (xfer) begin
          cur_c <= data_in;
          st    <= C_DTWAIT;
        end
        C_DTWAIT: if (dec_out_valid) begin
          prev_c <= cur_c;
          if (is_sha && !tword) begin
            rx_tag[255:128] <= dec_plain;
            tword <= 1'b1;
            st    <= C_DTAG;
          end else begin
            rx_tag[127:0] <= dec_plain;
            st <= C_DCHECK;
          end
        end
        C_DCHECK: begin
          if (is_cmac) begin
            mac_ok <= (rx_tag[127:0] == mac);
            st     <= C_DONE;
          end else if (sha_digest_valid) begin
            mac_ok <= (rx_tag == sha_digest);
            st     <= C_DONE;
          end
        end
        C_DONE: st <= C_IDLE;
        default: st <= C_IDLE;
      endcase
    end
  end

  // the SHA-3 unit is only fed when it can accept a word
  a_sha_push: assert property (@(posedge clk) disable iff (rst) sha_valid |-> sha_ready);
  // a record holds at least one byte
  a_len: assert property (@(posedge clk) disable iff (rst) (st == C_HDR) && xfer |-> data_in[31:0] != 32'd0);
endmodule
