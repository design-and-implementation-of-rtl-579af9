// key_mem: key and operand store of the accelerator.
//
// Five W-bit registers: private exponent, public exponent, modulus, public
// value and shared secret. The host side writes them 128 bits at a time
// (`wr_en`, `wr_slot`, `wr_word`, word 0 = least significant bits); the
// modular exponentiation unit can overwrite the shared secret as a whole
// (`sec_wr_en`, which wins over a word write to the same slot). Every slot is
// readable in full at all times, since the exponentiation unit and the AES
// key schedule need whole operands. Reset clears all slots.
// The document shows a memory next to the controller and exponentiation unit
// and lists what is stored; the slot layout and a separate modulus slot are
// this design's choices.
module key_mem
  import tls_pkg::*;
#(
  parameter int unsigned W = 2048
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_en,
  input  slot_e        wr_slot,
  input  logic [$clog2(W/128)-1:0] wr_word,
  input  logic [127:0] wr_data,
  input  logic         sec_wr_en,
  input  logic [W-1:0] sec_wr_data,
  output logic [W-1:0] priv_key,
  output logic [W-1:0] pub_e,
  output logic [W-1:0] modulus,
  output logic [W-1:0] pub_val,
  output logic [W-1:0] secret
);
  logic [W-1:0] mem [NSLOTS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NSLOTS; i++) mem[i] <= '0;
    end else begin
      if (wr_en) mem[wr_slot][128*wr_word +: 128] <= wr_data;
      if (sec_wr_en) mem[SLOT_SECRET] <= sec_wr_data;
    end
  end

  assign priv_key = mem[SLOT_PRIV];
  assign pub_e    = mem[SLOT_PUB_E];
  assign modulus  = mem[SLOT_MOD];
  assign pub_val  = mem[SLOT_PUBVAL];
  assign secret   = mem[SLOT_SECRET];
endmodule
