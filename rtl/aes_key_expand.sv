// aes_key_expand: AES-128 key schedule.
//
// On `start` the 128-bit cipher key is captured and one further round key is
// produced per clock, so all eleven round keys are valid in `round_keys` ten
// cycles later, when `ready` rises. Round key r sits in
// round_keys[128*r +: 128]; round key 0 is the cipher key itself. The keys
// are held until the next `start` and feed both cipher pipelines.
// The document says only that the round keys come from the initial key by the
// key expansion function; computing them once per key and holding them, one
// step per cycle, is this design's choice.
module aes_key_expand
  import aes_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  block_t        key,
  output logic [1407:0] round_keys,
  output logic          ready
);
  logic [3:0] step;
  logic       busy;
  byte_t      rcon;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      ready      <= 1'b0;
      step       <= '0;
      rcon       <= 8'h01;
      round_keys <= '0;
    end else if (start) begin
      round_keys[127:0] <= key;
      busy  <= 1'b1;
      ready <= 1'b0;
      step  <= 4'd1;
      rcon  <= 8'h01;
    end else if (busy) begin
      round_keys[128*step +: 128] <= next_round_key(round_keys[128*(32'(step)-1) +: 128], rcon);
      rcon <= xtime(rcon);
      step <= step + 4'd1;
      if (step == 4'(NR)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end
  end
endmodule
