// wze_enc_pref: the sender-side hardware of one working zone.
//
// Holds Pref, the last address referenced in this zone, and prev_off, the
// offset that the last hit in this zone used. Every cycle it subtracts Pref
// from the current address; the reference hits the zone when the difference,
// read as a signed N-bit number (modulo 2^N), lies in -N/2 .. N/2-1. The low
// OFF_W bits of the difference are then the offset, and same_offset tells
// whether it equals prev_off.
//
// Interface: hit, offset and same_offset are combinational in current.
// pref_we loads Pref with current at the clock edge (on a hit in this zone or
// when this zone is the replacement victim of a miss); off_we loads prev_off
// with the offset (on a hit in this zone only). Both registers reset to 0,
// which the receiver mirrors. The structure (register, subtractor, range
// check, prev_off register, equality comparator) follows the encoder
// schematic; the reset values are this design's choice.
module wze_enc_pref #(
  parameter int unsigned N     = wze_pkg::ADDR_W,
  parameter int unsigned OFF_W = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     current,
  input  logic             pref_we,
  input  logic             off_we,
  output logic             hit,
  output logic [OFF_W-1:0] offset,
  output logic             same_offset
);

  logic [N-1:0]     pref_q;
  logic [OFF_W-1:0] prev_off_q;
  logic [N-1:0]     delta;

  always_comb begin
    delta  = current - pref_q;
    offset = delta[OFF_W-1:0];
    // In range when every bit above the offset field repeats its sign bit.
    hit = (delta[N-1:OFF_W-1] == '0) || (delta[N-1:OFF_W-1] == '1);
    same_offset = (offset == prev_off_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pref_q     <= '0;
      prev_off_q <= '0;
    end else begin
      if (pref_we) pref_q     <= current;
      if (off_we)  prev_off_q <= offset;
    end
  end

endmodule
