// wze_decoder: working-zone decoder (receiver side of the WZE address bus).
//
// Mirrors the sender's state: B Prefs (last address per zone), B prev_off
// registers (last offset per zone), the previously received word and an LRU
// copy. For each reference on the bus:
//   * Pref_miss = 0: the received word is XORed with the previous one. Zero
//       means the zone's previous offset repeats; otherwise the single set
//       bit gives a new offset, which is stored in prev_off[ident]. The
//       address is Pref[ident] + offset (modulo 2^N), and Pref[ident] is
//       loaded with it.
//   * Pref_miss = 1: the word is the address itself; it replaces the
//       least-recently-used Pref, whose prev_off is kept.
// The LRU copy is touched with the same zone as in the sender, so both pick
// the same victim.
//
// Interface and timing: bus_valid marks a cycle that carries a reference.
// addr and addr_valid are combinational from the bus and the state, i.e. the
// address is available in the same cycle the bus carries it; state updates
// on the following clock edge. protocol_err flags a hit whose XOR has more
// than one bit set, which a matching sender never produces. The algorithm is
// the document's; the strobe, combinational output and reset values (all 0,
// matching the sender) are this design's choices.
//
// OFF_W sets k = 2^OFF_W, the number of word wires that carry the one-hot
// offset, and with it the offset range -k/2 .. k/2-1. The default k = N uses
// the whole word; any smaller power of two works the same way, provided the
// encoder and decoder agree.
module wze_decoder #(
  parameter int unsigned N     = wze_pkg::ADDR_W,
  parameter int unsigned B     = wze_pkg::NUM_PREFS,
  parameter int unsigned OFF_W = $clog2(N),
  parameter int unsigned ID_W  = wze_pkg::idx_width(B)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            bus_valid,
  input  logic [N-1:0]    bus_word,
  input  logic [ID_W-1:0] bus_ident,
  input  logic            bus_pref_miss,
  output logic            addr_valid,
  output logic [N-1:0]    addr,
  output logic            protocol_err
);

  logic [N-1:0]     pref_q     [B];
  logic [OFF_W-1:0] prev_off_q [B];
  logic [N-1:0]     prev_recv_q;

  logic             same, onehot_ok;
  logic [OFF_W-1:0] new_off, use_off;
  logic [ID_W-1:0]  victim, touch_idx;

  wze_moh_retrieve #(.N(N), .OFF_W(OFF_W)) u_ret (
    .word     (bus_word),
    .prev_word(prev_recv_q),
    .same     (same),
    .offset   (new_off),
    .onehot_ok(onehot_ok)
  );

  wze_lru #(.NUM(B), .IDX_W(ID_W)) u_lru (
    .clk      (clk),
    .rst_n    (rst_n),
    .touch    (bus_valid),
    .touch_idx(touch_idx),
    .victim   (victim)
  );

  always_comb begin
    use_off   = same ? prev_off_q[bus_ident] : new_off;
    touch_idx = bus_pref_miss ? victim : bus_ident;
    if (bus_pref_miss) addr = bus_word;
    else               addr = pref_q[bus_ident] + N'(signed'(use_off));
    addr_valid   = bus_valid;
    protocol_err = bus_valid && !bus_pref_miss && !onehot_ok;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < B; j++) begin
        pref_q[j]     <= '0;
        prev_off_q[j] <= '0;
      end
      prev_recv_q <= '0;
    end else if (bus_valid) begin
      pref_q[touch_idx] <= addr;
      if (!bus_pref_miss && !same) prev_off_q[bus_ident] <= new_off;
      prev_recv_q <= bus_word;
    end
  end

endmodule
