// wze_encoder: working-zone encoder (WZE) for an N-bit address bus, with the
// bus latch that drives the m = N + log2(B) + 1 wires.
//
// B working-zone registers (Prefs) remember the last address referenced in
// each zone. For every reference the encoder searches all of them at once
// (fully associative):
//   * hit in zone r (current - Pref_r within -N/2 .. N/2-1):
//       Pref_miss = 0, ident = r, and the word field is either the previous
//       word again (the offset equals the one zone r used last time) or the
//       previous word with the offset's one-hot bit flipped (modified one-hot).
//       Pref_r and prev_off_r are loaded.
//   * no hit: Pref_miss = 1, ident repeats its previous value, the word field
//       carries the full address, and the least-recently-used Pref is loaded
//       with it; prev_off of that zone is kept.
// If several zones hit, the lowest-numbered one is used.
//
// Interface and timing: a reference is presented as req_valid/req_addr for one
// cycle and may follow another every cycle. The bus fields are registered:
// they change one cycle after the request, together with bus_valid, and hold
// their values while no request arrives, so idle cycles toggle no bus wire.
// bus_valid is the access strobe of the memory bus; it is not one of the m
// encoded wires. The algorithm and the data path (per-zone subtract, range
// check and compare, offset mux, XOR with prev_sent, same-offset and miss
// muxes, NOR for Pref_miss, prev_ident mux) follow the document's encoder;
// the priority among several hits, the strobe and the reset values (all
// registers 0) are this design's choices.
//
// OFF_W sets k = 2^OFF_W, the number of word wires that carry the one-hot
// offset, and with it the offset range -k/2 .. k/2-1. The default k = N uses
// the whole word; any smaller power of two works the same way, provided the
// encoder and decoder agree.
module wze_encoder #(
  parameter int unsigned N     = wze_pkg::ADDR_W,
  parameter int unsigned B     = wze_pkg::NUM_PREFS,
  parameter int unsigned OFF_W = $clog2(N),
  parameter int unsigned ID_W  = wze_pkg::idx_width(B)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req_valid,
  input  logic [N-1:0]    req_addr,
  output logic            bus_valid,
  output logic [N-1:0]    bus_word,
  output logic [ID_W-1:0] bus_ident,
  output logic            bus_pref_miss
);

  logic [B-1:0]     hit, same_off, pref_we, off_we;
  logic [OFF_W-1:0] offset [B];

  logic [N-1:0]     prev_sent_q;
  logic [ID_W-1:0]  prev_ident_q;
  logic             pref_miss_q, valid_q;

  logic             miss;
  logic [ID_W-1:0]  r, victim, touch_idx;
  logic [OFF_W-1:0] sel_off;
  logic             sel_same;
  logic [N-1:0]     moh_word, word_n;
  logic [ID_W-1:0]  ident_n;

  for (genvar j = 0; j < B; j++) begin : g_pref
    wze_enc_pref #(.N(N), .OFF_W(OFF_W)) u_pref (
      .clk        (clk),
      .rst_n      (rst_n),
      .current    (req_addr),
      .pref_we    (pref_we[j]),
      .off_we     (off_we[j]),
      .hit        (hit[j]),
      .offset     (offset[j]),
      .same_offset(same_off[j])
    );
  end

  wze_lru #(.NUM(B), .IDX_W(ID_W)) u_lru (
    .clk      (clk),
    .rst_n    (rst_n),
    .touch    (req_valid),
    .touch_idx(touch_idx),
    .victim   (victim)
  );

  // Hit selection: lowest-numbered hitting zone.
  always_comb begin
    r = '0;
    for (int j = B - 1; j >= 0; j--) begin
      if (hit[j]) r = ID_W'(j);
    end
    miss     = (hit == '0);
    sel_off  = offset[r];
    sel_same = same_off[r];
  end

  wze_moh_encode #(.N(N), .OFF_W(OFF_W)) u_moh (
    .offset   (sel_off),
    .prev_word(prev_sent_q),
    .word     (moh_word)
  );

  always_comb begin
    word_n    = miss ? req_addr : (sel_same ? prev_sent_q : moh_word);
    ident_n   = miss ? prev_ident_q : r;
    touch_idx = miss ? victim : r;
    for (int j = 0; j < B; j++) begin
      pref_we[j] = req_valid && (ID_W'(j) == touch_idx);
      off_we[j]  = req_valid && !miss && (ID_W'(j) == r);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_sent_q  <= '0;
      prev_ident_q <= '0;
      pref_miss_q  <= 1'b0;
      valid_q      <= 1'b0;
    end else begin
      valid_q <= req_valid;
      if (req_valid) begin
        prev_sent_q  <= word_n;
        prev_ident_q <= ident_n;
        pref_miss_q  <= miss;
      end
    end
  end

  assign bus_valid     = valid_q;
  assign bus_word      = prev_sent_q;
  assign bus_ident     = prev_ident_q;
  assign bus_pref_miss = pref_miss_q;

  // A hit changes at most one wire of the word field.
  a_hit_word_activity: assert property (@(posedge clk) disable iff (!rst_n)
      (req_valid && !miss) |-> ($countones(word_n ^ prev_sent_q) <= 1));

endmodule
