// wze_lru: least-recently-used replacement state for NUM working zones.
//
// Each zone carries an age from 0 (most recently used) to NUM-1 (least
// recently used); the ages are always a permutation of 0 .. NUM-1. A touch of
// zone idx makes it age 0 and ages by one every zone that was younger than
// it. victim is the zone whose age is NUM-1. For two zones this is one bit of
// state.
//
// Interface: touch/touch_idx are sampled at the clock edge; victim is a
// registered function of the ages and valid the whole cycle. Reset gives zone
// i age i, so zone NUM-1 is the first victim. The sender and receiver each
// hold one copy and touch it with the same zone on every reference, which
// keeps them in step. LRU replacement is the document's choice; the age
// encoding and reset order are this design's.
module wze_lru #(
  parameter int unsigned NUM   = wze_pkg::NUM_PREFS,
  parameter int unsigned IDX_W = wze_pkg::idx_width(NUM)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             touch,
  input  logic [IDX_W-1:0] touch_idx,
  output logic [IDX_W-1:0] victim
);

  logic [IDX_W-1:0] age_q [NUM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM; i++) age_q[i] <= IDX_W'(i);
    end else if (touch) begin
      for (int i = 0; i < NUM; i++) begin
        if (IDX_W'(i) == touch_idx)          age_q[i] <= '0;
        else if (age_q[i] < age_q[touch_idx]) age_q[i] <= age_q[i] + IDX_W'(1);
      end
    end
  end

  always_comb begin
    victim = '0;
    for (int i = 0; i < NUM; i++) begin
      if (age_q[i] == IDX_W'(NUM - 1)) victim = IDX_W'(i);
    end
  end

endmodule
