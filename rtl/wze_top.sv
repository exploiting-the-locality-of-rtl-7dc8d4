// wze_top: a complete working-zone-encoded address bus, sender to receiver.
//
// The processor side presents data addresses (req_valid/req_addr). The WZE
// encoder turns each into the three bus fields - word (N wires), ident
// (log2(B) wires) and Pref_miss (1 wire) - and latches them onto the bus. The
// receiver side decodes the bus back into the original address for the
// memory. The bus fields are brought out as ports so that their switching
// activity can be observed; on a chip the encoder and decoder sit on either
// side of the pads, which are not modelled.
//
// Timing: mem_addr/mem_addr_valid follow req_addr/req_valid by exactly one
// clock (the encoder's bus latch); the decoder adds no register. One
// reference per cycle is accepted. Defaults: N = 16, B = 2 as in the
// document's evaluation, giving m = 18 bus wires.
module wze_top #(
  parameter int unsigned N    = wze_pkg::ADDR_W,
  parameter int unsigned B    = wze_pkg::NUM_PREFS,
  parameter int unsigned ID_W = wze_pkg::idx_width(B)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req_valid,
  input  logic [N-1:0]    req_addr,
  output logic            bus_valid,
  output logic [N-1:0]    bus_word,
  output logic [ID_W-1:0] bus_ident,
  output logic            bus_pref_miss,
  output logic            mem_addr_valid,
  output logic [N-1:0]    mem_addr,
  output logic            protocol_err
);

  wze_encoder #(.N(N), .B(B), .ID_W(ID_W)) u_enc (
    .clk          (clk),
    .rst_n        (rst_n),
    .req_valid    (req_valid),
    .req_addr     (req_addr),
    .bus_valid    (bus_valid),
    .bus_word     (bus_word),
    .bus_ident    (bus_ident),
    .bus_pref_miss(bus_pref_miss)
  );

  wze_decoder #(.N(N), .B(B), .ID_W(ID_W)) u_dec (
    .clk          (clk),
    .rst_n        (rst_n),
    .bus_valid    (bus_valid),
    .bus_word     (bus_word),
    .bus_ident    (bus_ident),
    .bus_pref_miss(bus_pref_miss),
    .addr_valid   (mem_addr_valid),
    .addr         (mem_addr),
    .protocol_err (protocol_err)
  );

  // Rule of the bus between a matching encoder and decoder: a hit changes at
  // most one wire of the word field, so the decoder never flags an error.
  a_bus_rule: assert property (@(posedge clk) disable iff (!rst_n) !protocol_err);

endmodule
