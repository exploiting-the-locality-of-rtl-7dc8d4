// wze_pkg: shared constants and helpers for the working-zone address bus
// encoder (WZE) and decoder.
//
// The defaults follow the 16-bit address bus and the two working-zone
// registers ("Prefs") that the design is evaluated with. The offset sent in
// modified one-hot form spans -N/2 .. N/2-1, so it needs log2(N) bits in two's
// complement; its one-hot bit position is that two's-complement value taken
// modulo N (offset 0 -> bit 0, offset 1 -> bit 1, offset -1 -> bit N-1). That
// bit mapping is this design's choice; the encoder and decoder only have to
// agree on it.
package wze_pkg;

  // Width of the original address (n) and of the word field of the bus.
  localparam int unsigned ADDR_W    = 16;
  // Number of working-zone registers (B).
  localparam int unsigned NUM_PREFS = 2;

  // Width of an index into NUM entries (at least 1 bit).
  function automatic int unsigned idx_width(input int unsigned num);
    return (num > 1) ? $clog2(num) : 1;
  endfunction

  // Number of set bits in a 64-bit vector (used by testbench-side checks and
  // by assertions on the bus activity).
  function automatic int unsigned popcount64(input logic [63:0] v);
    int unsigned c;
    c = 0;
    for (int i = 0; i < 64; i++) c += int'(v[i]);
    return c;
  endfunction

endpackage
