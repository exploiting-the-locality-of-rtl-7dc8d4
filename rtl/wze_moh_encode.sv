// wze_moh_encode: modified one-hot encoder for a working-zone offset.
//
// Step 1 places a single 1 on bit position idx of an N-bit vector, where idx is
// the offset's two's-complement value modulo N (offset 0 -> bit 0, -1 -> bit
// N-1). Step 2 XORs that one-hot vector with the word previously driven on
// the bus, so the new word differs from the previous one in exactly one wire
// whatever was sent before (an earlier offset or a full address).
//
// Interface: purely combinational. offset is OFF_W = log2(N) bits, signed,
// range -N/2 .. N/2-1; prev_word is the word field last sent; word is the new
// word field. The two-step encoding is the document's; the mapping of signed
// offsets to bit positions is this design's choice. N must be a power of two.
// With the default OFF_W = log2(N) the whole word carries the one-hot offset
// (k = N); a smaller OFF_W uses only the low k = 2^OFF_W wires and limits the
// offsets to -k/2 .. k/2-1.
module wze_moh_encode #(
  parameter int unsigned N     = wze_pkg::ADDR_W,
  parameter int unsigned OFF_W = $clog2(N)
) (
  input  logic [OFF_W-1:0] offset,
  input  logic [N-1:0]     prev_word,
  output logic [N-1:0]     word
);

  logic [N-1:0] onehot;

  always_comb begin
    onehot = '0;
    onehot[offset] = 1'b1;
    word = prev_word ^ onehot;
  end

endmodule
