// wze_moh_retrieve: modified one-hot retrieval, the receiver-side inverse of
// wze_moh_encode.
//
// The received word is XORed with the word received before it. An all-zero
// result means the sender repeated its previous word, which the receiver reads
// as "same offset as last time for this working zone" (same = 1). Otherwise
// the position of the single 1 is the offset, returned as an OFF_W-bit two's
// complement value (bit position p -> offset p for p < N/2, p - N above).
// onehot_ok is low when the XOR has more than one bit set, which a correct
// sender never produces; offset then reports the lowest set bit.
//
// Interface: purely combinational. The XOR-then-one-hot retrieval follows the
// document; the bit-position mapping is this design's choice and matches
// wze_moh_encode. N must be a power of two. By default all N word wires carry
// the one-hot offset (k = N); a smaller OFF_W uses only the low k = 2^OFF_W
// wires, and a change on a wire above them is flagged by onehot_ok.
module wze_moh_retrieve #(
  parameter int unsigned N     = wze_pkg::ADDR_W,
  parameter int unsigned OFF_W = $clog2(N)
) (
  input  logic [N-1:0]     word,
  input  logic [N-1:0]     prev_word,
  output logic             same,
  output logic [OFF_W-1:0] offset,
  output logic             onehot_ok
);

  logic [N-1:0] diff;
  // Wires above the k = 2^OFF_W one-hot positions never change on a hit.
  localparam logic [N-1:0] HiMask = ~((N'(1) << (1 << OFF_W)) - N'(1));

  always_comb begin
    diff   = word ^ prev_word;
    same   = (diff == '0);
    offset = '0;
    // Scan from the top so the lowest set bit wins.
    for (int i = N - 1; i >= 0; i--) begin
      if (diff[i]) offset = OFF_W'(i);
    end
    onehot_ok = same || (((diff & (diff - N'(1))) == '0) && ((diff & HiMask) == '0));
  end

endmodule
