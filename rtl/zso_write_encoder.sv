// zso_write_encoder: computes the switch-off vector S of a word on its way
// into the data array.
//
// S_j = 1 keeps segment j of the word powered, S_j = 0 cuts its supply
// through the segment's gated-VDD transistor. A segment may only be cut when
// all its bits are zero, so S is a set of OR reductions:
//   * full-ZSO (FULL_ZSO = 1, the configuration the design uses): S_j is the
//     OR of the bits of segment j alone, so any all-zero segment is cut,
//     wherever it sits in the word.
//   * plain ZSO (FULL_ZSO = 0): S_j is the OR of every bit from the top of
//     the word down to the bottom of segment j (an OR-gate chain), so only a
//     run of zeros at the most significant end is cut.
// The resolution is passed as a bit vector with a 1 where each segment
// starts (see zso_pkg); the default is 32+24+16. Both write functions and the
// resolution come from the ZSO scheme; the bit-vector encoding of the
// resolution is this design's own. Purely combinational; its delay sits in
// the write path, which is off the processor's critical read path.
module zso_write_encoder
  import zso_pkg::*;
#(
  parameter logic [WORD_W-1:0] RES      = RES_32_24_16,
  parameter int unsigned       NSEG     = res_nseg(RES),
  parameter bit                FULL_ZSO = 1'b1
) (
  input  logic [WORD_W-1:0] w,
  output logic [NSEG-1:0]   s
);

  // Every resolution includes the whole word (component 32), so segment 0
  // starts at bit 0 and the segments cover the word.
  initial if (!RES[0]) $error("resolution must include the whole word");

  for (genvar j = 0; j < NSEG; j++) begin : g_seg
    // bits that must all be zero before segment j may be switched off
    localparam logic [WORD_W-1:0] LOOK = FULL_ZSO ? seg_mask(RES, j) : chain_mask(RES, j);
    assign s[j] = |(w & LOOK);
  end

endmodule
