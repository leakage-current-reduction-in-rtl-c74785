// zso_read_decoder: rebuilds a word read from the data array.
//
// Bits of a segment whose S bit is 0 were never powered, so their cells hold
// nothing meaningful; the word carries a 0 there instead (the ground line of
// the read circuit). Bits of powered segments come straight from the cells.
// The tristate buffers of the circuit are written here as one AND gate per
// bit, the single extra gate level the read path is allowed. The resolution
// encoding matches zso_write_encoder (default 32+24+16). Combinational.
module zso_read_decoder
  import zso_pkg::*;
#(
  parameter logic [WORD_W-1:0] RES  = RES_32_24_16,
  parameter int unsigned       NSEG = res_nseg(RES)
) (
  input  logic [WORD_W-1:0] cells,
  input  logic [NSEG-1:0]   s,
  output logic [WORD_W-1:0] w
);

  // Every resolution includes the whole word (component 32), so segment 0
  // starts at bit 0 and the segments cover the word.
  initial if (!RES[0]) $error("resolution must include the whole word");

  for (genvar j = 0; j < NSEG; j++) begin : g_seg
    localparam logic [WORD_W-1:0] M = seg_mask(RES, j);
    for (genvar b = 0; b < WORD_W; b++) begin : g_bit
      if (M[b]) begin : g_on
        assign w[b] = cells[b] & s[j];
      end
    end
  end

endmodule
