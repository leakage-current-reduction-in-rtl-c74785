// zso_pkg: constants, types and segment-mask functions shared by the zeros
// switch-off (ZSO) data cache. The functions are evaluated at elaboration
// time to build the per-segment bit masks of the encoder, decoder and array.
//
// A data word of WORD_W bits is split into NSEG power segments. The
// switch-off resolution is written as a list of "how many most significant
// bits can be cut at once", largest first: 32+24+16 means the whole word,
// the top 24 bits or the top 16 bits can be switched off (zero, i.e. all on,
// is always implied). Each component X starts a segment at bit WORD_W-X;
// the segment runs up to the start of the next one. Segment j (counted from
// the least significant end) is gated by bit S_j. For 32+24+16 that is
// S_2 -> bits 31..16, S_1 -> bits 15..8, S_0 -> bits 7..0.
// The 32+24+16 resolution is the configuration the design is built
// around. Encoding a resolution as a bit vector (one bit set where each
// segment starts) and the CPU request struct are this design's own.
package zso_pkg;

  parameter int unsigned WORD_W = 32;
  parameter int unsigned BYTES_PER_WORD = WORD_W / 8;

  // A resolution X1+X2+...+Xn is encoded as a WORD_W-bit vector with bit
  // (WORD_W - Xi) set for each component: bit b is set when a segment starts
  // at bit b. 32+24+16 -> bits 0, 8 and 16 -> 32'h0001_0101.
  parameter logic [WORD_W-1:0] RES_32_24_16 = 32'h0001_0101;

  // Number of segments of a resolution.
  function automatic int unsigned res_nseg(input logic [WORD_W-1:0] res);
    int unsigned n;
    n = 0;
    for (int unsigned b = 0; b < WORD_W; b++)
      if (res[b]) n++;
    return n;
  endfunction

  // Bit mask of segment j (j = 0 is the least significant segment).
  function automatic logic [WORD_W-1:0] seg_mask(input logic [WORD_W-1:0] res, input int unsigned j);
    logic [WORD_W-1:0] m;
    int   seg;
    m   = '0;
    seg = -1;
    for (int unsigned b = 0; b < WORD_W; b++) begin
      if (res[b]) seg++;
      if (seg == int'(j)) m[b] = 1'b1;
    end
    return m;
  endfunction

  // Every bit from the top of the word down to the lowest bit of segment j:
  // what plain ZSO's OR-chain looks at for S_j.
  function automatic logic [WORD_W-1:0] chain_mask(input logic [WORD_W-1:0] res, input int unsigned j);
    logic [WORD_W-1:0] m;
    m = '0;
    for (int unsigned k = j; k < WORD_W; k++)
      m |= seg_mask(res, k);
    return m;
  endfunction

  // CPU-side request to the L1 data cache.
  typedef struct packed {
    logic                      we;
    logic [31:0]               addr;
    logic [BYTES_PER_WORD-1:0] be;
    logic [WORD_W-1:0]         wdata;
  } cpu_req_t;

endpackage
