// zso_data_array: the data SRAM of the L1 cache with zeros switch-off.
//
// Every word is stored together with its switch-off vector S (one bit per
// power segment, default resolution 32+24+16, so 3 bits). On a write the
// word passes through zso_write_encoder; the S bits are stored and only the
// segments that stay powered are written into the cells. A segment with
// S_j = 0 is switched off: its cells are not written and keep whatever they
// held, standing in for cells that have lost their supply. On a read
// zso_read_decoder forces such segments to zero, so no information is lost.
// The stored S of the word read is also brought out (rs) so that the number
// of powered cells can be observed.
//
// Interface: one synchronous write port (we/waddr/wdata) and one
// asynchronous read port (raddr -> rdata, rs). The port structure and the
// stale-content model of unpowered cells are this design's choices; the
// per-word S vector, the encoder and the decoder follow the ZSO scheme.
module zso_data_array
  import zso_pkg::*;
#(
  parameter int unsigned       DEPTH    = 4096,           // 16KB of 32-bit words
  parameter logic [WORD_W-1:0] RES      = RES_32_24_16,
  parameter int unsigned       NSEG     = res_nseg(RES),
  parameter bit                FULL_ZSO = 1'b1,
  localparam int unsigned      AW       = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WORD_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [WORD_W-1:0] rdata,
  output logic [NSEG-1:0]   rs
);

  logic [WORD_W-1:0] cells [DEPTH];
  logic [NSEG-1:0]   smem  [DEPTH];

  logic [NSEG-1:0]   ws;
  logic [WORD_W-1:0] wmask;

  zso_write_encoder #(.RES(RES), .NSEG(NSEG), .FULL_ZSO(FULL_ZSO)) u_enc (
    .w (wdata),
    .s (ws)
  );

  // Cells of switched-off segments are not written.
  for (genvar j = 0; j < NSEG; j++) begin : g_seg
    localparam logic [WORD_W-1:0] M = seg_mask(RES, j);
    for (genvar b = 0; b < WORD_W; b++) begin : g_bit
      if (M[b]) begin : g_on
        assign wmask[b] = ws[j];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (we) begin
      smem[waddr]  <= ws;
      cells[waddr] <= (cells[waddr] & ~wmask) | (wdata & wmask);
    end
  end

  assign rs = smem[raddr];

  zso_read_decoder #(.RES(RES), .NSEG(NSEG)) u_dec (
    .cells (cells[raddr]),
    .s     (rs),
    .w     (rdata)
  );

endmodule
