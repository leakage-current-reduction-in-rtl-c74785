// res_probe: testbench helper that measures one switch-off configuration.
//
// It writes NWORDS words of the synthetic value mix of tb_mem_pkg into a
// zso_data_array built with the given resolution and write mode, reads each
// back, checks the word and its S vector against an S computed here from
// the segment boundaries, and counts how many data cells end up switched
// off. The transistor estimate counts 6 transistors per powered cell, 6 per
// S bit and 1 gated-VDD transistor per segment, against 6 per cell for a
// cache without switch-off.
module res_probe
  import tb_mem_pkg::*;
#(
  parameter logic [31:0] RES      = 32'h0001_0101,
  parameter bit          FULL_ZSO = 1'b1,
  parameter int          NWORDS   = 1024,
  parameter int          SEED     = 0
) (
  input  logic   clk,
  input  logic   start,
  output logic   done,
  output longint off_bits,
  output longint transistors,
  output longint base_transistors,
  output int     checks,
  output int     failures
);
  localparam int NSEG = $countones(RES);
  localparam int AW   = $clog2(NWORDS);

  logic          we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [31:0]   wdata = 0, rdata;
  logic [NSEG-1:0] rs;

  zso_data_array #(.DEPTH(NWORDS), .RES(RES), .NSEG(NSEG), .FULL_ZSO(FULL_ZSO)) u_arr (
    .clk, .we, .waddr, .wdata, .raddr, .rdata, .rs
  );

  // segment boundaries listed from the resolution bits
  int lo [NSEG];
  int hi [NSEG];
  initial begin
    int k;
    k = 0;
    for (int b = 0; b < 32; b++) if (RES[b]) begin lo[k] = b; k++; end
    for (int j = 0; j < NSEG; j++) hi[j] = (j == NSEG - 1) ? 31 : lo[j + 1] - 1;
  end

  function automatic logic [NSEG-1:0] expect_s(input logic [31:0] v);
    logic [NSEG-1:0] s;
    for (int j = 0; j < NSEG; j++) begin
      s[j] = 1'b0;
      for (int b = (FULL_ZSO ? lo[j] : lo[j]); b <= (FULL_ZSO ? hi[j] : 31); b++)
        if (v[b]) s[j] = 1'b1;
    end
    return s;
  endfunction

  initial begin
    done = 0; off_bits = 0; transistors = 0; base_transistors = 0; checks = 0; failures = 0;
    wait (start);
    for (int i = 0; i < NWORDS; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = init_word(32'(i + SEED));
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < NWORDS; i++) begin
      logic [31:0]     v;
      logic [NSEG-1:0] es;
      int              on;
      v = init_word(32'(i + SEED));
      raddr = AW'(i);
      #1;
      es = expect_s(v);
      checks += 2;
      if (rdata !== v) failures++;
      if (rs !== es) failures++;
      on = 0;
      for (int j = 0; j < NSEG; j++) if (es[j]) on += hi[j] - lo[j] + 1;
      off_bits         += 32 - on;
      transistors      += 6 * on + 6 * NSEG + NSEG;
      base_transistors += 6 * 32;
    end
    done = 1;
  end
endmodule
