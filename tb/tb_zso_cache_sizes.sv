// tb_zso_cache_sizes: the cache-size study. The L1 is built at 1KB, 4KB,
// 16KB and 64KB, each once with full-ZSO alone and once with full-ZSO plus
// cache decay, and every configuration runs the same kind of synthetic
// traffic. Load data is checked throughout; the average fraction of
// switched-off data cells, the misses and the decayed blocks are printed.
// Structural checks: decay never lowers the switched-off fraction, and with
// decay off no block is ever switched off.
module tb_zso_cache_sizes;
  localparam int NCFG = 8;
  localparam int unsigned SIZES [4] = '{1024, 4096, 16384, 65536};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done [NCFG];
  real  off [NCFG];
  int   miss [NCFG], dec [NCFG], c [NCFG], f [NCFG];
  int checks = 0, failures = 0;

  for (genvar s = 0; s < 4; s++) begin : g_size
    for (genvar d = 0; d < 2; d++) begin : g_decay
      cache_traffic #(.CACHE_BYTES(SIZES[s]), .DECAY(d == 1)) u_t (
        .clk, .rst_n, .done(done[2*s+d]), .off_frac(off[2*s+d]), .misses(miss[2*s+d]),
        .decays(dec[2*s+d]), .checks(c[2*s+d]), .failures(f[2*s+d])
      );
    end
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do begin
      @(negedge clk);
      all = 1;
      for (int i = 0; i < NCFG; i++) all &= done[i];
    end while (!all);
    for (int i = 0; i < NCFG; i++) begin
      checks += c[i] + 1;
      failures += f[i];
      $display("%6d B  %-16s switched off %5.1f%%  misses %5d  decayed blocks %5d",
               SIZES[i/2], (i % 2) ? "full-ZSO + decay" : "full-ZSO", 100.0 * off[i], miss[i], dec[i]);
      if (i % 2 == 0 && dec[i] != 0) begin failures++; $display("FAIL: decay with decay off"); end
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (off[2*s+1] + 0.01 < off[2*s]) begin failures++; $display("FAIL: decay lowered savings at %0d B", SIZES[s]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
