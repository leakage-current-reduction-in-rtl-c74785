// tb_zso_resolution_sweep: the switch-off resolution study. Twelve data
// arrays, one per configuration (resolutions 32, 32+24, 32+16, 32+8,
// 32+24+16 and 32+24+16+8, each with plain ZSO and with full-ZSO writes),
// store the same synthetic words. Every read is checked, and the switched-off
// cells and an estimated transistor count are printed per configuration.
// Structural checks: full-ZSO never switches off fewer cells than plain ZSO,
// the two are identical at resolution 32, and a finer resolution never
// switches off fewer cells than a coarser one it contains.
module tb_zso_resolution_sweep;
  localparam int NCFG = 12;
  localparam logic [31:0] RESV [6] = '{32'h0000_0001, 32'h0000_0101, 32'h0001_0001,
                                       32'h0100_0001, 32'h0001_0101, 32'h0101_0101};
  localparam string NAMES [6] = '{"32", "32+24", "32+16", "32+8", "32+24+16", "32+24+16+8"};

  logic clk = 0, start = 0;
  always #5 clk = ~clk;

  logic   done [NCFG];
  longint off [NCFG], tr [NCFG], base [NCFG];
  int     c [NCFG], f [NCFG];
  int checks = 0, failures = 0;

  for (genvar r = 0; r < 6; r++) begin : g_res
    for (genvar m = 0; m < 2; m++) begin : g_mode
      res_probe #(.RES(RESV[r]), .FULL_ZSO(m == 1), .NWORDS(4096)) u_p (
        .clk, .start, .done(done[2*r+m]), .off_bits(off[2*r+m]), .transistors(tr[2*r+m]),
        .base_transistors(base[2*r+m]), .checks(c[2*r+m]), .failures(f[2*r+m])
      );
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    repeat (2) @(negedge clk);
    start = 1;
    do begin
      @(negedge clk);
      all = 1;
      for (int i = 0; i < NCFG; i++) all &= done[i];
    end while (!all);
    for (int i = 0; i < NCFG; i++) begin
      checks += c[i];
      failures += f[i];
      $display("%-11s %-9s cells off %5.1f%%  net transistor saving %5.1f%%",
               NAMES[i/2], (i % 2) ? "full-ZSO" : "ZSO",
               100.0 * real'(off[i]) / real'(32 * 4096),
               100.0 * (1.0 - real'(tr[i]) / real'(base[i])));
    end
    for (int r = 0; r < 6; r++)
      check(off[2*r+1] >= off[2*r], $sformatf("full-ZSO below ZSO at %s", NAMES[r]));
    check(off[0] == off[1], "ZSO and full-ZSO differ at resolution 32");
    // 32+24+16 contains 32+24 and 32+16; 32+24+16+8 contains 32+24+16
    for (int m = 0; m < 2; m++) begin
      check(off[8+m] >= off[2+m], "32+24+16 below 32+24");
      check(off[8+m] >= off[4+m], "32+24+16 below 32+16");
      check(off[10+m] >= off[8+m], "32+24+16+8 below 32+24+16");
      check(off[2+m] >= off[0+m], "32+24 below 32");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
