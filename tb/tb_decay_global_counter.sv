// tb_decay_global_counter: with the 8192-cycle default period, checks that a
// tick appears exactly every 8192 cycles while enabled and never while
// disabled, and that disabling restarts the count.
module tb_decay_global_counter;
  logic clk = 0, rst_n = 0, en = 0, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last_tick = -1, nticks = 0, en_cycle = 0;

  always #5 clk = ~clk;
  decay_global_counter u_dut (.clk, .rst_n, .en, .tick);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tick && rst_n) begin
      nticks <= nticks + 1;
      checks++;
      if (last_tick >= 0) begin
        if (cyc - last_tick != 8192) begin failures++; $display("tick gap %0d", cyc - last_tick); end
      end else if (cyc - en_cycle != 8192) begin
        failures++; $display("first tick after %0d cycles", cyc - en_cycle);
      end
      last_tick <= cyc;
    end
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20000) @(negedge clk);
    checks++;
    if (nticks != 0) begin failures++; $display("ticks while disabled"); end
    en = 1; en_cycle = cyc;          // first enabled edge is the next one
    repeat (5 * 8192 + 10) @(negedge clk);
    checks++;
    if (nticks != 5) begin failures++; $display("nticks=%0d exp 5", nticks); end
    // disable mid-period, then re-enable: full period again
    repeat (3000) @(negedge clk);
    en = 0;
    repeat (20000) @(negedge clk);
    checks++;
    if (nticks != 5) begin failures++; $display("ticks while disabled: %0d", nticks); end
    en = 1; en_cycle = cyc; last_tick = -1;
    repeat (8192 + 5) @(negedge clk);
    checks++;
    if (nticks != 6) begin failures++; $display("nticks=%0d exp 6", nticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
