// tb_decay_local_counters: drives global ticks by hand into 8 local
// counters (range 3..0) and checks which blocks are switched off on which
// tick: a live untouched block on the 4th tick, an accessed block 4 ticks
// after its last access, never a block that is not alive.
module tb_decay_local_counters;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, tick = 0, access_en = 0;
  logic [2:0] access_idx = 0;
  logic [N-1:0] alive, decay;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  decay_local_counters #(.NLINES(N), .LOCAL_MAX(3)) u_dut (.clk, .rst_n, .tick, .access_en, .access_idx, .alive, .decay);

  // one tick, optionally with an access in the same cycle; returns the decay
  // pulses that follow
  task automatic do_tick(input bit acc, input logic [2:0] idx, output logic [N-1:0] d);
    @(negedge clk);
    tick = 1; access_en = acc; access_idx = idx;
    @(negedge clk);
    tick = 0; access_en = 0;
    d = decay;
    repeat (3) @(negedge clk);
  endtask

  task automatic access(input logic [2:0] idx);
    @(negedge clk);
    access_en = 1; access_idx = idx;
    @(negedge clk);
    access_en = 0;
  endtask

  task automatic expect_d(input logic [N-1:0] got, input logic [N-1:0] exp, input int t);
    checks++;
    if (got !== exp) begin failures++; $display("tick %0d decay=%b exp=%b", t, got, exp); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] d;
    alive = 8'b0111_1111;           // block 7 is not alive
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ticks 1..3: nothing decays (3 -> 0)
    for (int t = 1; t <= 3; t++) begin
      if (t == 2) access(3'd2);     // block 2 reloads after tick 1
      do_tick(t == 3, 3'd5, d);     // block 5 accessed on tick 3 itself
      expect_d(d, '0, t);
    end
    // tick 4: every live block except 2 and 5 underflows
    do_tick(0, 0, d);
    expect_d(d, 8'b0101_1011, 4);
    alive = alive & ~8'b0101_1011;
    // block 2 was reloaded between ticks 1 and 2: it decays on tick 5;
    // block 5 was reloaded on tick 3 itself: it decays on tick 7
    do_tick(0, 0, d); expect_d(d, 8'b0000_0100, 5);
    alive[2] = 0;
    do_tick(0, 0, d); expect_d(d, '0, 6);
    do_tick(0, 0, d); expect_d(d, 8'b0010_0000, 7);
    alive[5] = 0;
    // no decay pulse for blocks that are gone
    do_tick(0, 0, d); expect_d(d, '0, 8);
    // a block made alive again starts from a fresh access
    alive[0] = 1; access(3'd0);
    for (int t = 0; t < 3; t++) begin do_tick(0, 0, d); expect_d(d, '0, 9 + t); end
    do_tick(0, 0, d); expect_d(d, 8'b0000_0001, 12);
    // pulses last one cycle
    @(negedge clk);
    checks++;
    if (decay !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
