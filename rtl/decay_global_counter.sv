// decay_global_counter: the single global counter of cache decay.
//
// The counter runs from GLOBAL_PERIOD-1 (8191) down to 0, one step per clock
// cycle. When it would underflow it reloads and emits a one-cycle tick,
// which tells every per-block local counter to count down once. While decay
// is disabled (en = 0) the counter holds at its start value and no tick is
// produced. The 8191..0 range is the evaluated configuration; counting one
// step per cache clock and the hold-when-disabled behaviour are this
// design's choices.
module decay_global_counter #(
  parameter int unsigned GLOBAL_PERIOD = 8192,
  localparam int unsigned CW = $clog2(GLOBAL_PERIOD)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic tick
);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= CW'(GLOBAL_PERIOD - 1);
      tick <= 1'b0;
    end else if (!en) begin
      cnt  <= CW'(GLOBAL_PERIOD - 1);
      tick <= 1'b0;
    end else if (cnt == '0) begin
      cnt  <= CW'(GLOBAL_PERIOD - 1);
      tick <= 1'b1;
    end else begin
      cnt  <= cnt - 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
