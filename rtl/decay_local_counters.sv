// decay_local_counters: the per-block counters of cache decay.
//
// Each cache block has a small counter ranging from LOCAL_MAX (3) down to 0.
// An access to the block (a hit or a refill) reloads it to LOCAL_MAX. Each
// global tick decrements the counters of all live blocks; a live block whose
// counter is already 0 underflows on the tick, and a one-cycle decay pulse
// is raised for it: the cache then switches the block off (clears it). A
// block that is not alive (invalid, or already switched off) does not count.
// If an access and a tick hit the same block in the same cycle, the access
// wins. With LOCAL_MAX = 3 and a 8192-cycle global period a block is
// switched off between 3*8192+1 and 4*8192 cycles after its last access.
// Counter ranges follow the evaluated decay configuration; the
// access-beats-tick rule and the "only live blocks count" rule are this
// design's choices.
module decay_local_counters #(
  parameter int unsigned NLINES    = 256,
  parameter int unsigned LOCAL_MAX = 3,
  localparam int unsigned IW = $clog2(NLINES),
  localparam int unsigned LW = $clog2(LOCAL_MAX + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic              access_en,
  input  logic [IW-1:0]     access_idx,
  input  logic [NLINES-1:0] alive,
  output logic [NLINES-1:0] decay
);

  logic [LW-1:0] cnt [NLINES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NLINES; i++) cnt[i] <= LW'(LOCAL_MAX);
      decay <= '0;
    end else begin
      for (int unsigned i = 0; i < NLINES; i++) begin
        decay[i] <= 1'b0;
        if (access_en && access_idx == IW'(i)) begin
          cnt[i] <= LW'(LOCAL_MAX);
        end else if (tick && alive[i]) begin
          if (cnt[i] == '0) begin
            decay[i] <= 1'b1;
            cnt[i]   <= LW'(LOCAL_MAX);
          end else begin
            cnt[i] <= cnt[i] - 1'b1;
          end
        end
      end
    end
  end

endmodule
