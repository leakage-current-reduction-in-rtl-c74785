// zso_dcache: L1 data cache whose data words are kept with zeros switch-off
// (full-ZSO, resolution 32+24+16) and whose blocks can in addition be
// switched off by cache decay.
//
// Organisation (defaults): 16KB, 4-way set associative, 64-byte lines, so
// 64 sets of 4 blocks, 16 words per block, 20-bit tags. Every data word
// lives in zso_data_array together with its 3-bit switch-off vector, which
// is recomputed on every write (refill or store), so leakage is cut in the
// all-zero segments of each word without ever losing a bit. When decay_en is
// 1, decay_global_counter and decay_local_counters watch every block; a
// block left unaccessed for about four global periods (4 x 8192 cycles) is
// switched off, i.e. invalidated, and the next access to it misses. With
// decay_en = 0 the cache never loses a block except by replacement, so the
// switch-off scheme costs no misses.
//
// CPU port: a valid/ready request (we, byte address, byte enables, data)
// and a one-cycle resp_valid pulse with the load data, whether it hit, and
// the stored switch-off vector of the word loaded (resp_s, 1 = powered).
// One request at a time. A hit answers HIT_LATENCY (3) clock edges after
// the request is accepted. A load miss requests the whole line from the next
// level (mem_req_*, we = 0, line address) and then takes LINE_BYTES/4
// refill beats (mem_rvalid/mem_rdata, lowest word first) before it answers.
// Stores are written through to the next level (mem_req_*, we = 1, one word
// with byte enables) and update the cache only on a hit (no write-allocate).
//
// Geometry, hit latency, the ZSO resolution and the decay counter ranges
// follow the evaluated system. The write policy (write-through, no
// write-allocate), the replacement rule (an invalid way, else a per-set
// round-robin pointer), the blocking single-request interface and the
// refill protocol are this design's own choices.
module zso_dcache
  import zso_pkg::*;
#(
  parameter int unsigned       CACHE_BYTES   = 16384,
  parameter int unsigned       WAYS          = 4,
  parameter int unsigned       LINE_BYTES    = 64,
  parameter int unsigned       HIT_LATENCY   = 3,
  parameter logic [WORD_W-1:0] RES           = RES_32_24_16,
  parameter bit                FULL_ZSO      = 1'b1,
  parameter int unsigned       GLOBAL_PERIOD = 8192,
  parameter int unsigned       LOCAL_MAX     = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      decay_en,
  // CPU side
  input  logic                      req_valid,
  output logic                      req_ready,
  input  logic                      req_we,
  input  logic [31:0]               req_addr,
  input  logic [BYTES_PER_WORD-1:0] req_be,
  input  logic [WORD_W-1:0]         req_wdata,
  output logic                      resp_valid,
  output logic [WORD_W-1:0]         resp_rdata,
  output logic                      resp_hit,
  output logic [res_nseg(RES)-1:0]  resp_s,
  // next level (L2) side
  output logic                      mem_req_valid,
  input  logic                      mem_req_ready,
  output logic                      mem_req_we,
  output logic [31:0]               mem_req_addr,
  output logic [WORD_W-1:0]         mem_req_wdata,
  output logic [BYTES_PER_WORD-1:0] mem_req_be,
  input  logic                      mem_rvalid,
  input  logic [WORD_W-1:0]         mem_rdata,
  // status
  output logic                      decay_event
);

  localparam int unsigned NSEG   = res_nseg(RES);
  localparam int unsigned LINES  = CACHE_BYTES / LINE_BYTES;
  localparam int unsigned SETS   = LINES / WAYS;
  localparam int unsigned WPL    = LINE_BYTES / BYTES_PER_WORD;
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES);
  localparam int unsigned SET_W  = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned WOFF_W = $clog2(WPL);
  localparam int unsigned TAG_W  = 32 - OFF_W - $clog2(SETS);
  localparam int unsigned LIDX_W = $clog2(LINES);
  localparam int unsigned DAW    = $clog2(CACHE_BYTES / BYTES_PER_WORD);
  localparam int unsigned CNT_W  = 8;

  initial begin
    if (HIT_LATENCY < 3 || HIT_LATENCY > 200)
      $error("zso_dcache: HIT_LATENCY must be 3..200");
    if ((1 << $clog2(SETS)) != SETS || (1 << WOFF_W) != WPL)
      $error("zso_dcache: sets and words per line must be powers of two");
  end

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_MEMWR, S_MISS_REQ, S_REFILL, S_HOLD} state_t;

  state_t             state;
  cpu_req_t           req_q;
  logic [CNT_W-1:0]   cnt;
  logic               missed_q;
  logic [WAY_W-1:0]   victim_q;
  logic [WOFF_W-1:0]  beat_q;
  logic [WORD_W-1:0]  rdata_q;

  logic [LINES-1:0]   valid;
  logic [TAG_W-1:0]   tag_mem [LINES];
  logic [WAY_W-1:0]   rr_ptr  [SETS];

  // ---------------------------------------------------------------- lookup
  logic [SET_W-1:0]   set_idx;
  logic [TAG_W-1:0]   tag;
  logic [WOFF_W-1:0]  woff;
  logic [LINES-1:0]   decay;
  logic [LINES-1:0]   live;
  logic [WAYS-1:0]    hit_vec;
  logic               hit;
  logic [WAY_W-1:0]   hit_way;
  logic               have_free;
  logic [WAY_W-1:0]   free_way;
  logic [WAY_W-1:0]   victim;

  function automatic logic [LIDX_W-1:0] line_idx(input logic [SET_W-1:0] s, input logic [WAY_W-1:0] w);
    return LIDX_W'(s * WAYS + w);
  endfunction

  assign set_idx = (SETS > 1) ? SET_W'(req_q.addr[OFF_W +: SET_W]) : '0;
  assign tag     = req_q.addr[31 -: TAG_W];
  assign woff    = req_q.addr[$clog2(BYTES_PER_WORD) +: WOFF_W];
  // A block being switched off this cycle no longer counts as present.
  assign live    = valid & ~decay;

  always_comb begin
    hit_vec   = '0;
    hit_way   = '0;
    have_free = 1'b0;
    free_way  = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      hit_vec[w] = live[line_idx(set_idx, WAY_W'(w))] &&
                   tag_mem[line_idx(set_idx, WAY_W'(w))] == tag;
      if (hit_vec[w]) hit_way = WAY_W'(w);
    end
    for (int w = WAYS - 1; w >= 0; w--)
      if (!live[line_idx(set_idx, WAY_W'(w))]) begin
        have_free = 1'b1;
        free_way  = WAY_W'(w);
      end
    hit    = |hit_vec;
    victim = have_free ? free_way : rr_ptr[set_idx];
  end

  // ------------------------------------------------------------ data array
  logic              d_we;
  logic [DAW-1:0]    d_waddr;
  logic [WORD_W-1:0] d_wdata;
  logic [DAW-1:0]    d_raddr;
  logic [WORD_W-1:0] d_rdata;
  logic [NSEG-1:0]   d_rs;
  logic [WORD_W-1:0] merged;

  assign d_raddr = DAW'({line_idx(set_idx, hit_way), woff});

  always_comb begin
    merged = d_rdata;
    for (int unsigned b = 0; b < BYTES_PER_WORD; b++)
      if (req_q.be[b]) merged[8*b +: 8] = req_q.wdata[8*b +: 8];
  end

  always_comb begin
    d_we    = 1'b0;
    d_waddr = d_raddr;
    d_wdata = merged;
    if (state == S_LOOKUP && req_q.we && hit) begin
      d_we = 1'b1;
    end else if (state == S_REFILL && mem_rvalid) begin
      d_we    = 1'b1;
      d_waddr = DAW'({line_idx(set_idx, victim_q), beat_q});
      d_wdata = mem_rdata;
    end
  end

  zso_data_array #(
    .DEPTH    (CACHE_BYTES / BYTES_PER_WORD),
    .RES      (RES),
    .NSEG     (NSEG),
    .FULL_ZSO (FULL_ZSO)
  ) u_data (
    .clk   (clk),
    .we    (d_we),
    .waddr (d_waddr),
    .wdata (d_wdata),
    .raddr (d_raddr),
    .rdata (d_rdata),
    .rs    (d_rs)
  );

  // ------------------------------------------------------------ cache decay
  logic              tick;
  logic              acc_en;
  logic [LIDX_W-1:0] acc_idx;
  logic              refill_done;

  assign refill_done = (state == S_REFILL) && mem_rvalid && (beat_q == WOFF_W'(WPL - 1));

  always_comb begin
    acc_en  = 1'b0;
    acc_idx = line_idx(set_idx, hit_way);
    if (state == S_LOOKUP && hit) begin
      acc_en = 1'b1;
    end else if (refill_done) begin
      acc_en  = 1'b1;
      acc_idx = line_idx(set_idx, victim_q);
    end
  end

  decay_global_counter #(.GLOBAL_PERIOD(GLOBAL_PERIOD)) u_gcnt (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (decay_en),
    .tick  (tick)
  );

  decay_local_counters #(.NLINES(LINES), .LOCAL_MAX(LOCAL_MAX)) u_lcnt (
    .clk        (clk),
    .rst_n      (rst_n),
    .tick       (tick),
    .access_en  (acc_en),
    .access_idx (acc_idx),
    .alive      (valid),
    .decay      (decay)
  );

  assign decay_event = |(valid & decay);

  // ------------------------------------------------------------ control
  assign req_ready  = (state == S_IDLE);
  assign resp_rdata = rdata_q;

  always_comb begin
    mem_req_valid = (state == S_MEMWR) || (state == S_MISS_REQ);
    mem_req_we    = (state == S_MEMWR);
    mem_req_addr  = (state == S_MEMWR) ? {req_q.addr[31:2], 2'b00}
                                       : {req_q.addr[31:OFF_W], OFF_W'(0)};
    mem_req_wdata = req_q.wdata;
    mem_req_be    = req_q.be;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      req_q      <= '0;
      cnt        <= '0;
      missed_q   <= 1'b0;
      victim_q   <= '0;
      beat_q     <= '0;
      rdata_q    <= '0;
      resp_valid <= 1'b0;
      resp_hit   <= 1'b0;
      resp_s     <= '0;
      valid      <= '0;
      for (int unsigned s = 0; s < SETS; s++) rr_ptr[s] <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (cnt != '1) cnt <= cnt + 1'b1;
      valid <= valid & ~decay;

      unique case (state)
        S_IDLE: begin
          if (req_valid) begin
            req_q    <= '{we: req_we, addr: req_addr, be: req_be, wdata: req_wdata};
            cnt      <= CNT_W'(1);
            missed_q <= 1'b0;
            state    <= S_LOOKUP;
          end
        end

        S_LOOKUP: begin
          if (req_q.we) begin
            // store: update on hit, always write through
            if (!hit) missed_q <= 1'b1;
            rdata_q <= '0;
            resp_s  <= '0;
            state   <= S_MEMWR;
          end else if (hit) begin
            rdata_q <= d_rdata;
            resp_s  <= d_rs;
            state   <= S_HOLD;
          end else begin
            missed_q         <= 1'b1;
            victim_q         <= victim;
            rr_ptr[set_idx]  <= victim + 1'b1;
            // the victim block is overwritten: it is not present meanwhile
            valid[line_idx(set_idx, victim)] <= 1'b0;
            state            <= S_MISS_REQ;
          end
        end

        S_MEMWR: begin
          if (mem_req_ready) begin
            if (cnt >= CNT_W'(HIT_LATENCY - 1)) begin
              resp_valid <= 1'b1;
              resp_hit   <= !missed_q;
              state      <= S_IDLE;
            end else begin
              state <= S_HOLD;
            end
          end
        end

        S_MISS_REQ: begin
          if (mem_req_ready) begin
            beat_q <= '0;
            state  <= S_REFILL;
          end
        end

        S_REFILL: begin
          if (mem_rvalid) begin
            beat_q <= beat_q + 1'b1;
            if (refill_done) begin
              valid[line_idx(set_idx, victim_q)]   <= 1'b1;
              state <= S_LOOKUP;
            end
          end
        end

        S_HOLD: begin
          if (cnt >= CNT_W'(HIT_LATENCY - 1)) begin
            resp_valid <= 1'b1;
            resp_hit   <= !missed_q;
            state      <= S_IDLE;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // Tag storage is a plain memory without reset; it is only read together
  // with a valid bit.
  always_ff @(posedge clk)
    if (refill_done) tag_mem[line_idx(set_idx, victim_q)] <= tag;

  // Refill beats may only arrive while a refill is outstanding.
  a_rvalid_in_refill: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rvalid |-> state == S_REFILL);
  // A request to the next level stays asserted until it is accepted.
  a_mem_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_addr));

endmodule
