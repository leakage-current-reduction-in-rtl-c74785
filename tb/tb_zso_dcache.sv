// tb_zso_dcache: end-to-end test of the ZSO data cache at its default size
// (16KB, 4 ways, 64-byte lines, 3-cycle hits, full-ZSO 32+24+16, decay
// 8192 x 4) against the next-level memory model.
//
// Every load is compared with a reference memory kept by the testbench, and
// the switch-off vector of every loaded word with OR reductions of the
// expected data. Hit latency must be exactly 3 cycles. The test then makes
// each mechanism happen and counts it: load hit, load miss with refill,
// store hit, store miss (write-through without allocation), partial-word
// store, replacement of a valid block, every one of the 8 switch-off
// patterns, a block switched off by decay and the miss that follows, a
// block kept alive by regular accesses, and decay turned off at run time.
// A mechanism that never happened counts as a failure. The decay test also
// checks when the idle block is switched off: between 3 and 4 global periods
// (3 x 8192 .. 4 x 8192 cycles) after its last access.
module tb_zso_dcache;
  import tb_mem_pkg::*;

  logic        clk = 0, rst_n = 0, decay_en = 0;
  logic        req_valid = 0, req_ready, req_we = 0;
  logic [31:0] req_addr = 0, req_wdata = 0;
  logic [3:0]  req_be = 0;
  logic        resp_valid, resp_hit;
  logic [31:0] resp_rdata;
  logic [2:0]  resp_s;
  logic        mem_req_valid, mem_req_ready, mem_req_we;
  logic [31:0] mem_req_addr, mem_req_wdata;
  logic [3:0]  mem_req_be;
  logic        mem_rvalid;
  logic [31:0] mem_rdata;
  logic        decay_event;

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  zso_dcache dut (
    .clk, .rst_n, .decay_en,
    .req_valid, .req_ready, .req_we, .req_addr, .req_be, .req_wdata,
    .resp_valid, .resp_rdata, .resp_hit, .resp_s,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata, .mem_req_be,
    .mem_rvalid, .mem_rdata, .decay_event
  );

  l2_mem_model #(.LATENCY(18), .LINE_WORDS(16)) u_mem (
    .clk, .rst_n,
    .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req_we (mem_req_we),
    .req_addr (mem_req_addr), .req_wdata (mem_req_wdata), .req_be (mem_req_be),
    .rvalid (mem_rvalid), .rdata (mem_rdata)
  );

  // ------------------------------------------------------------ reference
  logic [31:0] ref_mem [int unsigned];
  function automatic logic [31:0] ref_rd(input logic [31:0] addr);
    if (ref_mem.exists(addr >> 2)) return ref_mem[addr >> 2];
    return init_word(addr >> 2);
  endfunction

  // ------------------------------------------------------------ counters
  int n_load_hit = 0, n_load_miss = 0, n_store_hit = 0, n_store_miss = 0;
  int n_partial = 0, n_evict = 0, n_decay = 0, n_decay_miss = 0, n_alive = 0, n_mode = 0;
  int s_seen [8];

  longint first_decay = -1;
  always @(posedge clk) if (rst_n && decay_event) begin
    n_decay++;
    if (first_decay < 0) first_decay = cyc;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  // One request; returns the data, hit flag and latency in cycles.
  task automatic access(input bit we, input logic [31:0] addr, input logic [3:0] be,
                        input logic [31:0] wdata, output logic [31:0] rdata,
                        output bit hit, output int lat);
    longint t_acc;
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = addr; req_be = be; req_wdata = wdata;
    while (!req_ready) @(negedge clk);
    t_acc = cyc + 1;
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    lat   = int'(cyc + 1 - t_acc);
    rdata = resp_rdata;
    hit   = resp_hit;
    if (!we) begin
      logic [31:0] exp;
      exp = ref_rd(addr);
      check(rdata == exp, $sformatf("load %h got %h exp %h", addr, rdata, exp));
      check(resp_s == {|exp[31:16], |exp[15:8], |exp[7:0]},
            $sformatf("load %h S=%b data %h", addr, resp_s, exp));
      s_seen[resp_s]++;
      if (hit) begin
        n_load_hit++;
        check(lat == 3, $sformatf("load hit latency %0d", lat));
      end else begin
        n_load_miss++;
        check(lat >= 3 + 18 + 16, $sformatf("load miss latency %0d", lat));
      end
    end else begin
      logic [31:0] w;
      w = ref_rd(addr);
      for (int b = 0; b < 4; b++) if (be[b]) w[8*b +: 8] = wdata[8*b +: 8];
      ref_mem[addr >> 2] = w;
      if (be != 4'hf) n_partial++;
      if (hit) n_store_hit++; else n_store_miss++;
      check(lat >= 3, $sformatf("store latency %0d", lat));
    end
  endtask

  task automatic load(input logic [31:0] addr, output bit hit);
    logic [31:0] d; int lat;
    access(0, addr, 4'h0, 32'h0, d, hit, lat);
  endtask

  task automatic store(input logic [31:0] addr, input logic [3:0] be, input logic [31:0] v, output bit hit);
    logic [31:0] d; int lat;
    access(1, addr, be, v, d, hit, lat);
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  localparam int WATCHDOG = 2_000_000;
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit h;
    longint t_a;
    for (int i = 0; i < 8; i++) s_seen[i] = 0;
    idle(3);
    rst_n = 1;
    idle(2);

    // --- miss, then hits on the same line
    load(32'h0000_1000, h); check(!h, "cold load should miss");
    load(32'h0000_1004, h); check(h, "same line should hit");
    load(32'h0000_103c, h); check(h, "same line should hit");

    // --- store hit (full and partial), store miss (not allocated)
    store(32'h0000_1008, 4'hf, 32'h0000_1200, h); check(h, "store hit");
    load(32'h0000_1008, h); check(h, "load after store hit");
    store(32'h0000_100c, 4'hf, 32'h1234_5600, h);
    load(32'h0000_100c, h);
    store(32'h0000_1010, 4'b0010, 32'h0000_ab00, h);
    load(32'h0000_1010, h);
    store(32'h0000_2000, 4'hf, 32'hdead_beef, h); check(!h, "store to absent line misses");
    load(32'h0000_2000, h); check(!h, "store miss must not allocate");
    load(32'h0000_2000, h); check(h, "line present after load miss");

    // --- every S pattern through stores
    for (int p = 0; p < 8; p++) begin
      logic [31:0] v;
      v = {p[2] ? 16'h5a00 : 16'h0, p[1] ? 8'h3c : 8'h0, p[0] ? 8'h81 : 8'h0};
      store(32'h0000_1020 + 4 * p, 4'hf, v, h);
      load(32'h0000_1020 + 4 * p, h);
    end

    // --- replacement: 5 lines in one set (set stride 64 sets x 64 B = 4KB)
    for (int k = 0; k < 5; k++) load(32'h0001_0040 + 32'h1000 * k, h);
    load(32'h0001_0040, h);
    check(!h, "first of five lines in a 4-way set should have been replaced");
    if (!h) n_evict++;

    // --- random traffic in a 32KB window, decay off
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] a;
      a = {17'h0, 13'($urandom_range(8191, 0)), 2'b00};
      if ($urandom_range(9, 0) < 3) begin
        logic [3:0] be;
        be = ($urandom_range(1, 0) == 1) ? 4'hf : 4'($urandom_range(15, 1));
        store(a, be, ($urandom_range(1, 0) == 1) ? 32'($urandom_range(255, 0)) : $urandom(), h);
      end else load(a, h);
    end

    // --- cache decay
    decay_en = 1; n_mode++;
    load(32'h0004_0000, h);            // block A: left alone
    t_a = cyc;
    load(32'h0004_1040, h);            // block B: touched regularly
    for (int t = 0; t < 8; t++) begin
      idle(6000);
      load(32'h0004_1040, h);
      check(h, "regularly accessed block must stay on");
      if (h) n_alive++;
    end
    check(n_decay > 0, "no block was switched off by decay");
    check(first_decay - t_a >= 3 * 8192 && first_decay - t_a <= 4 * 8192 + 4,
          $sformatf("block decayed %0d cycles after its last access", first_decay - t_a));
    load(32'h0004_0000, h);
    check(!h, "decayed block must miss");
    if (!h) n_decay_miss++;

    // --- decay switched off at run time: nothing decays any more
    decay_en = 0; n_mode++;
    load(32'h0004_2080, h);
    begin
      int n_before;
      n_before = n_decay;
      idle(40000);
      check(n_decay == n_before, "decay while disabled");
    end
    load(32'h0004_2080, h);
    check(h, "block must survive with decay off");

    // --- mechanism coverage
    check(n_load_hit > 0,   "no load hit");
    check(n_load_miss > 0,  "no load miss");
    check(n_store_hit > 0,  "no store hit");
    check(n_store_miss > 0, "no store miss");
    check(n_partial > 0,    "no partial store");
    check(n_evict > 0,      "no replacement");
    check(n_decay > 0,      "no decay");
    check(n_decay_miss > 0, "no miss after decay");
    check(n_alive > 0,      "no kept-alive block");
    check(n_mode == 2,      "mode switch");
    for (int p = 0; p < 8; p++) check(s_seen[p] > 0, $sformatf("S pattern %b never loaded", 3'(p)));
    $display("load hit %0d, load miss %0d, store hit %0d, store miss %0d, partial %0d, evict %0d",
             n_load_hit, n_load_miss, n_store_hit, n_store_miss, n_partial, n_evict);
    $display("decayed blocks %0d, misses after decay %0d, kept alive %0d, mode switches %0d",
             n_decay, n_decay_miss, n_alive, n_mode);
    for (int p = 0; p < 8; p++) $display("S=%b loaded %0d times", 3'(p), s_seen[p]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
