// cache_traffic: testbench helper that runs one zso_dcache configuration
// under a synthetic load/store stream and measures how much of its data
// array is switched off.
//
// The stream has locality: 80% of accesses fall in a 6KB hot region, the
// rest anywhere in a 256KB region, with 30% stores and random idle gaps
// (0..63 cycles) between requests, so that idle blocks can decay. Every
// load is checked against a reference memory. Every 1024 cycles the number
// of powered data cells is sampled: valid blocks count the cells their
// words' S vectors keep on; invalid blocks count as fully powered when decay
// is off (a plain cache keeps them supplied) and as off when decay is on.
module cache_traffic
  import tb_mem_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 16384,
  parameter bit          DECAY       = 1'b1,
  parameter int          NOPS        = 6000
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   done,
  output real    off_frac,
  output int     misses,
  output int     decays,
  output int     checks,
  output int     failures
);
  localparam int LINES = CACHE_BYTES / 64;

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

  zso_dcache #(.CACHE_BYTES(CACHE_BYTES)) dut (
    .clk, .rst_n, .decay_en(DECAY),
    .req_valid, .req_ready, .req_we, .req_addr, .req_be, .req_wdata,
    .resp_valid, .resp_rdata, .resp_hit, .resp_s,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata, .mem_req_be,
    .mem_rvalid, .mem_rdata, .decay_event
  );

  l2_mem_model u_mem (
    .clk, .rst_n,
    .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req_we (mem_req_we),
    .req_addr (mem_req_addr), .req_wdata (mem_req_wdata), .req_be (mem_req_be),
    .rvalid (mem_rvalid), .rdata (mem_rdata)
  );

  logic [31:0] ref_mem [int unsigned];
  function automatic logic [31:0] ref_rd(input logic [31:0] addr);
    if (ref_mem.exists(addr >> 2)) return ref_mem[addr >> 2];
    return init_word(addr >> 2);
  endfunction

  real sum_off = 0.0;
  int  nsamples = 0;
  always @(posedge clk) begin
    if (rst_n && decay_event) decays <= decays + 1;
  end

  initial begin
    forever begin
      repeat (1024) @(posedge clk);
      if (rst_n && !done) begin
        longint on_bits;
        on_bits = 0;
        for (int l = 0; l < LINES; l++) begin
          if (dut.valid[l]) begin
            for (int w = 0; w < 16; w++) begin
              logic [2:0] s;
              s = dut.u_data.smem[l * 16 + w];
              on_bits += 16 * s[2] + 8 * s[1] + 8 * s[0];
            end
          end else if (!DECAY) begin
            on_bits += 16 * 32;
          end
        end
        sum_off += 1.0 - real'(on_bits) / real'(LINES * 16 * 32);
        nsamples++;
      end
    end
  end

  initial begin
    done = 0; misses = 0; decays = 0; checks = 0; failures = 0; off_frac = 0.0;
    wait (rst_n);
    for (int i = 0; i < NOPS; i++) begin
      logic [31:0] a;
      bit          st;
      a = ($urandom_range(9, 0) < 8) ? 32'h0010_0000 + 32'($urandom_range(1535, 0)) * 4
                                     : 32'($urandom_range(65535, 0)) * 4;
      st = $urandom_range(9, 0) < 3;
      repeat ($urandom_range(63, 0)) @(negedge clk);
      @(negedge clk);
      req_valid = 1; req_we = st; req_addr = a; req_be = 4'hf;
      req_wdata = ($urandom_range(1, 0) == 1) ? 32'($urandom_range(255, 0)) : 32'h0;
      while (!req_ready) @(negedge clk);
      @(negedge clk);
      req_valid = 0;
      while (!resp_valid) @(negedge clk);
      if (!resp_hit) misses++;
      if (st) ref_mem[a >> 2] = req_wdata;
      else begin
        checks++;
        if (resp_rdata !== ref_rd(a)) failures++;
      end
    end
    off_frac = (nsamples > 0) ? sum_off / real'(nsamples) : 0.0;
    done = 1;
  end
endmodule
