// l2_mem_model: behavioural model of the next memory level (L2 cache and
// main memory) behind the L1 data cache; not synthesizable, testbench only.
//
// Read requests carry a line address; after LATENCY cycles the model returns
// LINE_WORDS words, one per cycle, lowest address first, on rvalid/rdata.
// Write requests carry a word address, data and byte enables and are
// accepted in one cycle. req_ready is low while a read is being served.
// Contents start as tb_mem_pkg::init_word and are updated by writes.
module l2_mem_model
  import tb_mem_pkg::*;
#(
  parameter int unsigned LATENCY    = 18,
  parameter int unsigned LINE_WORDS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_we,
  input  logic [31:0] req_addr,
  input  logic [31:0] req_wdata,
  input  logic [3:0]  req_be,
  output logic        rvalid,
  output logic [31:0] rdata
);

  logic [31:0] mem [int unsigned];
  int unsigned reads = 0, writes = 0;

  function automatic logic [31:0] rd(input logic [31:0] word_addr);
    if (mem.exists(word_addr)) return mem[word_addr];
    return init_word(word_addr);
  endfunction

  logic busy;
  assign req_ready = rst_n && !busy;

  initial begin
    busy   = 1'b0;
    rvalid = 1'b0;
    rdata  = '0;
    forever begin
      @(posedge clk);
      if (req_valid && req_ready) begin
        if (req_we) begin
          logic [31:0] w;
          w = rd(req_addr >> 2);
          for (int b = 0; b < 4; b++) if (req_be[b]) w[8*b +: 8] = req_wdata[8*b +: 8];
          mem[req_addr >> 2] = w;
          writes++;
        end else begin
          logic [31:0] base;
          base = req_addr >> 2;
          reads++;
          busy <= 1'b1;
          repeat (LATENCY - 1) @(posedge clk);
          for (int i = 0; i < LINE_WORDS; i++) begin
            rvalid <= 1'b1;
            rdata  <= rd(base + i);
            @(posedge clk);
          end
          rvalid <= 1'b0;
          busy   <= 1'b0;
        end
      end
    end
  end

endmodule
