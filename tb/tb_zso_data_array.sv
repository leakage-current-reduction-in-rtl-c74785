// tb_zso_data_array: writes words with many zero patterns into the ZSO data
// array, reads them back and checks both the word and its stored S vector.
// Writing an all-ones word and then a word with zero segments checks that
// stale contents of switched-off cells never reach the output.
module tb_zso_data_array;
  import zso_pkg::*;

  localparam int DEPTH = 4096;
  logic        clk = 0;
  logic        we;
  logic [11:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [2:0]  rs;
  logic [31:0] shadow [DEPTH];
  bit          written [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  zso_data_array u_dut (.clk, .we, .waddr, .wdata, .raddr, .rdata, .rs);

  function automatic logic [31:0] pattern();
    logic [31:0] r;
    r = $urandom();
    for (int k = 0; k < 4; k++) if ($urandom_range(2, 0) != 0) r[8*k +: 8] = 8'h00;
    return r;
  endfunction

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    we = 1; waddr = a; wdata = d;
    @(negedge clk);
    we = 0;
    shadow[a]  = d;
    written[a] = 1;
  endtask

  task automatic rd_check(input logic [11:0] a);
    logic [31:0] d;
    d = shadow[a];
    raddr = a;
    #1;
    checks += 2;
    if (rdata !== d) begin failures++; $display("addr %0d read %h exp %h", a, rdata, d); end
    if (rs !== {|d[31:16], |d[15:8], |d[7:0]}) begin
      failures++; $display("addr %0d s=%b data %h", a, rs, d);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // stale data must be masked
    wr(12'd7, 32'hffff_ffff); rd_check(12'd7);
    wr(12'd7, 32'h0000_0001); rd_check(12'd7);
    wr(12'd7, 32'h1200_0034); rd_check(12'd7);
    wr(12'd7, 32'h0000_0000); rd_check(12'd7);
    wr(12'd7, 32'h00ff_0000); rd_check(12'd7);
    for (int i = 0; i < 3000; i++) begin
      logic [11:0] a;
      a = 12'($urandom_range(DEPTH - 1, 0));
      if ($urandom_range(1, 0) == 1 || !written[a]) wr(a, pattern());
      else begin @(negedge clk); rd_check(a); end
    end
    for (int a = 0; a < DEPTH; a++) if (written[a]) begin @(negedge clk); rd_check(12'(a)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
