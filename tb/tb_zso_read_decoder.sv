// tb_zso_read_decoder: checks that switched-off segments read as zero and
// powered segments pass the cell contents, for every S value of the
// 32+24+16 resolution and for the 32+24+16+8 byte resolution.
module tb_zso_read_decoder;
  import zso_pkg::*;

  logic [31:0] cells, w3, w4;
  logic [2:0]  s3;
  logic [3:0]  s4;
  int checks = 0, failures = 0;

  zso_read_decoder #(.RES(32'h0001_0101)) u3 (.cells(cells), .s(s3), .w(w3));
  zso_read_decoder #(.RES(32'h0101_0101)) u4 (.cells(cells), .s(s4), .w(w4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] e3, e4;
      cells = $urandom();
      s3    = 3'(i % 8);
      s4    = 4'($urandom_range(15, 0));
      #1;
      e3 = {s3[2] ? cells[31:16] : 16'h0, s3[1] ? cells[15:8] : 8'h0, s3[0] ? cells[7:0] : 8'h0};
      e4 = {s4[3] ? cells[31:24] : 8'h0, s4[2] ? cells[23:16] : 8'h0,
            s4[1] ? cells[15:8]  : 8'h0, s4[0] ? cells[7:0]   : 8'h0};
      checks += 2;
      if (w3 !== e3) begin failures++; $display("s=%b cells=%h w=%h exp=%h", s3, cells, w3, e3); end
      if (w4 !== e4) begin failures++; $display("s=%b cells=%h w=%h exp=%h", s4, cells, w4, e4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
