// tb_zso_write_encoder: checks the switch-off vector produced for full-ZSO
// and plain ZSO at the 32+24+16 resolution, and for the 32+8 and
// 32+24+16+8 resolutions, against OR reductions written out by hand.
module tb_zso_write_encoder;
  import zso_pkg::*;

  logic [31:0] w;
  logic [2:0]  s_full, s_plain;
  logic [1:0]  s_full8, s_plain8;
  logic [3:0]  s_bytes;
  int checks = 0, failures = 0;

  zso_write_encoder #(.RES(32'h0001_0101), .FULL_ZSO(1'b1)) u_full  (.w(w), .s(s_full));
  zso_write_encoder #(.RES(32'h0001_0101), .FULL_ZSO(1'b0)) u_plain (.w(w), .s(s_plain));
  zso_write_encoder #(.RES(32'h0100_0001), .FULL_ZSO(1'b1)) u_f8    (.w(w), .s(s_full8));
  zso_write_encoder #(.RES(32'h0100_0001), .FULL_ZSO(1'b0)) u_p8    (.w(w), .s(s_plain8));
  zso_write_encoder #(.RES(32'h0101_0101), .FULL_ZSO(1'b0)) u_b     (.w(w), .s(s_bytes));

  task automatic check(input logic [31:0] v);
    logic [2:0] ef, ep;
    logic [1:0] ef8, ep8;
    logic [3:0] eb;
    w = v;
    #1;
    ef  = {|v[31:16], |v[15:8], |v[7:0]};
    ep  = {|v[31:16], |v[31:8], |v[31:0]};
    ef8 = {|v[31:24], |v[23:0]};
    ep8 = {|v[31:24], |v[31:0]};
    eb  = {|v[31:24], |v[31:16], |v[31:8], |v[31:0]};
    checks += 5;
    if (s_full  !== ef)  begin failures++; $display("full  w=%h s=%b exp=%b", v, s_full, ef);  end
    if (s_plain !== ep)  begin failures++; $display("plain w=%h s=%b exp=%b", v, s_plain, ep); end
    if (s_full8 !== ef8) begin failures++; $display("f8    w=%h s=%b exp=%b", v, s_full8, ef8); end
    if (s_plain8!== ep8) begin failures++; $display("p8    w=%h s=%b exp=%b", v, s_plain8, ep8); end
    if (s_bytes !== eb)  begin failures++; $display("bytes w=%h s=%b exp=%b", v, s_bytes, eb); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: zero, small ints, inner zeros, single bits in every position
    check(32'h0000_0000);
    check(32'h0000_0001);
    check(32'h0000_00ff);
    check(32'h0000_0100);
    check(32'h0000_ffff);
    check(32'h0001_0000);
    check(32'h1200_0034);
    check(32'hff00_0000);
    check(32'h0000_ff00);
    check(32'hffff_ffff);
    // bytes 3 and 2 zero -> S = 0011 in the byte resolution
    check(32'h0000_1234);
    if (s_bytes !== 4'b0011) failures++;
    checks++;
    for (int b = 0; b < 32; b++) check(32'h1 << b);
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] r;
      r = $urandom();
      // zero some bytes at random to reach every S pattern
      for (int k = 0; k < 4; k++) if ($urandom_range(1, 0) == 1) r[8*k +: 8] = 8'h00;
      check(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
