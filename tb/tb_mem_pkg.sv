// tb_mem_pkg: initial memory contents shared by the next-level memory model
// and the testbenches' reference model.
//
// Words are drawn from a hash of the address so that any word can be
// recomputed without storing it. The mix imitates the value locality of
// embedded data: many all-zero words, many small positive integers (only
// the low byte or the low half set), some words with inner zero bytes and
// some full-width values.
package tb_mem_pkg;

  function automatic logic [31:0] hash32(input logic [31:0] a);
    logic [31:0] x;
    x = a ^ 32'h9e37_79b9;
    x = x ^ (x >> 16);
    x = x * 32'h7feb_352d;
    x = x ^ (x >> 15);
    x = x * 32'h846c_a68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  function automatic logic [31:0] init_word(input logic [31:0] word_addr);
    logic [31:0] h, v;
    h = hash32(word_addr);
    v = hash32(word_addr + 32'h1234_5678);
    unique case (h[3:0])
      4'd0, 4'd1, 4'd2, 4'd3, 4'd4, 4'd5: return 32'h0;                  // zero
      4'd6, 4'd7, 4'd8:                   return {24'h0, v[7:0]};         // small int
      4'd9, 4'd10:                        return {16'h0, v[15:0]};        // 16-bit int
      4'd11:                              return {8'h0, v[23:0]};         // 24-bit int
      4'd12:                              return {v[31:24], 16'h0, v[7:0]}; // inner zeros
      4'd13:                              return {v[31:16], 16'h0};       // low half zero
      default:                            return v;                      // full width
    endcase
  endfunction

endpackage
