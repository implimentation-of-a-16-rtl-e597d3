// compressor42_row: a row of 4:2 compressors on W-bit words, made from two
// 3:2 compressor rows. Four addends become a sum word and a carry word with
// a + b + c + d = s + cy modulo 2^W. Combinational.
module compressor42_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W-1:0] s1, c1;
  csa_row #(.W(W)) u_r1 (.a(a),  .b(b),  .c(c), .s(s1), .cy(c1));
  csa_row #(.W(W)) u_r2 (.a(s1), .b(c1), .c(d), .s(s),  .cy(cy));
endmodule
