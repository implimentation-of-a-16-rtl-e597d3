// csa_row: a row of W full adders used as a 3:2 compressor on words. Three
// addends become a sum word and a carry word (shifted left by one) with
// a + b + c = s + cy modulo 2^W. Combinational.
module csa_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W-1:0] co;
  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(s[i]), .cout(co[i]));
  end
  // the carry out of the top bit leaves the word; the product fits in W bits
  assign cy = {co[W-2:0], 1'b0};
endmodule
