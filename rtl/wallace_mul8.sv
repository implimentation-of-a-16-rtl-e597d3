// wallace_mul8: modified Wallace tree multiplier, 8 x 8 bits to a 16-bit
// product, single cycle (combinational).
//
// The eight partial product rows pp[j] = (y[j] ? x : 0) << j are split in two
// parts as in the published diagram: Part 1 holds rows 0-3 and Part 2 rows
// 4-7.
//   Stage A: each part is reduced from four rows to two by a row of 4:2
//            compressors (two 3:2 full-adder rows).
//   Stage B: the four rows left are reduced to two by another 4:2 row.
//   Stage C: the last two rows are added by the 16-bit BEC carry select
//            adder, the same adder the ALU uses for SUM.
// The split into parts and stages follows the diagram; the compressor rows
// inside each stage are this design's reading of it.
module wallace_mul8 (
  input  logic [7:0]  x,
  input  logic [7:0]  y,
  output logic [15:0] p
);
  logic [15:0] pp [8];
  always_comb begin
    for (int j = 0; j < 8; j++) pp[j] = y[j] ? (16'(x) << j) : 16'd0;
  end

  // Stage A
  logic [15:0] a1_s, a1_c, a2_s, a2_c;
  compressor42_row #(.W(16)) u_part1 (.a(pp[0]), .b(pp[1]), .c(pp[2]), .d(pp[3]), .s(a1_s), .cy(a1_c));
  compressor42_row #(.W(16)) u_part2 (.a(pp[4]), .b(pp[5]), .c(pp[6]), .d(pp[7]), .s(a2_s), .cy(a2_c));

  // Stage B
  logic [15:0] b_s, b_c;
  compressor42_row #(.W(16)) u_stage_b (.a(a1_s), .b(a1_c), .c(a2_s), .d(a2_c), .s(b_s), .cy(b_c));

  // Stage C
  logic cout_unused;
  csla_bec16 u_stage_c (.a(b_s), .b(b_c), .cin(1'b0), .sum(p), .cout(cout_unused));
endmodule
