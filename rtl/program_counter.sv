// program_counter: 16-bit program counter. It holds the address of the next
// instruction in the common memory, goes to 0 on reset (synchronous, active
// high) and advances by one at each clock edge while pc_en is high. The
// increment is done by a 16-bit Binary to Excess-1 Converter, the XOR/AND
// chain also used in the carry select adder, rather than by a full adder.
// The instruction set has no jumps, so the counter only resets and counts.
module program_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             pc_en,
  output logic [WIDTH-1:0] pc
);
  logic [WIDTH-1:0] pc_next;
  bec #(.N(WIDTH)) u_inc (.b(pc), .x(pc_next));

  always_ff @(posedge clk) begin
    if (rst)        pc <= '0;
    else if (pc_en) pc <= pc_next;
  end
endmodule
