// register_file: eight general purpose registers of 16 bits, addressed by
// 3-bit numbers 000 to 111 as source or destination. Two combinational read
// ports deliver the source and destination operands to the ALU in the same
// cycle; a third read port lets the host read results back. The write port
// (we = WRENA) stores at the rising clock edge. A synchronous, active-high
// reset clears every register (this design's choice).
module register_file #(
  parameter int unsigned NREGS = 8,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr_s,
  output logic [WIDTH-1:0] rdata_s,
  input  logic [AW-1:0]    raddr_d,
  output logic [WIDTH-1:0] rdata_d,
  input  logic [AW-1:0]    raddr_x,
  output logic [WIDTH-1:0] rdata_x
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata_s = regs[raddr_s];
  assign rdata_d = regs[raddr_d];
  assign rdata_x = regs[raddr_x];
endmodule
