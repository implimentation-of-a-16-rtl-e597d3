// unified_mem: the common instruction and data memory of the von Neumann
// processor. WORDS words of WIDTH bits. The read port is combinational so
// that an instruction is fetched, decoded and executed within one clock; the
// write port, used by the host to load the program, writes at the rising
// clock edge. Address bits above log2(WORDS) are ignored. The program ends
// with HLT; words after it may hold data. The size is this design's choice.
module unified_mem #(
  parameter int unsigned WORDS = 256,
  parameter int unsigned WIDTH = 16,
  parameter int unsigned AW    = 16,
  localparam int unsigned IW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[IW-1:0]] <= wdata;
  end

  assign rdata = mem[raddr[IW-1:0]];
endmodule
