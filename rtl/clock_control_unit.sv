// clock_control_unit: enables for the program counter, decoder and ALU.
// Three states: RESET (held while rst is high, all enables low), RUN (all
// enables high) and HALT (entered after an HLT instruction, all enables low
// until the next reset). While running, pc_en drops in the same cycle as
// halt is decoded, so the program counter stops on the HLT word and nothing
// after it, the data area of the common memory, is fetched. The unit's
// insides are this design's own; the published block diagram gives only its
// outputs PC_en, IDU_en and ALU_en. Two assertions state the halt rules.
module clock_control_unit (
  input  logic clk,
  input  logic rst,
  input  logic halt,
  output logic pc_en,
  output logic idu_en,
  output logic alu_en,
  output logic halted
);
  typedef enum logic [1:0] {S_RESET = 2'd0, S_RUN = 2'd1, S_HALT = 2'd2} state_e;
  state_e state;

  always_ff @(posedge clk) begin
    if (rst) state <= S_RESET;
    else begin
      case (state)
        S_RESET: state <= S_RUN;
        S_RUN:   if (halt) state <= S_HALT;
        default: state <= S_HALT;
      endcase
    end
  end

  always_comb begin
    idu_en = (state == S_RUN);
    alu_en = (state == S_RUN);
    pc_en  = (state == S_RUN) && !halt;
    halted = (state == S_HALT);
  end

  // Once halted, nothing runs until reset; the PC never advances on HLT.
  a_halt_idle: assert property (@(posedge clk) disable iff (rst)
                                halted |-> !(pc_en || idu_en || alu_en));
  a_halt_stops_pc: assert property (@(posedge clk) disable iff (rst)
                                    halt |-> !pc_en);
endmodule
