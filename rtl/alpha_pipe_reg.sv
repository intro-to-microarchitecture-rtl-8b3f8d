// alpha_pipe_reg: a pipe register between two pipeline stages.
//
// Holds the "current state" a stage reads while the preceding stage
// computes the "next state". On each rising clock edge it performs the
// operation chosen by the stall control logic:
//   PR_TRANSFER  current <= next    (normal operation)
//   PR_STALL     current unchanged
//   PR_BUBBLE    current <= 0       (all-zero payload is a NOP)
// The payload type T is a parameter so the same register serves all four
// pipe registers (IF/ID, ID/EX, EX/MEM, MEM/WB). Reset loads a bubble.
module alpha_pipe_reg
  import alpha_pkg::*;
#(
  parameter type T = logic [7:0]
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pr_op_e op,
  input  T       next_state,
  output T       cur_state
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cur_state <= '0;
    else begin
      unique case (op)
        PR_TRANSFER: cur_state <= next_state;
        PR_STALL:    cur_state <= cur_state;
        PR_BUBBLE:   cur_state <= '0;
        default:     cur_state <= '0;
      endcase
    end
  end
endmodule
