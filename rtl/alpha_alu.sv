// alpha_alu: the integer ALU of the Alpha subset.
//
// Purely combinational. Computes y = a <op> b for the operate instructions
// addq, subq, bis (OR), xor and cmplt (signed compare, result 1 or 0), and
// a pass-B operation that jumps use to select their target (Rb). Loads,
// stores and branches use ALU_ADD to form addresses and branch targets.
// The operation set follows the subset's instruction table; the 3-bit
// operation encoding is this design's choice.
module alpha_alu
  import alpha_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_CMPLT: y = {{(XLEN-1){1'b0}}, $signed(a) < $signed(b)};
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
