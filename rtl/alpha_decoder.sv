// alpha_decoder: control logic of the Alpha subset.
//
// Combinational. Turns a 32-bit instruction word into the control word
// ctrl_t: ALU operation, ALU input selects, register read/write use,
// destination register, memory and control-transfer flags and the extended
// immediate. The datapath roles follow the per-instruction descriptions:
//   operate (addq subq bis xor cmplt): A = Ra, B = Rb or 8-bit literal,
//       write Rc with the ALU output
//   cmoveq: B = Rb passed through, Rc written only when Ra == 0
//   mulq:   as operate, result comes from the multiplier
//   ldq / stq: ALU adds A = sign-extended offset and B = Rb; ldq writes Ra
//       with memory data, stq stores Ra
//   beq / bne / br / bsr: ALU adds A = sign-extended disp*4 and B = PC+4;
//       bsr/br write PC+4 to Ra
//   jmp / jsr / ret: ALU passes B = Rb as the target; PC+4 written to Ra
//   call_pal with all-zero fields: halt
// Hint bits of jumps are ignored (they do not affect function). Opcodes or
// function codes outside the subset decode to an all-zero control word,
// which behaves as a NOP; that treatment is this design's choice.
module alpha_decoder
  import alpha_pkg::*;
(
  input  inst_t ir,
  output ctrl_t ctrl
);
  logic [5:0] op;
  logic [6:0] funct;
  logic       lit_flag;
  reg_t       ra, rc;
  logic       known;

  assign op       = ir[31:26];
  assign ra       = ir[25:21];
  assign rc       = ir[4:0];
  assign funct    = ir[11:5];
  assign lit_flag = ir[12];

  always_comb begin
    ctrl  = '0;
    known = 1'b1;
    unique case (op)
      OP_INTA, OP_INTL, OP_INTM: begin
        ctrl.reads_a   = 1'b1;
        ctrl.reads_b   = !lit_flag;
        ctrl.b_sel     = lit_flag ? BSEL_IMM : BSEL_REG;
        ctrl.imm       = {{(XLEN-8){1'b0}}, ir[20:13]};
        ctrl.reg_write = 1'b1;
        ctrl.wdst      = rc;
        ctrl.wb_sel    = WB_ALU;
        if (op == OP_INTA && funct == FN_ADDQ)        ctrl.alu_op = ALU_ADD;
        else if (op == OP_INTA && funct == FN_SUBQ)   ctrl.alu_op = ALU_SUB;
        else if (op == OP_INTL && funct == FN_BIS)    ctrl.alu_op = ALU_OR;
        else if (op == OP_INTL && funct == FN_XOR)    ctrl.alu_op = ALU_XOR;
        else if (op == OP_INTL && funct == FN_CMPLT)  ctrl.alu_op = ALU_CMPLT;
        else if (op == OP_INTL && funct == FN_CMOVEQ) begin
          ctrl.alu_op = ALU_PASSB;
          ctrl.cmov   = 1'b1;
        end else if (op == OP_INTM && funct == FN_MULQ) ctrl.mul = 1'b1;
        else known = 1'b0;
        if (!known) ctrl = '0;
      end
      OP_LDQ: begin
        ctrl.alu_op    = ALU_ADD;
        ctrl.a_sel     = ASEL_IMM;
        ctrl.b_sel     = BSEL_REG;
        ctrl.imm       = {{(XLEN-16){ir[15]}}, ir[15:0]};
        ctrl.reads_b   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.wdst      = ra;
        ctrl.wb_sel    = WB_MEM;
        ctrl.mem_read  = 1'b1;
      end
      OP_STQ: begin
        ctrl.alu_op    = ALU_ADD;
        ctrl.a_sel     = ASEL_IMM;
        ctrl.b_sel     = BSEL_REG;
        ctrl.imm       = {{(XLEN-16){ir[15]}}, ir[15:0]};
        ctrl.reads_a   = 1'b1;
        ctrl.reads_b   = 1'b1;
        ctrl.mem_write = 1'b1;
      end
      OP_BEQ, OP_BNE: begin
        ctrl.alu_op  = ALU_ADD;
        ctrl.a_sel   = ASEL_IMM;
        ctrl.b_sel   = BSEL_INCR;
        ctrl.imm     = {{(XLEN-23){ir[20]}}, ir[20:0], 2'b00};
        ctrl.reads_a = 1'b1;
        ctrl.cbranch = 1'b1;
        ctrl.br_ne   = (op == OP_BNE);
      end
      OP_BR, OP_BSR: begin
        ctrl.alu_op    = ALU_ADD;
        ctrl.a_sel     = ASEL_IMM;
        ctrl.b_sel     = BSEL_INCR;
        ctrl.imm       = {{(XLEN-23){ir[20]}}, ir[20:0], 2'b00};
        ctrl.ubranch   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.wdst      = ra;
        ctrl.wb_sel    = WB_INCR;
      end
      OP_JMP: begin
        ctrl.alu_op    = ALU_PASSB;
        ctrl.b_sel     = BSEL_REG;
        ctrl.reads_b   = 1'b1;
        ctrl.jump      = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.wdst      = ra;
        ctrl.wb_sel    = WB_INCR;
      end
      OP_PAL: begin
        ctrl.halt = (ir[25:0] == '0);
      end
      default: ctrl = '0;
    endcase
    // Writes to r31 are discarded
    if (ctrl.wdst == REG_ZERO) ctrl.reg_write = 1'b0;
  end
endmodule
