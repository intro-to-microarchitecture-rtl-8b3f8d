// alpha_pkg: types and constants shared by the Alpha-subset processors.
//
// The subset has four instruction formats, all 32 bits wide:
//   operate  : op[31:26] ra[25:21] rb[20:16] 000[15:13] 0[12] funct[11:5] rc[4:0]
//              op[31:26] ra[25:21] lit[20:13]           1[12] funct[11:5] rc[4:0]
//   memory   : op[31:26] ra[25:21] rb[20:16] offset[15:0]   (signed byte offset)
//   branch   : op[31:26] ra[25:21] disp[20:0]               (signed word displacement)
//   jump     : op[31:26]=0x1A ra[25:21] rb[20:16] hint[15:0] (hint[15:14] = jump type)
// Opcode and function values are those of the Alpha encoding tables. The
// multiply (mulq) encoding and the use of the all-zero word as a halting
// call_pal are this design's choice; everything else follows the subset.
//
// The control word produced by the decoder and the four pipe-register
// payloads are declared here. Every payload carries a valid bit, so an
// all-zero payload is a bubble that does nothing in any stage.
package alpha_pkg;

  localparam int unsigned XLEN = 64;       // integer register / data width
  localparam int unsigned ILEN = 32;       // instruction width
  localparam int unsigned NREGS = 32;      // integer registers
  localparam logic [4:0] REG_ZERO = 5'd31; // r31 always reads as zero

  typedef logic [XLEN-1:0] word_t;
  typedef logic [ILEN-1:0] inst_t;
  typedef logic [4:0]      reg_t;

  // Major opcodes
  localparam logic [5:0] OP_PAL   = 6'h00;  // call_pal (only halt is used)
  localparam logic [5:0] OP_INTA  = 6'h10;  // addq, subq
  localparam logic [5:0] OP_INTL  = 6'h11;  // bis, xor, cmoveq, cmplt
  localparam logic [5:0] OP_INTM  = 6'h13;  // mulq
  localparam logic [5:0] OP_JMP   = 6'h1A;  // jmp, jsr, ret
  localparam logic [5:0] OP_LDQ   = 6'h29;
  localparam logic [5:0] OP_STQ   = 6'h2D;
  localparam logic [5:0] OP_BR    = 6'h30;
  localparam logic [5:0] OP_BSR   = 6'h34;
  localparam logic [5:0] OP_BEQ   = 6'h39;
  localparam logic [5:0] OP_BNE   = 6'h3D;

  // Function codes
  localparam logic [6:0] FN_ADDQ   = 7'h20;  // with OP_INTA
  localparam logic [6:0] FN_SUBQ   = 7'h29;  // with OP_INTA
  localparam logic [6:0] FN_BIS    = 7'h20;  // with OP_INTL
  localparam logic [6:0] FN_XOR    = 7'h40;  // with OP_INTL
  localparam logic [6:0] FN_CMOVEQ = 7'h24;  // with OP_INTL
  localparam logic [6:0] FN_CMPLT  = 7'h4D;  // with OP_INTL
  localparam logic [6:0] FN_MULQ   = 7'h20;  // with OP_INTM

  typedef enum logic [2:0] {
    ALU_ADD   = 3'd0,
    ALU_SUB   = 3'd1,
    ALU_OR    = 3'd2,
    ALU_XOR   = 3'd3,
    ALU_CMPLT = 3'd4,
    ALU_PASSB = 3'd5
  } alu_op_e;

  // ALU input A: register Ra or the extended immediate (offset / disp*4)
  typedef enum logic [0:0] {ASEL_REG = 1'b0, ASEL_IMM = 1'b1} asel_e;
  // ALU input B: register Rb, the 8-bit literal, or the incremented PC
  typedef enum logic [1:0] {BSEL_REG = 2'd0, BSEL_IMM = 2'd1, BSEL_INCR = 2'd2} bsel_e;
  // Register write data: ALU output, memory data or incremented PC (link)
  typedef enum logic [1:0] {WB_ALU = 2'd0, WB_MEM = 2'd1, WB_INCR = 2'd2} wbsel_e;

  // Pipe-register operation (Transfer / Stall / Bubble)
  typedef enum logic [1:0] {PR_TRANSFER = 2'd0, PR_STALL = 2'd1, PR_BUBBLE = 2'd2} pr_op_e;

  // Bypass source for an EX operand
  typedef enum logic [1:0] {FWD_NONE = 2'd0, FWD_EXEX = 2'd1, FWD_MEMEX = 2'd2} fwd_e;

  typedef struct packed {
    alu_op_e alu_op;
    asel_e   a_sel;
    bsel_e   b_sel;
    wbsel_e  wb_sel;
    logic    reads_a;      // instruction reads register Ra
    logic    reads_b;      // instruction reads register Rb
    logic    reg_write;    // writes a register (before cmov condition / r31)
    reg_t    wdst;         // destination register
    logic    mem_read;     // ldq
    logic    mem_write;    // stq
    logic    cbranch;      // beq / bne
    logic    br_ne;        // condition is Ra != 0 (bne)
    logic    ubranch;      // br / bsr
    logic    jump;         // jmp / jsr / ret
    logic    cmov;         // cmoveq
    logic    mul;          // mulq
    logic    halt;         // call_pal halt
    word_t   imm;          // literal, sign-extended offset or disp*4
  } ctrl_t;

  // IF -> ID
  typedef struct packed {
    logic  valid;
    word_t pc;
    word_t incr_pc;
    inst_t ir;
  } if_id_t;

  // ID -> EX
  typedef struct packed {
    logic  valid;
    ctrl_t ctrl;
    word_t pc;
    word_t incr_pc;
    reg_t  asrc;           // register number of Ra
    reg_t  bsrc;           // register number of Rb
    word_t aval;           // value read for Ra
    word_t bval;           // value read for Rb
  } id_ex_t;

  // EX -> MEM
  typedef struct packed {
    logic  valid;
    ctrl_t ctrl;
    word_t pc;
    reg_t  asrc;           // store data register (for MEM-MEM bypass)
    logic  wen;            // final register write enable
    word_t result;         // ALU result, memory address or link value
    word_t sdata;          // store data
    word_t target;         // branch / jump target
    logic  taken;          // control transfer redirects the PC
  } ex_mem_t;

  // MEM -> WB
  typedef struct packed {
    logic  valid;
    logic  halt;
    logic  load;
    logic  wen;
    reg_t  wdst;
    word_t result;
  } mem_wb_t;

endpackage
