// alpha_pipeline: five-stage pipelined processor for the Alpha subset.
//
// Stages IF, ID, EX, MEM, WB are separated by four pipe registers (IF/ID,
// ID/EX, EX/MEM, MEM/WB) whose Transfer / Stall / Bubble operation is set
// each cycle by the stall control unit (alpha_hazard_unit).
//   IF  : fetches IMemory[PC] and computes PC+4.
//   ID  : decodes, reads Ra and Rb from the register array. Write-back is
//         merged into this stage: the register array is written by the
//         instruction in WB and a same-cycle read returns the new value.
//   EX  : forwarding muxes (EX-EX from MEM, MEM-EX from WB) feed the ALU and
//         the zero test; addresses and branch targets are formed by the ALU;
//         mulq runs in the multi-cycle multiplier while the pipe stalls.
//   MEM : data memory access (store data may be bypassed MEM-MEM from a load
//         in WB); a taken branch here redirects the PC and cancels the three
//         younger instructions; a jump here supplies the fetch address.
//   WB  : writes ALU result, load data or PC+4 into the register array.
// Branches are predicted not taken, so a taken branch costs 3 bubbles and
// a not-taken one none. Jumps stop fetch while in ID and EX (2 bubbles). A
// load followed by a dependent ALU, branch, jump or address use costs one
// stall cycle. call_pal 0 halts the core when it reaches WB; `halted` then
// stays high until reset.
//
// Interface: clk, active-low asynchronous reset rst_n (PC restarts at 0),
// a program-load port into the instruction memory (use it while in reset),
// and `halted`. Register and memory contents can be inspected through the
// instance hierarchy (u_rf.regs, u_dmem.mem).
//
// The stage split, forwarding paths, stall rules and fetch-and-cancel
// follow the pipeline as described for this subset. Memory sizes, the
// halt mechanism, the multiplier latency and the reset PC are this
// design's choices. The multiplier blocks EX while busy, so instructions
// complete in order.
//
// A few signals drive nothing inside the core: the bypass selections
// (fwd_a_src, fwd_b_src, mem_mem_fwd), the individual stall causes from the
// stall control unit and the pc field of EX/MEM. They are kept as named
// observation points for simulation and debug; synthesis removes them.
module alpha_pipeline
  import alpha_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH  = 1024,
  parameter int unsigned DMEM_DEPTH  = 1024,
  parameter int unsigned MUL_LATENCY = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  inst_t                         prog_wdata,
  output logic                          halted
);
  // ---------------------------------------------------------------- state
  word_t   pc_q;
  logic    halted_q;
  if_id_t  id_in;   // current state of IF/ID
  id_ex_t  ex_in;   // current state of ID/EX
  ex_mem_t mem_in;  // current state of EX/MEM
  mem_wb_t wb_in;   // current state of MEM/WB

  if_id_t  id_next;
  id_ex_t  ex_next;
  ex_mem_t mem_next;
  mem_wb_t wb_next;

  pr_op_e pc_op, if_id_op, id_ex_op, ex_mem_op, mem_wb_op;
  logic   fetch_from_target, flush, mul_stall, load_use_stall, ctrl_stall;

  // ------------------------------------------------------------------- IF
  word_t fetch_pc;
  inst_t fetch_ir;

  assign fetch_pc = fetch_from_target ? mem_in.target : pc_q;

  alpha_imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk        (clk),
    .addr       (fetch_pc),
    .rdata      (fetch_ir),
    .prog_we    (prog_we),
    .prog_addr  (prog_addr),
    .prog_wdata (prog_wdata)
  );

  always_comb begin
    id_next.valid   = 1'b1;
    id_next.pc      = fetch_pc;
    id_next.incr_pc = fetch_pc + word_t'(4);  // "+4" PC incrementer
    id_next.ir      = fetch_ir;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   pc_q <= '0;
    else if (pc_op == PR_TRANSFER) pc_q <= flush ? mem_in.target : id_next.incr_pc;
  end

  alpha_pipe_reg #(.T(if_id_t)) u_if_id (
    .clk(clk), .rst_n(rst_n), .op(if_id_op), .next_state(id_next), .cur_state(id_in));

  // ------------------------------------------------------------------- ID
  ctrl_t id_ctrl;
  word_t rf_a, rf_b;
  logic  wb_we;

  alpha_decoder u_dec (.ir(id_in.ir), .ctrl(id_ctrl));

  assign wb_we = wb_in.valid && wb_in.wen && !halted_q;

  alpha_regfile #(.WRITE_THROUGH(1'b1)) u_rf (
    .clk     (clk),
    .rst_n   (rst_n),
    .raddr_a (id_in.ir[25:21]),
    .rdata_a (rf_a),
    .raddr_b (id_in.ir[20:16]),
    .rdata_b (rf_b),
    .we      (wb_we),
    .waddr   (wb_in.wdst),
    .wdata   (wb_in.result)
  );

  always_comb begin
    ex_next.valid   = id_in.valid;
    ex_next.ctrl    = id_in.valid ? id_ctrl : '0;
    ex_next.pc      = id_in.pc;
    ex_next.incr_pc = id_in.incr_pc;
    ex_next.asrc    = id_in.ir[25:21];
    ex_next.bsrc    = id_in.ir[20:16];
    ex_next.aval    = rf_a;
    ex_next.bval    = rf_b;
  end

  alpha_pipe_reg #(.T(id_ex_t)) u_id_ex (
    .clk(clk), .rst_n(rst_n), .op(id_ex_op), .next_state(ex_next), .cur_state(ex_in));

  // ------------------------------------------------------------------- EX
  word_t fwd_a, fwd_b, mem_sdata;
  fwd_e  fwd_a_src, fwd_b_src;
  logic  mem_mem_fwd;
  word_t alu_a, alu_b, alu_y;
  logic  zero_a;
  logic  mul_start, mul_busy, mul_done;
  word_t mul_product;

  alpha_forward_unit u_fwd (
    .ex_asrc    (ex_in.asrc),
    .ex_bsrc    (ex_in.bsrc),
    .ex_aval    (ex_in.aval),
    .ex_bval    (ex_in.bval),
    .mem_valid  (mem_in.valid),
    .mem_wen    (mem_in.wen),
    .mem_load   (mem_in.ctrl.mem_read),
    .mem_wdst   (mem_in.ctrl.wdst),
    .mem_result (mem_in.result),
    .mem_store  (mem_in.ctrl.mem_write),
    .mem_asrc   (mem_in.asrc),
    .mem_sdata  (mem_in.sdata),
    .wb_valid   (wb_in.valid),
    .wb_wen     (wb_in.wen),
    .wb_load    (wb_in.load),
    .wb_wdst    (wb_in.wdst),
    .wb_result  (wb_in.result),
    .a_out      (fwd_a),
    .b_out      (fwd_b),
    .a_src      (fwd_a_src),
    .b_src      (fwd_b_src),
    .sdata_out  (mem_sdata),
    .mem_mem    (mem_mem_fwd)
  );

  always_comb begin
    alu_a = (ex_in.ctrl.a_sel == ASEL_IMM) ? ex_in.ctrl.imm : fwd_a;
    unique case (ex_in.ctrl.b_sel)
      BSEL_IMM:  alu_b = ex_in.ctrl.imm;
      BSEL_INCR: alu_b = ex_in.incr_pc;
      default:   alu_b = fwd_b;
    endcase
  end

  alpha_alu u_alu (.op(ex_in.ctrl.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  assign zero_a    = (fwd_a == '0);  // Zero Test
  assign mul_start = ex_in.valid && ex_in.ctrl.mul && !mul_busy && !flush;

  alpha_multiplier #(.LATENCY(MUL_LATENCY)) u_mul (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (mul_start),
    .cancel  (flush),
    .a       (fwd_a),
    .b       ((ex_in.ctrl.b_sel == BSEL_IMM) ? ex_in.ctrl.imm : fwd_b),
    .busy    (mul_busy),
    .done    (mul_done),
    .product (mul_product)
  );

  always_comb begin
    mem_next.valid  = ex_in.valid;
    mem_next.ctrl   = ex_in.ctrl;
    mem_next.pc     = ex_in.pc;
    mem_next.asrc   = ex_in.asrc;
    mem_next.wen    = ex_in.valid && ex_in.ctrl.reg_write && (!ex_in.ctrl.cmov || zero_a);
    mem_next.sdata  = fwd_a;
    mem_next.target = alu_y;
    mem_next.taken  = ex_in.valid &&
                      (ex_in.ctrl.ubranch ||
                       (ex_in.ctrl.cbranch && (ex_in.ctrl.br_ne ? !zero_a : zero_a)));
    if (ex_in.ctrl.wb_sel == WB_INCR) mem_next.result = ex_in.incr_pc;
    else if (ex_in.ctrl.mul)          mem_next.result = mul_product;
    else                              mem_next.result = alu_y;
  end

  alpha_pipe_reg #(.T(ex_mem_t)) u_ex_mem (
    .clk(clk), .rst_n(rst_n), .op(ex_mem_op), .next_state(mem_next), .cur_state(mem_in));

  // ------------------------------------------------------------------ MEM
  word_t dmem_rdata;

  alpha_dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk   (clk),
    .addr  (mem_in.result),
    .rdata (dmem_rdata),
    .we    (mem_in.valid && mem_in.ctrl.mem_write && !halted_q),
    .wdata (mem_sdata)
  );

  always_comb begin
    wb_next.valid  = mem_in.valid;
    wb_next.halt   = mem_in.valid && mem_in.ctrl.halt;
    wb_next.load   = mem_in.ctrl.mem_read;
    wb_next.wen    = mem_in.wen;
    wb_next.wdst   = mem_in.ctrl.wdst;
    wb_next.result = mem_in.ctrl.mem_read ? dmem_rdata : mem_in.result;
  end

  alpha_pipe_reg #(.T(mem_wb_t)) u_mem_wb (
    .clk(clk), .rst_n(rst_n), .op(mem_wb_op), .next_state(wb_next), .cur_state(wb_in));

  // ------------------------------------------------------------------- WB
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       halted_q <= 1'b0;
    else if (wb_in.valid && wb_in.halt) halted_q <= 1'b1;
  end

  assign halted = halted_q;

  // --------------------------------------------------------- stall control
  alpha_hazard_unit u_hazard (
    .halted            (halted_q),
    .id_valid          (id_in.valid),
    .id_ra             (id_in.ir[25:21]),
    .id_rb             (id_in.ir[20:16]),
    .id_reads_a        (id_ctrl.reads_a),
    .id_reads_b        (id_ctrl.reads_b),
    .id_store          (id_ctrl.mem_write),
    .id_jump           (id_ctrl.jump),
    .id_halt           (id_ctrl.halt),
    .ex_valid          (ex_in.valid),
    .ex_load           (ex_in.ctrl.mem_read),
    .ex_wen            (ex_in.ctrl.reg_write),
    .ex_wdst           (ex_in.ctrl.wdst),
    .ex_jump           (ex_in.ctrl.jump),
    .ex_halt           (ex_in.ctrl.halt),
    .ex_mul            (ex_in.ctrl.mul),
    .mul_done          (mul_done),
    .mem_valid         (mem_in.valid),
    .mem_taken         (mem_in.taken),
    .mem_jump          (mem_in.ctrl.jump),
    .pc_op             (pc_op),
    .if_id_op          (if_id_op),
    .id_ex_op          (id_ex_op),
    .ex_mem_op         (ex_mem_op),
    .mem_wb_op         (mem_wb_op),
    .fetch_from_target (fetch_from_target),
    .flush             (flush),
    .mul_stall         (mul_stall),
    .load_use_stall    (load_use_stall),
    .ctrl_stall        (ctrl_stall)
  );
endmodule
