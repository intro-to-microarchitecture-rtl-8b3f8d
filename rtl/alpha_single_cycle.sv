// alpha_single_cycle: single-cycle processor for the Alpha subset.
//
// Executes one whole instruction per clock cycle: in one cycle the
// instruction is fetched from IMemory[PC], decoded, Ra and Rb are read, the
// ALU computes the result, address or branch target, the data memory is
// read or written, and at the clock edge the register array and the PC are
// updated. The PC becomes the target for taken branches (Zero Test on Ra),
// br/bsr and jumps (target = Rb), else PC+4. It uses the same functional
// units as the pipelined core (decoder, ALU, register array without
// write-through, memories).
//
// Interface: clk, active-low asynchronous reset rst_n (PC restarts at 0),
// a program-load port into the instruction memory (use it while in reset),
// and `halted`, set when call_pal 0 executes and held until reset.
//
// The datapath follows the single-cycle description of the subset. mulq is
// not part of that description and executes here as a no-op; halting, the
// memory sizes and the reset PC are this design's choices.
module alpha_single_cycle
  import alpha_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 1024
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  inst_t                         prog_wdata,
  output logic                          halted
);
  word_t pc_q, incr_pc, next_pc;
  logic  halted_q;
  inst_t ir;
  ctrl_t ctrl;
  word_t ra_val, rb_val, alu_a, alu_b, alu_y, mem_rdata, wdata;
  logic  zero_a, taken, we;

  alpha_imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk(clk), .addr(pc_q), .rdata(ir),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_wdata(prog_wdata));

  alpha_decoder u_dec (.ir(ir), .ctrl(ctrl));

  alpha_regfile #(.WRITE_THROUGH(1'b0)) u_rf (
    .clk(clk), .rst_n(rst_n),
    .raddr_a(ir[25:21]), .rdata_a(ra_val),
    .raddr_b(ir[20:16]), .rdata_b(rb_val),
    .we(we), .waddr(ctrl.wdst), .wdata(wdata));

  assign incr_pc = pc_q + word_t'(4);
  assign zero_a  = (ra_val == '0);

  always_comb begin
    alu_a = (ctrl.a_sel == ASEL_IMM) ? ctrl.imm : ra_val;
    unique case (ctrl.b_sel)
      BSEL_IMM:  alu_b = ctrl.imm;
      BSEL_INCR: alu_b = incr_pc;
      default:   alu_b = rb_val;
    endcase
  end

  alpha_alu u_alu (.op(ctrl.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  alpha_dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk(clk), .addr(alu_y), .rdata(mem_rdata),
    .we(ctrl.mem_write && !halted_q), .wdata(ra_val));

  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wdata = mem_rdata;
      WB_INCR: wdata = incr_pc;
      default: wdata = alu_y;
    endcase
    we    = ctrl.reg_write && !ctrl.mul && (!ctrl.cmov || zero_a) && !halted_q;
    taken = ctrl.ubranch || ctrl.jump ||
            (ctrl.cbranch && (ctrl.br_ne ? !zero_a : zero_a));
    next_pc = taken ? alu_y : incr_pc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q     <= '0;
      halted_q <= 1'b0;
    end else if (!halted_q) begin
      if (ctrl.halt) halted_q <= 1'b1;
      else           pc_q     <= next_pc;
    end
  end

  assign halted = halted_q;
endmodule
