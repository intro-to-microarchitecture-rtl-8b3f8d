// alpha_hazard_unit: stall control logic of the five-stage pipeline.
//
// Combinational. Each cycle it decides, for the PC and for each of the four
// pipe registers, whether the next update is a transfer, a stall or a
// bubble. The cases, highest priority first:
//   halted       the halt instruction has reached WB: everything stalls.
//   flush        a taken branch (beq/bne taken, br, bsr) is in MEM: the PC
//                loads the target and the three younger instructions (in
//                IF, ID and EX) become bubbles ("fetch & cancel", static
//                not-taken prediction).
//   mul busy     a mulq is in EX and its product is not ready: PC, IF/ID
//                and ID/EX stall, a bubble enters MEM.
//   load-use     a load in EX writes a register the instruction in ID reads
//                as an EX operand: PC and IF/ID stall, a bubble enters EX
//                (one cycle, then MEM-EX forwarding supplies the data).
//                Store data does not count: MEM-MEM forwarding covers it.
//   jump/halt    a jump or halt is in ID or EX: fetch stops (PC stalls) and
//                a bubble enters ID; when the jump reaches MEM the fetch in
//                that cycle uses its target (fetch_from_target).
// Case order and the treatment of halt like a jump are this design's
// choices; the individual rules follow the pipeline's hazard handling.
module alpha_hazard_unit
  import alpha_pkg::*;
(
  input  logic   halted,
  // instruction in ID
  input  logic   id_valid,
  input  reg_t   id_ra,
  input  reg_t   id_rb,
  input  logic   id_reads_a,
  input  logic   id_reads_b,
  input  logic   id_store,
  input  logic   id_jump,
  input  logic   id_halt,
  // instruction in EX
  input  logic   ex_valid,
  input  logic   ex_load,
  input  logic   ex_wen,
  input  reg_t   ex_wdst,
  input  logic   ex_jump,
  input  logic   ex_halt,
  input  logic   ex_mul,
  input  logic   mul_done,
  // instruction in MEM
  input  logic   mem_valid,
  input  logic   mem_taken,
  input  logic   mem_jump,
  // decisions
  output pr_op_e pc_op,
  output pr_op_e if_id_op,
  output pr_op_e id_ex_op,
  output pr_op_e ex_mem_op,
  output pr_op_e mem_wb_op,
  output logic   fetch_from_target,
  output logic   flush,
  output logic   mul_stall,
  output logic   load_use_stall,
  output logic   ctrl_stall
);
  logic a_hit, b_hit;

  always_comb begin
    flush     = mem_valid && mem_taken;
    mul_stall = ex_valid && ex_mul && !mul_done;
    // operand A of a store is its data, forwarded MEM-MEM instead
    a_hit = id_reads_a && !id_store && id_ra == ex_wdst;
    b_hit = id_reads_b && id_rb == ex_wdst;
    load_use_stall = id_valid && ex_valid && ex_load && ex_wen && (a_hit || b_hit);
    ctrl_stall = (id_valid && (id_jump || id_halt)) || (ex_valid && (ex_jump || ex_halt));

    pc_op     = PR_TRANSFER;
    if_id_op  = PR_TRANSFER;
    id_ex_op  = PR_TRANSFER;
    ex_mem_op = PR_TRANSFER;
    mem_wb_op = PR_TRANSFER;
    fetch_from_target = 1'b0;

    if (halted) begin
      pc_op     = PR_STALL;
      if_id_op  = PR_STALL;
      id_ex_op  = PR_STALL;
      ex_mem_op = PR_STALL;
      mem_wb_op = PR_STALL;
    end else if (flush) begin
      if_id_op  = PR_BUBBLE;
      id_ex_op  = PR_BUBBLE;
      ex_mem_op = PR_BUBBLE;
    end else if (mul_stall) begin
      pc_op     = PR_STALL;
      if_id_op  = PR_STALL;
      id_ex_op  = PR_STALL;
      ex_mem_op = PR_BUBBLE;
    end else if (load_use_stall) begin
      pc_op     = PR_STALL;
      if_id_op  = PR_STALL;
      id_ex_op  = PR_BUBBLE;
    end else if (ctrl_stall) begin
      pc_op     = PR_STALL;
      if_id_op  = PR_BUBBLE;
    end else begin
      fetch_from_target = mem_valid && mem_jump;
    end
  end
endmodule
