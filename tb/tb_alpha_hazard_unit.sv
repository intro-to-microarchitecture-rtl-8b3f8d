// tb_alpha_hazard_unit: checks the pipe-register operations chosen for
// each hazard case (halt, taken branch, multiplier busy, load-use, load
// feeding store data, jump in ID / EX / MEM, no hazard) with hand-written
// expected operation vectors.
module tb_alpha_hazard_unit;
  import alpha_pkg::*;

  logic   halted, id_valid, id_reads_a, id_reads_b, id_store, id_jump, id_halt;
  reg_t   id_ra, id_rb, ex_wdst;
  logic   ex_valid, ex_load, ex_wen, ex_jump, ex_halt, ex_mul, mul_done;
  logic   mem_valid, mem_taken, mem_jump;
  pr_op_e pc_op, if_id_op, id_ex_op, ex_mem_op, mem_wb_op;
  logic   fetch_from_target, flush, mul_stall, load_use_stall, ctrl_stall;
  int checks = 0, failures = 0;

  alpha_hazard_unit dut (.*);

  localparam pr_op_e T = PR_TRANSFER, S = PR_STALL, B = PR_BUBBLE;

  task automatic idle();
    {halted, id_valid, id_reads_a, id_reads_b, id_store, id_jump, id_halt} = '0;
    {ex_valid, ex_load, ex_wen, ex_jump, ex_halt, ex_mul, mul_done} = '0;
    {mem_valid, mem_taken, mem_jump} = '0;
    id_ra = 5'd1; id_rb = 5'd2; ex_wdst = 5'd3;
  endtask

  task automatic expect_ops(string what, pr_op_e p, pr_op_e i, pr_op_e e, pr_op_e m,
                            pr_op_e w, logic fft);
    #1;
    checks++;
    if ({pc_op, if_id_op, id_ex_op, ex_mem_op, mem_wb_op} !== {p, i, e, m, w} ||
        fetch_from_target !== fft) begin
      failures++;
      $display("FAIL %s: %s %s %s %s %s fft=%b", what, pc_op.name(), if_id_op.name(),
               id_ex_op.name(), ex_mem_op.name(), mem_wb_op.name(), fetch_from_target);
    end
  endtask

  initial begin
    idle(); id_valid = 1; id_reads_a = 1; ex_valid = 1;
    expect_ops("no hazard", T, T, T, T, T, 0);

    // load in EX writes r1, ID reads r1 as operand A: stall + bubble EX
    idle(); id_valid = 1; id_reads_a = 1; id_ra = 5'd4;
    ex_valid = 1; ex_load = 1; ex_wen = 1; ex_wdst = 5'd4;
    expect_ops("load-use A", S, S, B, T, T, 0);
    // same on operand B
    idle(); id_valid = 1; id_reads_b = 1; id_rb = 5'd4;
    ex_valid = 1; ex_load = 1; ex_wen = 1; ex_wdst = 5'd4;
    expect_ops("load-use B", S, S, B, T, T, 0);
    // load feeding store data only: MEM-MEM bypass, no stall
    idle(); id_valid = 1; id_reads_a = 1; id_reads_b = 1; id_store = 1; id_ra = 5'd4;
    ex_valid = 1; ex_load = 1; ex_wen = 1; ex_wdst = 5'd4;
    expect_ops("load-store data", T, T, T, T, T, 0);
    // ALU result (not a load) in EX: forwarding, no stall
    idle(); id_valid = 1; id_reads_a = 1; id_ra = 5'd4;
    ex_valid = 1; ex_wen = 1; ex_wdst = 5'd4;
    expect_ops("ALU-ALU", T, T, T, T, T, 0);

    // taken branch in MEM: three bubbles, PC loads target
    idle(); mem_valid = 1; mem_taken = 1; id_valid = 1; ex_valid = 1;
    expect_ops("taken branch", T, B, B, B, T, 0);
    checks++; if (!flush) begin failures++; $display("FAIL flush flag"); end
    // taken branch has priority over a load-use stall of a younger instruction
    id_reads_a = 1; id_ra = 5'd4; ex_load = 1; ex_wen = 1; ex_wdst = 5'd4;
    expect_ops("branch beats load-use", T, B, B, B, T, 0);

    // multiplier busy in EX
    idle(); ex_valid = 1; ex_mul = 1; mul_done = 0;
    expect_ops("mul busy", S, S, S, B, T, 0);
    mul_done = 1;
    expect_ops("mul done", T, T, T, T, T, 0);

    // jump in ID, in EX, in MEM
    idle(); id_valid = 1; id_jump = 1;
    expect_ops("jump in ID", S, B, T, T, T, 0);
    idle(); ex_valid = 1; ex_jump = 1;
    expect_ops("jump in EX", S, B, T, T, T, 0);
    idle(); mem_valid = 1; mem_jump = 1;
    expect_ops("jump in MEM", T, T, T, T, T, 1);
    // halt in ID stops fetch like a jump; halted freezes everything
    idle(); id_valid = 1; id_halt = 1;
    expect_ops("halt in ID", S, B, T, T, T, 0);
    idle(); halted = 1; mem_valid = 1; mem_taken = 1;
    expect_ops("halted", S, S, S, S, S, 0);
    // invalid (bubble) entries never cause hazards
    idle(); id_valid = 0; id_jump = 1; id_reads_a = 1; id_ra = 5'd4;
    ex_valid = 0; ex_load = 1; ex_wen = 1; ex_wdst = 5'd4;
    expect_ops("bubbles", T, T, T, T, T, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
