// tb_alpha_top: end-to-end test of alpha_top at its default parameters.
//
// Loads the same program into the pipelined and the single-cycle core, runs
// both to their halt instruction, and compares every register and every
// stored quadword with the instruction-level reference model. For the
// pipelined core it also checks the cycle count of each directed program:
// with n dynamic instructions (halt included) the halt retires after
// n + 4 cycles plus the bubbles of its hazards (taken branch 3, jump 2,
// load-use 1, mulq LATENCY-1, not-taken branch and forwarded hazards 0);
// the single-cycle core takes n cycles. The programs are the hazard and
// branch examples of the pipeline (data hazards through forwarding, the
// load/store hazard classes, branch taken and not taken, jumps, multiply
// timing) followed by random straight-line and forward-branch programs.
// Each pipeline mechanism (EX-EX, MEM-EX, MEM-MEM forwarding, load-use
// stall, branch cancel, jump fetch stall, multiplier stall, halt) is
// counted and must occur at least once.
module tb_alpha_top;
  import tb_alpha_asm_pkg::*;

  localparam int IMEM_DEPTH  = 1024;
  localparam int DMEM_DEPTH  = 1024;
  localparam int MUL_LATENCY = 8;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        prog_we = 1'b0;
  logic [9:0]  prog_addr = '0;
  inst_t       prog_wdata = '0;
  logic        pipe_halted, sc_halted;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alpha_top dut (
    .clk             (clk),
    .rst_n           (rst_n),
    .pipe_prog_we    (prog_we),
    .pipe_prog_addr  (prog_addr),
    .pipe_prog_wdata (prog_wdata),
    .pipe_halted     (pipe_halted),
    .sc_prog_we      (prog_we),
    .sc_prog_addr    (prog_addr),
    .sc_prog_wdata   (prog_wdata),
    .sc_halted       (sc_halted)
  );

  // ------------------------------------------------------ mechanism counts
  int n_exex = 0, n_memex = 0, n_memmem = 0, n_loaduse = 0, n_flush = 0;
  int n_jumpstall = 0, n_mulstall = 0, n_halt = 0, n_nottaken = 0, n_cmov_skip = 0;

  always @(posedge clk) begin
    if (rst_n && !dut.u_pipe.halted_q) begin
      if (dut.u_pipe.ex_in.valid && dut.u_pipe.ex_in.ctrl.reads_a &&
          dut.u_pipe.fwd_a_src == alpha_pkg::FWD_EXEX) n_exex++;
      if (dut.u_pipe.ex_in.valid && dut.u_pipe.ex_in.ctrl.reads_b &&
          dut.u_pipe.fwd_b_src == alpha_pkg::FWD_EXEX) n_exex++;
      if (dut.u_pipe.ex_in.valid && dut.u_pipe.ex_in.ctrl.reads_a &&
          dut.u_pipe.fwd_a_src == alpha_pkg::FWD_MEMEX) n_memex++;
      if (dut.u_pipe.ex_in.valid && dut.u_pipe.ex_in.ctrl.reads_b &&
          dut.u_pipe.fwd_b_src == alpha_pkg::FWD_MEMEX) n_memex++;
      if (dut.u_pipe.mem_mem_fwd) n_memmem++;
      if (dut.u_pipe.load_use_stall && !dut.u_pipe.flush) n_loaduse++;
      if (dut.u_pipe.flush) n_flush++;
      if (dut.u_pipe.ctrl_stall && dut.u_pipe.if_id_op == alpha_pkg::PR_BUBBLE) n_jumpstall++;
      if (dut.u_pipe.mul_stall && !dut.u_pipe.flush) n_mulstall++;
      if (dut.u_pipe.mem_in.valid && dut.u_pipe.mem_in.ctrl.cbranch &&
          !dut.u_pipe.mem_in.taken) n_nottaken++;
      if (dut.u_pipe.mem_in.valid && dut.u_pipe.mem_in.ctrl.cmov &&
          !dut.u_pipe.mem_in.wen) n_cmov_skip++;
    end
  end

  // ------------------------------------------------------------- helpers
  inst_t prog [];
  int    pipe_cycles, sc_cycles;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Loads prog into both cores (unused words hold halt), clears data memory
  // and registers through reset, runs both cores to halt.
  task automatic run_both(int max_cycles);
    rst_n = 1'b0;
    @(negedge clk);
    for (int i = 0; i < IMEM_DEPTH; i++) begin
      prog_we    = 1'b1;
      prog_addr  = 10'(i);
      prog_wdata = (i < prog.size()) ? prog[i] : HALT;
      @(negedge clk);
    end
    prog_we = 1'b0;
    for (int i = 0; i < DMEM_DEPTH; i++) begin
      dut.u_pipe.u_dmem.mem[i] = '0;
      dut.u_sc.u_dmem.mem[i]   = '0;
    end
    @(negedge clk);
    rst_n = 1'b1;
    pipe_cycles = -1;
    sc_cycles   = -1;
    for (int c = 1; c <= max_cycles; c++) begin
      @(posedge clk);
      #1;
      if (pipe_halted && pipe_cycles < 0) pipe_cycles = c;
      if (sc_halted && sc_cycles < 0)     sc_cycles = c;
      if (pipe_cycles >= 0 && sc_cycles >= 0) break;
    end
    if (pipe_halted) n_halt++;
    check(pipe_cycles > 0, "pipelined core reached halt");
    check(sc_cycles > 0, "single-cycle core reached halt");
  endtask

  // Compares both cores with the reference model; returns its step count.
  function automatic int compare(string name, bit mul_in_sc);
    alpha_ref_model m = new();
    alpha_ref_model ms = new();
    int n = m.run(prog, 100000, IMEM_DEPTH, DMEM_DEPTH, 1'b1);
    void'(ms.run(prog, 100000, IMEM_DEPTH, DMEM_DEPTH, mul_in_sc));
    for (int r = 0; r < 31; r++) begin
      checks++;
      if (dut.u_pipe.u_rf.regs[r] !== m.regs[r]) begin
        failures++;
        $display("FAIL %s: pipeline r%0d = %h, expected %h", name, r,
                 dut.u_pipe.u_rf.regs[r], m.regs[r]);
      end
      checks++;
      if (dut.u_sc.u_rf.regs[r] !== ms.regs[r]) begin
        failures++;
        $display("FAIL %s: single-cycle r%0d = %h, expected %h", name, r,
                 dut.u_sc.u_rf.regs[r], ms.regs[r]);
      end
    end
    foreach (m.mem[i]) begin
      checks++;
      if (dut.u_pipe.u_dmem.mem[i] !== m.mem[i]) begin
        failures++;
        $display("FAIL %s: pipeline mem[%0d] = %h, expected %h", name, i,
                 dut.u_pipe.u_dmem.mem[i], m.mem[i]);
      end
    end
    foreach (ms.mem[i]) begin
      checks++;
      if (dut.u_sc.u_dmem.mem[i] !== ms.mem[i]) begin
        failures++;
        $display("FAIL %s: single-cycle mem[%0d] = %h, expected %h", name, i,
                 dut.u_sc.u_dmem.mem[i], ms.mem[i]);
      end
    end
    return n;
  endfunction

  // Runs a directed program and checks state and cycle counts.
  task automatic directed(string name, int extra_bubbles);
    int n;
    run_both(2000);
    n = compare(name, 1'b0);
    check(pipe_cycles == n + 4 + extra_bubbles,
          $sformatf("%s: pipeline cycles %0d, expected %0d", name, pipe_cycles,
                    n + 4 + extra_bubbles));
    check(sc_cycles == n, $sformatf("%s: single-cycle cycles %0d, expected %0d",
                                    name, sc_cycles, n));
    $display("%-22s instructions=%0d pipeline_cycles=%0d single_cycle_cycles=%0d",
             name, n, pipe_cycles, sc_cycles);
  endtask

  // Random program: ALU, cmov, mulq, loads/stores into a small window,
  // forward branches; ends in halt. Loads use r31 as base so addresses stay small.
  function automatic void random_program(int len);
    prog = new[len + 1];
    for (int i = 0; i < len; i++) begin
      int k, ra, rb, rc, lit;
      k   = $urandom_range(0, 12);
      ra  = $urandom_range(0, 7);
      rb  = $urandom_range(0, 7);
      rc  = $urandom_range(0, 7);
      lit = $urandom_range(0, 255);
      unique case (k)
        0:  prog[i] = addq(ra, rb, rc);
        1:  prog[i] = addqi(ra, lit, rc);
        2:  prog[i] = subq(ra, rb, rc);
        3:  prog[i] = xorr(ra, rb, rc);
        4:  prog[i] = bisi(ra, lit, rc);
        5:  prog[i] = cmplt(ra, rb, rc);
        6:  prog[i] = cmoveq(ra, rb, rc);
        7:  prog[i] = ldq(ra, 8 * $urandom_range(0, 7), 31);
        8:  prog[i] = stq(ra, 8 * $urandom_range(0, 7), 31);
        9:  prog[i] = (i + 4 < len) ? beq(ra, $urandom_range(0, 3)) : addq(ra, rb, rc);
        10: prog[i] = (i + 4 < len) ? bne(ra, $urandom_range(0, 3)) : addq(ra, rb, rc);
        11: prog[i] = ldq(rc, 8 * (ra & 3), 31);
        default: prog[i] = mulq(ra, rb, rc);
      endcase
    end
    prog[len] = HALT;
  endfunction

  // ---------------------------------------------------------------- tests
  initial begin : main
    // Data hazard example: each addq reads $2 written by the first one
    prog = '{addqi(2, 63, 2), addqi(2, 0, 3), addqi(2, 0, 4), addqi(2, 0, 5),
             addqi(2, 0, 6), HALT};
    directed("data_hazards", 0);
    check(dut.u_pipe.u_rf.regs[6] == 64'd63, "data hazards: $6 = 63");

    // Load / store hazard classes
    prog = '{addqi(31, 100, 1), addqi(31, 32, 2), stq(1, 8, 2),     // mem[40] = 100
             ldq(1, 8, 2), stq(1, 16, 2),                          // load-store data (MEM-MEM)
             ldq(1, 8, 2), addq(2, 1, 2),                          // load-ALU (stall 1)
             ldq(1, 8, 31), addqi(31, 8, 9), stq(9, 0, 31),        // mem[0] = 8
             ldq(1, 0, 31), stq(2, 16, 1),                         // load-store addr (stall 1)
             addq(1, 3, 2), stq(3, 8, 2),                          // ALU-store addr (EX-EX)
             addqi(2, 5, 1), stq(1, 16, 2),                        // ALU-store data (EX-EX)
             HALT};
    directed("load_store_hazards", 2);

    // Branch taken: demo program, encodings as printed for it
    prog = '{32'he7e00005, 32'h43e7f401, 32'h43e7f402, 32'h43e7f403, 32'h43e7f404,
             32'h47ff041f, 32'h43e7f405, 32'h47ff041f, 32'h00000000};
    directed("branch_taken", 3);
    check(dut.u_pipe.u_rf.regs[5] == 64'd63 && dut.u_pipe.u_rf.regs[1] == 64'd0,
          "branch taken: r5 = 63, r1 skipped");

    // Branch not taken
    prog = '{bne(31, 5), addqi(31, 63, 1), addqi(31, 63, 2), addqi(31, 63, 3),
             addqi(31, 63, 4), HALT};
    directed("branch_not_taken", 0);
    check(dut.u_pipe.u_rf.regs[4] == 64'd63, "branch not taken: r4 = 63");

    // Branches using forwarded / loaded data: ALU-branch, distant, load-branch
    prog = '{addqi(31, 0, 1), beq(1, 1), addqi(31, 1, 10), addqi(31, 2, 11),   // taken (EX-EX)
             addqi(31, 7, 1), bis(31, 31, 31), beq(1, 1), addqi(31, 3, 12),      // not taken (MEM-EX)
             addqi(31, 4, 13), stq(31, 0, 31), ldq(4, 0, 31), bne(4, 1),        // load-branch (stall)
             addqi(31, 5, 14), addqi(31, 6, 15), HALT};
    directed("branch_hazards", 3 + 1);

    // Jumps and subroutines: bsr / ret, ALU-jump, load-jump
    prog = '{bsr(26, 3),                    // 0x00 -> 0x10, r26 = 4
             addqi(31, 40, 1),              // 0x04
             jmpk(1, 26, 1),                // 0x08 jsr via r1 (ALU-jump) -> 0x28
             HALT,                          // 0x0c
             addqi(31, 1, 20),              // 0x10 subroutine
             jmpk(2, 31, 26),               // 0x14 ret -> 0x04
             HALT, HALT, HALT, HALT,        // 0x18..0x24
             stq(26, 0, 31),                // 0x28 mem[0] = 0x0c
             ldq(25, 0, 31),                // 0x2c
             jmpk(0, 31, 25),               // 0x30 load-jump -> 0x0c (halt)
             HALT};
    directed("jumps", 3 + 2 + 2 + 1 + 2);

    // Multiply timing example (stall while busy)
    prog = '{bisi(31, 3, 2), bisi(31, 7, 3), mulq(2, 3, 4), addq(2, 3, 3),
             bis(4, 31, 5), addq(2, 4, 2), HALT};
    directed("multiply", MUL_LATENCY - 1);
    begin
      alpha_ref_model m = new();
      void'(m.run(prog, 100, IMEM_DEPTH, DMEM_DEPTH, 1'b1));
      check(dut.u_pipe.u_rf.regs[4] == 64'd21 && dut.u_pipe.u_rf.regs[2] == 64'd24,
            "multiply: r4 = 21, r2 = 24");
    end

    // Remaining operate instructions and cmoveq taken / not taken
    prog = '{addqi(31, 5, 1), subqi(31, 9, 2), cmplt(2, 1, 3), xori(1, 255, 4),
             cmoveq(31, 1, 5), cmoveq(1, 2, 6), subq(1, 2, 7), HALT};
    directed("operate", 0);

    // Random programs compared against the reference model
    for (int t = 0; t < 40; t++) begin
      random_program(60);
      run_both(4000);
      void'(compare($sformatf("random%0d", t), 1'b0));
    end

    $display("mechanisms: EX-EX=%0d MEM-EX=%0d MEM-MEM=%0d load-use=%0d branch-cancel=%0d",
             n_exex, n_memex, n_memmem, n_loaduse, n_flush);
    $display("            jump-stall=%0d mul-stall=%0d not-taken=%0d cmov-skip=%0d halt=%0d",
             n_jumpstall, n_mulstall, n_nottaken, n_cmov_skip, n_halt);
    check(n_exex > 0, "EX-EX forwarding happened");
    check(n_memex > 0, "MEM-EX forwarding happened");
    check(n_memmem > 0, "MEM-MEM forwarding happened");
    check(n_loaduse > 0, "load-use stall happened");
    check(n_flush > 0, "taken-branch cancel happened");
    check(n_jumpstall > 0, "jump fetch stall happened");
    check(n_mulstall > 0, "multiplier stall happened");
    check(n_nottaken > 0, "not-taken branch happened");
    check(n_cmov_skip > 0, "cmoveq without write happened");
    check(n_halt > 0, "halt happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
