// tb_alpha_single_cycle: runs programs on the single-cycle core and compares
// final registers and stored data with the reference model. Every program
// must take exactly one cycle per dynamic instruction (halt included).
// mulq is a no-op in this core and in the model run used here. Random
// programs include loads, stores and forward branches.
module tb_alpha_single_cycle;
  import tb_alpha_asm_pkg::*;

  localparam int IDEPTH = 256, DDEPTH = 64;

  logic       clk = 0, rst_n = 0, prog_we = 0, halted;
  logic [7:0] prog_addr = '0;
  inst_t      prog_wdata = '0;
  inst_t      prog [];
  int checks = 0, failures = 0, cycles;

  always #5 clk = ~clk;

  alpha_single_cycle #(.IMEM_DEPTH(IDEPTH), .DMEM_DEPTH(DDEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .prog_we(prog_we), .prog_addr(prog_addr),
    .prog_wdata(prog_wdata), .halted(halted));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(string name, int unused);
    alpha_ref_model m = new();
    int n;
    rst_n = 0;
    @(negedge clk);
    for (int i = 0; i < IDEPTH; i++) begin
      prog_we = 1; prog_addr = 8'(i); prog_wdata = (i < prog.size()) ? prog[i] : HALT;
      @(negedge clk);
    end
    prog_we = 0;
    for (int i = 0; i < DDEPTH; i++) dut.u_dmem.mem[i] = '0;
    rst_n = 1;
    cycles = -1;
    for (int c = 1; c <= 5000; c++) begin
      @(posedge clk); #1;
      if (halted) begin cycles = c; break; end
    end
    chk(cycles > 0, {name, ": halted"});
    n = m.run(prog, 100000, IDEPTH, DDEPTH, 1'b0);
    for (int r = 0; r < 31; r++)
      chk(dut.u_rf.regs[r] === m.regs[r], $sformatf("%s: r%0d = %h want %h", name, r,
                                                     dut.u_rf.regs[r], m.regs[r]));
    foreach (m.mem[i])
      chk(dut.u_dmem.mem[i] === m.mem[i], $sformatf("%s: mem[%0d]", name, i));
    chk(cycles == n, $sformatf("%s: %0d cycles, want %0d", name, cycles, n));
  endtask

  initial begin
    prog = '{addqi(2, 63, 2), addqi(2, 0, 3), addqi(2, 0, 4), addqi(2, 0, 5),
             addqi(2, 0, 6), HALT};
    run("data hazards", 0);
    prog = '{addqi(31, 9, 1), stq(1, 8, 31), addqi(31, 5, 1), ldq(1, 8, 31), stq(1, 16, 31),
             ldq(3, 16, 31), addq(3, 3, 4), HALT};
    run("load-store", 1);
    prog = '{32'he7e00005, 32'h43e7f401, 32'h43e7f402, 32'h43e7f403, 32'h43e7f404,
             32'h47ff041f, 32'h43e7f405, 32'h47ff041f, 32'h00000000};
    run("branch taken", 3);
    prog = '{bne(31, 5), addqi(31, 63, 1), addqi(31, 63, 2), addqi(31, 63, 3),
             addqi(31, 63, 4), HALT};
    run("branch not taken", 0);
    prog = '{addqi(31, 12, 1), jmpk(0, 31, 1), HALT, addqi(31, 1, 2), HALT};
    run("jump", 2);
    prog = '{bisi(31, 3, 2), bisi(31, 7, 3), mulq(2, 3, 4), addq(2, 3, 3),
             bis(4, 31, 5), addq(2, 4, 2), HALT};
    run("multiply", 0);
    chk(dut.u_rf.regs[3] == 64'd10, "multiply sequence: r3 = 10");
    for (int t = 0; t < 30; t++) begin
      prog = new[51];
      for (int i = 0; i < 50; i++) begin
        int ra, rb, rc;
        ra = $urandom_range(0, 5);
        rb = $urandom_range(0, 5);
        rc = $urandom_range(0, 5);
        case ($urandom_range(0, 8))
          0: prog[i] = addq(ra, rb, rc);
          1: prog[i] = addqi(ra, $urandom_range(0, 255), rc);
          2: prog[i] = subq(ra, rb, rc);
          3: prog[i] = mulq(ra, rb, rc);
          4: prog[i] = ldq(rc, 8 * $urandom_range(0, 3), 31);
          5: prog[i] = stq(ra, 8 * $urandom_range(0, 3), 31);
          6: prog[i] = (i < 46) ? beq(ra, $urandom_range(0, 3)) : xorr(ra, rb, rc);
          7: prog[i] = cmoveq(ra, rb, rc);
          default: prog[i] = cmplt(ra, rb, rc);
        endcase
      end
      prog[50] = HALT;
      run($sformatf("random %0d", t), -1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
