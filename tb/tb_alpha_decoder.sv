// tb_alpha_decoder: decodes the example instruction words of the subset
// (including the printed object code) and checks the control fields that
// define each instruction's datapath use, then random operate words.
module tb_alpha_decoder;
  import alpha_pkg::*;
  import tb_alpha_asm_pkg::addqi, tb_alpha_asm_pkg::mulq, tb_alpha_asm_pkg::cmoveq;

  inst_t ir;
  ctrl_t c;
  int checks = 0, failures = 0;

  alpha_decoder dut (.ir(ir), .ctrl(c));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (ir=%h)", what, ir); end
  endtask

  initial begin
    // addq r1, r2, r3
    ir = 32'h40220403; #1;
    chk(c.alu_op == ALU_ADD && c.b_sel == BSEL_REG && c.reads_a && c.reads_b &&
        c.reg_write && c.wdst == 5'd3 && c.wb_sel == WB_ALU, "addq r1,r2,r3");
    // xor r4, 0x3f, r5
    ir = 32'h4487f805; #1;
    chk(c.alu_op == ALU_XOR && c.b_sel == BSEL_IMM && c.imm == 64'h3f && !c.reads_b &&
        c.wdst == 5'd5, "xor r4,0x3f,r5");
    // ldq r6, 2748(r7)
    ir = 32'ha4c70abc; #1;
    chk(c.mem_read && !c.mem_write && c.a_sel == ASEL_IMM && c.imm == 64'd2748 &&
        c.reads_b && !c.reads_a && c.wdst == 5'd6 && c.wb_sel == WB_MEM, "ldq");
    // stq r8, 291(r9)
    ir = 32'hb5090123; #1;
    chk(c.mem_write && !c.reg_write && c.imm == 64'd291 && c.reads_a && c.reads_b, "stq");
    // beq r3, disp -5  -> imm = -20
    ir = 32'he47ffffb; #1;
    chk(c.cbranch && !c.br_ne && c.imm == 64'hFFFF_FFFF_FFFF_FFEC && c.b_sel == BSEL_INCR &&
        c.reads_a && !c.reg_write, "beq");
    // bsr r26, disp -6
    ir = 32'hd35ffffa; #1;
    chk(c.ubranch && c.reg_write && c.wdst == 5'd26 && c.wb_sel == WB_INCR &&
        c.imm == 64'hFFFF_FFFF_FFFF_FFE8, "bsr");
    // ret r31, (r26), 1
    ir = 32'h6bfa8001; #1;
    chk(c.jump && c.alu_op == ALU_PASSB && c.reads_b && !c.reg_write, "ret");
    // bne r31, 5
    ir = 32'hf7e00005; #1;
    chk(c.cbranch && c.br_ne && c.imm == 64'd20, "bne");
    // bis r31, r31, r31 (nop): r31 write dropped
    ir = 32'h47ff041f; #1;
    chk(c.alu_op == ALU_OR && !c.reg_write, "bis nop");
    // halt
    ir = 32'h0; #1;
    chk(c.halt && !c.reg_write && !c.mem_write, "halt");
    // mulq and cmoveq
    ir = mulq(2, 3, 4); #1;
    chk(c.mul && c.reg_write && c.wdst == 5'd4, "mulq");
    ir = cmoveq(1, 2, 6); #1;
    chk(c.cmov && c.alu_op == ALU_PASSB && c.reads_a && c.reads_b, "cmoveq");
    // subq, cmplt by fields
    ir = {6'h10, 5'd1, 5'd2, 3'b0, 1'b0, 7'h29, 5'd7}; #1;
    chk(c.alu_op == ALU_SUB && c.wdst == 5'd7, "subq");
    ir = {6'h11, 5'd1, 5'd2, 3'b0, 1'b0, 7'h4D, 5'd7}; #1;
    chk(c.alu_op == ALU_CMPLT, "cmplt");
    // unknown function code decodes to a NOP
    ir = {6'h10, 5'd1, 5'd2, 3'b0, 1'b0, 7'h7F, 5'd7}; #1;
    chk(c == '0, "unknown funct is NOP");
    // random literal adds
    for (int i = 0; i < 200; i++) begin
      int lit, rc;
      lit = $urandom_range(0, 255);
      rc  = $urandom_range(0, 30);
      ir = addqi($urandom_range(0, 31), lit, rc); #1;
      chk(c.alu_op == ALU_ADD && c.imm == 64'(lit) && c.wdst == 5'(rc) && c.reg_write,
          "random addq literal");
    end
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
