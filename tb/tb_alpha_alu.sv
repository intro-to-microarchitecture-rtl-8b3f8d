// tb_alpha_alu: checks every ALU operation on corner and random operands
// against expressions computed in the testbench.
module tb_alpha_alu;
  import alpha_pkg::*;

  alu_op_e op;
  word_t   a, b, y;
  int checks = 0, failures = 0;

  alpha_alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic word_t expect_y(alu_op_e o, word_t x, word_t z);
    case (o)
      ALU_ADD:   return x + z;
      ALU_SUB:   return x - z;
      ALU_OR:    return x | z;
      ALU_XOR:   return x ^ z;
      ALU_CMPLT: return ($signed(x) < $signed(z)) ? 64'd1 : 64'd0;
      ALU_PASSB: return z;
      default:   return '0;
    endcase
  endfunction

  task automatic try(alu_op_e o, word_t x, word_t z, word_t want);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== want) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h want=%h", o.name(), x, z, y, want);
    end
  endtask

  initial begin
    // hand-worked cases
    try(ALU_ADD,   64'd5, 64'd7, 64'd12);
    try(ALU_SUB,   64'd5, 64'd7, 64'hFFFF_FFFF_FFFF_FFFE);
    try(ALU_OR,    64'h0F0, 64'h00F, 64'h0FF);
    try(ALU_XOR,   64'hFF, 64'h0F, 64'hF0);
    try(ALU_CMPLT, 64'hFFFF_FFFF_FFFF_FFFF, 64'd0, 64'd1);   // -1 < 0
    try(ALU_CMPLT, 64'd0, 64'hFFFF_FFFF_FFFF_FFFF, 64'd0);
    try(ALU_CMPLT, 64'd3, 64'd3, 64'd0);
    try(ALU_PASSB, 64'd1, 64'h1234, 64'h1234);
    // branch target: PC 0x10 + 4 + (-5 * 4) = 0
    try(ALU_ADD,   64'hFFFF_FFFF_FFFF_FFEC, 64'h14, 64'd0);
    for (int i = 0; i < 2000; i++) begin
      alu_op_e o;
      word_t x, z;
      o = alu_op_e'($urandom_range(0, 5));
      x = {$urandom, $urandom};
      z = {$urandom, $urandom};
      try(o, x, z, expect_y(o, x, z));
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
