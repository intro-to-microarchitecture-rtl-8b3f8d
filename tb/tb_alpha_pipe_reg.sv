// tb_alpha_pipe_reg: checks the Transfer, Stall and Bubble operations and
// reset of a pipe register carrying a 40-bit payload.
module tb_alpha_pipe_reg;
  import alpha_pkg::*;

  typedef logic [39:0] pay_t;
  logic   clk = 0, rst_n = 0;
  pr_op_e op = PR_TRANSFER;
  pay_t   nxt = '0, cur, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alpha_pipe_reg #(.T(pay_t)) dut (.clk(clk), .rst_n(rst_n), .op(op), .next_state(nxt),
                                   .cur_state(cur));

  initial begin
    @(negedge clk);
    checks++;
    if (cur !== '0) begin failures++; $display("FAIL reset not bubble"); end
    rst_n = 1;
    model = '0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      op  = pr_op_e'($urandom_range(0, 2));
      nxt = {8'($urandom), $urandom};
      @(posedge clk);
      case (op)
        PR_TRANSFER: model = nxt;
        PR_STALL:    model = model;
        default:     model = '0;
      endcase
      #1;
      checks++;
      if (cur !== model) begin
        failures++;
        $display("FAIL op=%s cur=%h want=%h", op.name(), cur, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
