// tb_alpha_regfile: checks reset to zero, write then read on both ports,
// r31 reading zero, and the same-cycle write-through of the ID read ports,
// against a shadow array kept by the testbench.
module tb_alpha_regfile;
  import alpha_pkg::*;

  logic  clk = 0, rst_n = 0, we = 0;
  reg_t  ra = '0, rb = '0, wa = '0;
  word_t wd = '0, da, db;
  word_t shadow [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alpha_regfile #(.WRITE_THROUGH(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db),
    .we(we), .waddr(wa), .wdata(wd));

  task automatic chk(word_t got, word_t want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 32; r++) begin
      ra = 5'(r); #1; chk(da, 64'd0, "reset value");
    end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1));
      wa = 5'($urandom);
      wd = {$urandom, $urandom};
      ra = (i % 4 == 0) ? wa : 5'($urandom);
      rb = (i % 5 == 0) ? wa : 5'($urandom);
      #1;
      // same-cycle write is visible to both read ports (write-through)
      chk(da, (ra == 31) ? 64'd0 : ((we && wa == ra) ? wd : shadow[ra]), "port A");
      chk(db, (rb == 31) ? 64'd0 : ((we && wa == rb) ? wd : shadow[rb]), "port B");
      @(posedge clk);
      if (we && wa != 31) shadow[wa] = wd;
    end
    @(negedge clk);
    we = 0;
    for (int r = 0; r < 32; r++) begin
      ra = 5'(r); rb = 5'(31 - r); #1;
      chk(da, (r == 31) ? 64'd0 : shadow[r], "final A");
      chk(db, (r == 0) ? 64'd0 : shadow[31 - r], "final B");
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
