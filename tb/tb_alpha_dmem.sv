// tb_alpha_dmem: random stores and loads against a shadow array; checks
// that a load sees the last store to the same quadword.
module tb_alpha_dmem;
  import alpha_pkg::*;

  localparam int DEPTH = 64;
  logic  clk = 0, we = 0;
  word_t addr = '0, wdata = '0, rdata;
  word_t shadow [DEPTH];
  bit    written [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alpha_dmem #(.DEPTH(DEPTH)) dut (.clk(clk), .addr(addr), .rdata(rdata), .we(we),
                                   .wdata(wdata));

  initial begin
    foreach (written[i]) written[i] = 0;
    for (int i = 0; i < 1000; i++) begin
      int q;
      q = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      addr  = word_t'(q * 8) + word_t'($urandom_range(0, 7));
      we    = 1'($urandom_range(0, 1));
      wdata = {$urandom, $urandom};
      #1;
      if (!we && written[q]) begin
        checks++;
        if (rdata !== shadow[q]) begin
          failures++;
          $display("FAIL load %h got %h want %h", addr, rdata, shadow[q]);
        end
      end
      @(posedge clk);
      if (we) begin shadow[q] = wdata; written[q] = 1; end
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
