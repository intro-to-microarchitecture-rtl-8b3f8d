// tb_alpha_imem: loads random words through the program port and reads
// them back by byte address, including address wrap-around.
module tb_alpha_imem;
  import alpha_pkg::*;

  localparam int DEPTH = 64;
  logic       clk = 0, we = 0;
  logic [5:0] pa = '0;
  inst_t      pd = '0, rdata;
  word_t      addr = '0;
  inst_t      shadow [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alpha_imem #(.DEPTH(DEPTH)) dut (.clk(clk), .addr(addr), .rdata(rdata), .prog_we(we),
                                   .prog_addr(pa), .prog_wdata(pd));

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; pa = 6'(i); pd = $urandom; shadow[i] = pd;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 300; i++) begin
      int w;
      w = $urandom_range(0, DEPTH - 1);
      addr = word_t'(w * 4) + word_t'($urandom_range(0, 3)) +
             ((i % 3 == 0) ? word_t'(DEPTH * 4) : '0);
      #1;
      checks++;
      if (rdata !== shadow[w]) begin
        failures++;
        $display("FAIL addr=%h got %h want %h", addr, rdata, shadow[w]);
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
