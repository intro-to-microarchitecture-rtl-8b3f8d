// tb_alpha_multiplier: random and corner products at the default 8-cycle
// latency; checks the product, that done comes exactly LATENCY-1 cycles
// after start, and that cancel drops an operation in progress.
module tb_alpha_multiplier;
  import alpha_pkg::*;

  localparam int LAT = 8;
  logic  clk = 0, rst_n = 0, start = 0, cancel = 0, busy, done;
  word_t a = '0, b = '0, product;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alpha_multiplier #(.LATENCY(LAT)) dut (.clk(clk), .rst_n(rst_n), .start(start),
    .cancel(cancel), .a(a), .b(b), .busy(busy), .done(done), .product(product));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic mul(word_t x, word_t y);
    int cyc;
    word_t want;
    want = x * y;
    @(negedge clk);
    a = x; b = y; start = 1;
    cyc = 0;
    #1;
    while (!done) begin
      @(negedge clk);
      start = 0;
      a = {$urandom, $urandom};   // operands need only be valid at start
      b = {$urandom, $urandom};
      cyc++;
      #1;
      if (cyc > 50) break;
    end
    chk(cyc == LAT - 1, $sformatf("latency %0d want %0d", cyc, LAT - 1));
    chk(product === want, $sformatf("%h * %h = %h want %h", x, y, product, want));
    @(negedge clk);
    start = 0;
    #1;
    chk(!busy, "idle after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    mul(64'd3, 64'd7);
    mul(64'hFFFF_FFFF_FFFF_FFFF, 64'd2);
    mul(64'h1_0000_0000, 64'h1_0000_0000);
    for (int i = 0; i < 200; i++) mul({$urandom, $urandom}, {$urandom, $urandom});
    // cancel in the middle of an operation
    @(negedge clk);
    a = 64'd5; b = 64'd6; start = 1;
    @(negedge clk);
    start = 0;
    repeat (2) @(negedge clk);
    cancel = 1;
    @(negedge clk);
    cancel = 0;
    #1;
    chk(!busy && !done, "cancel returns to idle");
    mul(64'd11, 64'd13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
