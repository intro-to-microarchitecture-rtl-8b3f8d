// alpha_dmem: data memory, DEPTH quadwords of 64 bits.
//
// Loads read combinationally the quadword at byte address addr (low three
// bits ignored, higher bits beyond the array wrap); stores write on the
// rising clock edge when we is high. Contents are not reset. The depth and
// the aligned-quadword addressing are this design's choices.
module alpha_dmem
  import alpha_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic  clk,
  input  word_t addr,
  output word_t rdata,
  input  logic  we,
  input  word_t wdata
);
  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+2:3]] <= wdata;
  end

  assign rdata = mem[addr[AW+2:3]];
endmodule
