// alpha_imem: instruction memory, DEPTH words of 32 bits.
//
// Fetch is a combinational read of the word at byte address addr (the low
// two address bits are ignored, higher bits beyond the array wrap). A
// synchronous write port lets a host load the program before reset is
// released. Contents are not reset. The depth is this design's choice.
module alpha_imem
  import alpha_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  word_t                    addr,
  output inst_t                    rdata,
  input  logic                     prog_we,
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  inst_t                    prog_wdata
);
  inst_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_wdata;
  end

  assign rdata = mem[addr[$clog2(DEPTH)+1:2]];
endmodule
