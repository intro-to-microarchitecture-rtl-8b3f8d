// alpha_top: the two Alpha-subset processors side by side.
//
// The five-stage pipelined core (alpha_pipeline) is the main design; the
// single-cycle core (alpha_single_cycle) is the initial, one-instruction-
// per-cycle design built from the same functional units. They share only
// the clock and reset; each has its own instruction and data memory, its
// own program-load port and its own halted output, so the same program can
// be loaded into both and their final states compared.
module alpha_top
  import alpha_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH  = 1024,
  parameter int unsigned DMEM_DEPTH  = 1024,
  parameter int unsigned MUL_LATENCY = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // pipelined core
  input  logic                          pipe_prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] pipe_prog_addr,
  input  inst_t                         pipe_prog_wdata,
  output logic                          pipe_halted,
  // single-cycle core
  input  logic                          sc_prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] sc_prog_addr,
  input  inst_t                         sc_prog_wdata,
  output logic                          sc_halted
);
  alpha_pipeline #(
    .IMEM_DEPTH(IMEM_DEPTH), .DMEM_DEPTH(DMEM_DEPTH), .MUL_LATENCY(MUL_LATENCY)
  ) u_pipe (
    .clk(clk), .rst_n(rst_n),
    .prog_we(pipe_prog_we), .prog_addr(pipe_prog_addr), .prog_wdata(pipe_prog_wdata),
    .halted(pipe_halted));

  alpha_single_cycle #(
    .IMEM_DEPTH(IMEM_DEPTH), .DMEM_DEPTH(DMEM_DEPTH)
  ) u_sc (
    .clk(clk), .rst_n(rst_n),
    .prog_we(sc_prog_we), .prog_addr(sc_prog_addr), .prog_wdata(sc_prog_wdata),
    .halted(sc_halted));
endmodule
