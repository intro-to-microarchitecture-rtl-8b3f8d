// alpha_regfile: the register array, 32 x 64-bit integer registers.
//
// Two combinational read ports (Ra and Rb) and one write port written on the
// rising clock edge. Register 31 always reads as zero and writes to it are
// dropped, as the Alpha architecture defines. When WRITE_THROUGH is set, a
// read of the register being written in the same cycle returns the new
// value, so an instruction in ID sees the result of the one in WB ("reads
// get a value written in same stage"). The single-cycle core clears
// WRITE_THROUGH because there the write data depends on the read data.
// Registers reset to zero (reset value is this design's choice).
module alpha_regfile
  import alpha_pkg::*;
#(
  parameter bit WRITE_THROUGH = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  reg_t  raddr_a,
  output word_t rdata_a,
  input  reg_t  raddr_b,
  output word_t rdata_b,
  input  logic  we,
  input  reg_t  waddr,
  input  word_t wdata
);
  word_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we && waddr != REG_ZERO) begin
      regs[waddr] <= wdata;
    end
  end

  function automatic word_t read_port(reg_t ra, logic w, reg_t wa, word_t wd, word_t stored);
    if (ra == REG_ZERO)                   return '0;
    else if (WRITE_THROUGH && w && wa == ra) return wd;
    else                                  return stored;
  endfunction

  assign rdata_a = read_port(raddr_a, we, waddr, wdata, regs[raddr_a]);
  assign rdata_b = read_port(raddr_b, we, waddr, wdata, regs[raddr_b]);
endmodule
