// alpha_multiplier: multi-cycle 64 x 64 -> 64-bit integer multiplier (mulq).
//
// A mulq stays in the EX stage for LATENCY cycles while the rest of the
// pipeline behind it stalls ("stall while busy"). The unit is an iterative
// shift-and-add multiplier that consumes XLEN/LATENCY bits of operand b per
// cycle: in the start cycle it takes the first chunk straight from the
// operands and latches them, in each following cycle it adds one more
// partial product. The default of 8 cycles is the low end of the integer
// multiply time listed for the Alpha 21264 (8-16 cycles); the iterative
// structure is this design's choice.
//
// Interface: raise start for one cycle with a and b valid while the unit is
// idle (busy low). done is high in the cycle the product is on `product`,
// LATENCY-1 cycles after start (in the start cycle itself if LATENCY is 1).
// cancel returns the unit to idle, dropping an operation in progress.
module alpha_multiplier
  import alpha_pkg::*;
#(
  parameter int unsigned LATENCY = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  cancel,
  input  word_t a,
  input  word_t b,
  output logic  busy,
  output logic  done,
  output word_t product
);
  localparam int unsigned CHUNK = XLEN / LATENCY;
  localparam int unsigned CW    = (LATENCY > 1) ? $clog2(LATENCY) : 1;

  word_t          a_q, b_q, acc_q;
  logic [CW-1:0]  count_q;   // index of the chunk handled this cycle
  logic           busy_q;

  word_t          op_a, op_b, acc_in, partial, sum;
  logic [CW-1:0]  idx;
  logic [CHUNK-1:0] chunk;

  // In the start cycle work on the live operands, later on the latched ones
  always_comb begin
    op_a   = busy_q ? a_q : a;
    op_b   = busy_q ? b_q : b;
    acc_in = busy_q ? acc_q : '0;
    idx    = busy_q ? count_q : '0;
    chunk  = op_b[idx*CHUNK +: CHUNK];
    partial = (op_a * word_t'(chunk)) << (idx * CHUNK);
    sum    = acc_in + partial;
  end

  assign busy    = busy_q;
  assign done    = ((busy_q && count_q == CW'(LATENCY - 1)) ||
                    (!busy_q && start && LATENCY == 1)) && !cancel;
  assign product = sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      count_q <= '0;
      a_q     <= '0;
      b_q     <= '0;
      acc_q   <= '0;
    end else if (cancel || done) begin
      busy_q  <= 1'b0;
      count_q <= '0;
    end else if (!busy_q && start) begin
      busy_q  <= 1'b1;
      count_q <= CW'(1);
      a_q     <= a;
      b_q     <= b;
      acc_q   <= sum;
    end else if (busy_q) begin
      count_q <= count_q + CW'(1);
      acc_q   <= sum;
    end
  end

  initial begin
    assert (XLEN % LATENCY == 0)
      else $error("alpha_multiplier: LATENCY must divide %0d", XLEN);
  end
endmodule
