// alpha_forward_unit: bypass (forwarding) selection of the pipeline.
//
// Combinational. For each register operand of the instruction in EX it
// picks the newest value among
//   EX-EX : MEM_in.result, when the instruction in MEM writes that register
//           and is not a load (its data is not there yet)
//   MEM-EX: WB_in.result, when the instruction in WB writes that register
//           (ALU result or load data)
//   none  : the value read from the register array in ID.
// It also implements MEM-MEM forwarding: when the instruction in MEM is a
// store whose data register (ASrc) is written by a load now in WB, the
// store data is replaced by the load result. A load followed directly by
// a use in EX cannot be bypassed; the stall control unit holds that case.
// The conditions follow the forwarding rules of the pipeline; the
// selection encoding is this design's choice.
module alpha_forward_unit
  import alpha_pkg::*;
(
  // operands of the instruction in EX
  input  reg_t  ex_asrc,
  input  reg_t  ex_bsrc,
  input  word_t ex_aval,
  input  word_t ex_bval,
  // instruction in MEM (EX_MEM pipe register)
  input  logic  mem_valid,
  input  logic  mem_wen,
  input  logic  mem_load,
  input  reg_t  mem_wdst,
  input  word_t mem_result,
  input  logic  mem_store,
  input  reg_t  mem_asrc,
  input  word_t mem_sdata,
  // instruction in WB (MEM_WB pipe register)
  input  logic  wb_valid,
  input  logic  wb_wen,
  input  logic  wb_load,
  input  reg_t  wb_wdst,
  input  word_t wb_result,
  // results
  output word_t a_out,
  output word_t b_out,
  output fwd_e  a_src,
  output fwd_e  b_src,
  output word_t sdata_out,
  output logic  mem_mem
);
  function automatic fwd_e pick(reg_t src);
    if (mem_valid && mem_wen && !mem_load && mem_wdst == src) return FWD_EXEX;
    else if (wb_valid && wb_wen && wb_wdst == src)           return FWD_MEMEX;
    else                                                     return FWD_NONE;
  endfunction

  always_comb begin
    a_src = pick(ex_asrc);
    b_src = pick(ex_bsrc);
    unique case (a_src)
      FWD_EXEX:  a_out = mem_result;
      FWD_MEMEX: a_out = wb_result;
      default:   a_out = ex_aval;
    endcase
    unique case (b_src)
      FWD_EXEX:  b_out = mem_result;
      FWD_MEMEX: b_out = wb_result;
      default:   b_out = ex_bval;
    endcase
    mem_mem   = mem_valid && mem_store && wb_valid && wb_load && wb_wen &&
                wb_wdst == mem_asrc;
    sdata_out = mem_mem ? wb_result : mem_sdata;
  end
endmodule
