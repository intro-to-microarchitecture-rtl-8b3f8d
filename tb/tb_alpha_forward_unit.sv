// tb_alpha_forward_unit: drives random pipeline states and compares the
// bypass choices with a priority rule written in the testbench: newest
// writer first (MEM unless it is a load, then WB), else the register value;
// plus MEM-MEM store-data bypass from a load in WB.
module tb_alpha_forward_unit;
  import alpha_pkg::*;

  reg_t  ex_asrc, ex_bsrc, mem_wdst, mem_asrc, wb_wdst;
  word_t ex_aval, ex_bval, mem_result, mem_sdata, wb_result;
  logic  mem_valid, mem_wen, mem_load, mem_store, wb_valid, wb_wen, wb_load;
  word_t a_out, b_out, sdata_out;
  fwd_e  a_src, b_src;
  logic  mem_mem;
  int checks = 0, failures = 0;
  int seen_exex = 0, seen_memex = 0, seen_memmem = 0;

  alpha_forward_unit dut (.*);

  function automatic word_t model(reg_t src, word_t regval);
    if (mem_valid && mem_wen && !mem_load && mem_wdst == src) return mem_result;
    if (wb_valid && wb_wen && wb_wdst == src) return wb_result;
    return regval;
  endfunction

  initial begin
    for (int i = 0; i < 5000; i++) begin
      ex_asrc = 5'($urandom_range(0, 3)); ex_bsrc = 5'($urandom_range(0, 3));
      mem_wdst = 5'($urandom_range(0, 3)); wb_wdst = 5'($urandom_range(0, 3));
      mem_asrc = 5'($urandom_range(0, 3));
      ex_aval = {$urandom, $urandom}; ex_bval = {$urandom, $urandom};
      mem_result = {$urandom, $urandom}; mem_sdata = {$urandom, $urandom};
      wb_result = {$urandom, $urandom};
      {mem_valid, mem_wen, mem_load, mem_store, wb_valid, wb_wen, wb_load} = 7'($urandom);
      #1;
      checks += 3;
      if (a_out !== model(ex_asrc, ex_aval)) begin failures++; $display("FAIL A"); end
      if (b_out !== model(ex_bsrc, ex_bval)) begin failures++; $display("FAIL B"); end
      if (sdata_out !== ((mem_valid && mem_store && wb_valid && wb_load && wb_wen &&
                          wb_wdst == mem_asrc) ? wb_result : mem_sdata)) begin
        failures++; $display("FAIL store data");
      end
      if (a_src == FWD_EXEX) seen_exex++;
      if (a_src == FWD_MEMEX) seen_memex++;
      if (mem_mem) seen_memmem++;
    end
    checks++;
    if (seen_exex == 0 || seen_memex == 0 || seen_memmem == 0) begin
      failures++; $display("FAIL: a bypass kind never selected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
