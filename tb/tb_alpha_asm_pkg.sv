// tb_alpha_asm_pkg: instruction encoders and an instruction-level reference
// model of the Alpha subset, used by the processor testbenches.
//
// The encoders build 32-bit words from the operate, memory, branch and jump
// formats. alpha_ref_model executes a program one instruction at a time,
// straight from the instruction-set definitions, with no notion of stages
// or timing; testbenches compare the final register and memory state of
// the RTL cores with it.
package tb_alpha_asm_pkg;

  typedef logic [31:0] inst_t;
  typedef logic [63:0] word_t;

  // ------------------------------------------------------------- encoders
  function automatic inst_t opr(logic [5:0] op, logic [6:0] fn, int ra, int rb, int rc);
    return {op, 5'(ra), 5'(rb), 3'b000, 1'b0, fn, 5'(rc)};
  endfunction
  function automatic inst_t opi(logic [5:0] op, logic [6:0] fn, int ra, int lit, int rc);
    return {op, 5'(ra), 8'(lit), 1'b1, fn, 5'(rc)};
  endfunction

  function automatic inst_t addq (int ra, int rb,  int rc); return opr(6'h10, 7'h20, ra, rb, rc);  endfunction
  function automatic inst_t addqi(int ra, int lit, int rc); return opi(6'h10, 7'h20, ra, lit, rc); endfunction
  function automatic inst_t subq (int ra, int rb,  int rc); return opr(6'h10, 7'h29, ra, rb, rc);  endfunction
  function automatic inst_t subqi(int ra, int lit, int rc); return opi(6'h10, 7'h29, ra, lit, rc); endfunction
  function automatic inst_t bis  (int ra, int rb,  int rc); return opr(6'h11, 7'h20, ra, rb, rc);  endfunction
  function automatic inst_t bisi (int ra, int lit, int rc); return opi(6'h11, 7'h20, ra, lit, rc); endfunction
  function automatic inst_t xorr (int ra, int rb,  int rc); return opr(6'h11, 7'h40, ra, rb, rc);  endfunction
  function automatic inst_t xori (int ra, int lit, int rc); return opi(6'h11, 7'h40, ra, lit, rc); endfunction
  function automatic inst_t cmoveq(int ra, int rb, int rc); return opr(6'h11, 7'h24, ra, rb, rc);  endfunction
  function automatic inst_t cmplt(int ra, int rb,  int rc); return opr(6'h11, 7'h4D, ra, rb, rc);  endfunction
  function automatic inst_t cmplti(int ra, int lit, int rc); return opi(6'h11, 7'h4D, ra, lit, rc); endfunction
  function automatic inst_t mulq (int ra, int rb,  int rc); return opr(6'h13, 7'h20, ra, rb, rc);  endfunction
  function automatic inst_t mulqi(int ra, int lit, int rc); return opi(6'h13, 7'h20, ra, lit, rc); endfunction

  function automatic inst_t ldq(int ra, int ofs, int rb); return {6'h29, 5'(ra), 5'(rb), 16'(ofs)}; endfunction
  function automatic inst_t stq(int ra, int ofs, int rb); return {6'h2D, 5'(ra), 5'(rb), 16'(ofs)}; endfunction

  function automatic inst_t beq(int ra, int disp); return {6'h39, 5'(ra), 21'(disp)}; endfunction
  function automatic inst_t bne(int ra, int disp); return {6'h3D, 5'(ra), 21'(disp)}; endfunction
  function automatic inst_t br (int ra, int disp); return {6'h30, 5'(ra), 21'(disp)}; endfunction
  function automatic inst_t bsr(int ra, int disp); return {6'h34, 5'(ra), 21'(disp)}; endfunction

  // kind: 0 jmp, 1 jsr, 2 ret (hint[15:14])
  function automatic inst_t jmpk(int kind, int ra, int rb);
    return {6'h1A, 5'(ra), 5'(rb), 2'(kind), 14'd1};
  endfunction

  localparam inst_t HALT = 32'h0000_0000;

  // -------------------------------------------------------- reference model
  class alpha_ref_model;
    word_t regs [32];
    word_t mem  [int];     // quadword index -> data
    int    steps;

    function new();
      foreach (regs[i]) regs[i] = '0;
      steps = 0;
    endfunction

    function word_t rd(int r);
      return (r == 31) ? '0 : regs[r];
    endfunction

    function void wr(int r, word_t v);
      if (r != 31) regs[r] = v;
    endfunction

    function word_t load(word_t addr, int depth);
      int idx;
      idx = int'((addr >> 3) % depth);
      return mem.exists(idx) ? mem[idx] : '0;
    endfunction

    // Runs until halt or max_steps instructions; returns the number executed
    // (halt included). mulq_supported=0 makes mulq a no-op.
    function int run(inst_t prog [], int max_steps, int imem_depth, int dmem_depth,
                     bit mulq_supported);
      word_t pc, a, b, npc, disp, ofs;
      inst_t ir;
      logic [5:0] op;
      logic [6:0] fn;
      int ra, rb, rc, idx;
      pc = 0;
      steps = 0;
      while (steps < max_steps) begin
        idx  = int'((pc >> 2) % imem_depth);
        ir   = (idx < prog.size()) ? prog[idx] : HALT;
        op   = ir[31:26];
        fn   = ir[11:5];
        ra   = int'(ir[25:21]);
        rb   = int'(ir[20:16]);
        rc   = int'(ir[4:0]);
        a    = rd(ra);
        b    = ir[12] ? word_t'(ir[20:13]) : rd(rb);
        npc  = pc + 4;
        disp = {{41{ir[20]}}, ir[20:0], 2'b00};
        ofs  = {{48{ir[15]}}, ir[15:0]};
        steps++;
        if (ir == HALT) return steps;
        case (op)
          6'h10: if (fn == 7'h20) wr(rc, a + b); else if (fn == 7'h29) wr(rc, a - b);
          6'h11: begin
            if (fn == 7'h20) wr(rc, a | b);
            else if (fn == 7'h40) wr(rc, a ^ b);
            else if (fn == 7'h4D) wr(rc, ($signed(a) < $signed(b)) ? 64'd1 : 64'd0);
            else if (fn == 7'h24) begin if (a == 0) wr(rc, b); end
          end
          6'h13: if (fn == 7'h20 && mulq_supported) wr(rc, a * b);
          6'h29: wr(ra, load(rd(rb) + ofs, dmem_depth));
          6'h2D: mem[int'(((rd(rb) + ofs) >> 3) % dmem_depth)] = a;
          6'h39: if (a == 0) npc = pc + 4 + disp;
          6'h3D: if (a != 0) npc = pc + 4 + disp;
          6'h30, 6'h34: begin wr(ra, pc + 4); npc = pc + 4 + disp; end
          6'h1A: begin npc = rd(rb); wr(ra, pc + 4); end
          default: ;
        endcase
        pc = npc;
      end
      return steps;
    endfunction
  endclass

endpackage
