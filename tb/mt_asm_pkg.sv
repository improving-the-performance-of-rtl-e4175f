// mt_asm_pkg: instruction encoders used by the testbenches to build
// programs for the multithreaded core (MIPS formats plus the scheduler
// instructions MTS, MFS and WAIT under opcode 0x1C).
package mt_asm_pkg;
  import mt_pkg::*;

  function automatic word_t enc_r(logic [5:0] fn, int rs, int rt, int rd, int sh = 0);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic word_t enc_i(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic word_t ADD (int rd, int rs, int rt); return enc_r(FN_ADD, rs, rt, rd); endfunction
  function automatic word_t SUB (int rd, int rs, int rt); return enc_r(FN_SUB, rs, rt, rd); endfunction
  function automatic word_t AND_(int rd, int rs, int rt); return enc_r(FN_AND, rs, rt, rd); endfunction
  function automatic word_t OR_ (int rd, int rs, int rt); return enc_r(FN_OR,  rs, rt, rd); endfunction
  function automatic word_t SLT (int rd, int rs, int rt); return enc_r(FN_SLT, rs, rt, rd); endfunction
  function automatic word_t SLL (int rd, int rt, int sh); return enc_r(FN_SLL, 0, rt, rd, sh); endfunction
  function automatic word_t JR  (int rs);                 return enc_r(FN_JR,  rs, 0, 0); endfunction
  function automatic word_t NOP ();                       return 32'h0; endfunction
  function automatic word_t ADDI(int rt, int rs, int imm); return enc_i(OP_ADDI, rs, rt, imm); endfunction
  function automatic word_t ORI (int rt, int rs, int imm); return enc_i(OP_ORI,  rs, rt, imm); endfunction
  function automatic word_t LUI (int rt, int imm);         return enc_i(OP_LUI,  0,  rt, imm); endfunction
  function automatic word_t LW  (int rt, int off, int rs); return enc_i(OP_LW,   rs, rt, off); endfunction
  function automatic word_t SW  (int rt, int off, int rs); return enc_i(OP_SW,   rs, rt, off); endfunction
  function automatic word_t BEQ (int rs, int rt, int off); return enc_i(OP_BEQ,  rs, rt, off); endfunction
  function automatic word_t BNE (int rs, int rt, int off); return enc_i(OP_BNE,  rs, rt, off); endfunction
  function automatic word_t J   (int addr);  return {OP_J,   26'(addr >> 2)}; endfunction
  function automatic word_t JAL (int addr);  return {OP_JAL, 26'(addr >> 2)}; endfunction
  function automatic word_t MTS (int rt, logic [3:0] sel, int tgt);
    return {OP_NHSE, 5'd0, 5'(rt), NOP_MTS, sel, 3'd0, 5'(tgt)};
  endfunction
  function automatic word_t MFS (int rt, logic [3:0] sel, int tgt);
    return {OP_NHSE, 5'd0, 5'(rt), NOP_MFS, sel, 3'd0, 5'(tgt)};
  endfunction
  function automatic word_t WAIT ();
    return {OP_NHSE, 5'd0, 5'd0, NOP_WAIT, 12'd0};
  endfunction
endpackage
