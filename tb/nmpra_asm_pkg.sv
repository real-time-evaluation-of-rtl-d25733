// nmpra_asm_pkg: instruction encoders used by the testbenches to build
// programs for the nMPRA-MT processor (MIPS-I style encodings, see
// rtl/nmpra_pkg.sv). Each function returns one 32-bit instruction word.
package nmpra_asm_pkg;
  import nmpra_pkg::*;

  function automatic word_t r_type(logic [5:0] fn, int rd, int rs, int rt, int sh = 0);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic word_t i_type(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic word_t add_ (int rd, int rs, int rt); return r_type(FN_ADD, rd, rs, rt); endfunction
  function automatic word_t sub_ (int rd, int rs, int rt); return r_type(FN_SUB, rd, rs, rt); endfunction
  function automatic word_t addi_(int rt, int rs, int imm); return i_type(OP_ADDI, rt, rs, imm); endfunction
  function automatic word_t lui_ (int rt, int imm);         return i_type(OP_LUI, rt, 0, imm); endfunction
  function automatic word_t lw_  (int rt, int imm, int rs); return i_type(OP_LW, rt, rs, imm); endfunction
  function automatic word_t sw_  (int rt, int imm, int rs); return i_type(OP_SW, rt, rs, imm); endfunction
  // branch offsets in instructions, relative to the next instruction
  function automatic word_t beq_ (int rs, int rt, int off); return i_type(OP_BEQ, rt, rs, off); endfunction
  function automatic word_t bne_ (int rs, int rt, int off); return i_type(OP_BNE, rt, rs, off); endfunction
  function automatic word_t j_   (int word_index); return {OP_J,   26'(word_index)}; endfunction
  function automatic word_t jal_ (int word_index); return {OP_JAL, 26'(word_index)}; endfunction
  function automatic word_t jr_  (int rs); return r_type(FN_JR, 0, rs, 0); endfunction
  function automatic word_t nop_ (); return '0; endfunction
endpackage
