// simd_asm: instruction encoders used by the testbenches to build programs
// for the SIMD system (sequential MIPS-I subset plus the parallel p_ forms).
// Each function returns one 32-bit instruction word.
package simd_asm;
  import simd_pkg::*;

  function automatic word_t enc_r(logic [5:0] op, logic [4:0] rs, logic [4:0] rt,
                                  logic [4:0] rd, logic [4:0] sh, logic [5:0] fn);
    return {op, rs, rt, rd, sh, fn};
  endfunction
  function automatic word_t enc_i(logic [5:0] op, logic [4:0] rs, logic [4:0] rt,
                                  logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  // sequential
  function automatic word_t ADDI(int rt, int rs, int imm); return enc_i(OP_ADDI, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic word_t ORI (int rt, int rs, int imm); return enc_i(OP_ORI,  5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic word_t ANDI(int rt, int rs, int imm); return enc_i(OP_ANDI, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic word_t SLTI(int rt, int rs, int imm); return enc_i(OP_SLTI, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic word_t LUI (int rt, int imm);         return enc_i(OP_LUI,  5'(0),  5'(rt), 16'(imm)); endfunction
  function automatic word_t LW  (int rt, int off, int rs); return enc_i(OP_LW,   5'(rs), 5'(rt), 16'(off)); endfunction
  function automatic word_t SW  (int rt, int off, int rs); return enc_i(OP_SW,   5'(rs), 5'(rt), 16'(off)); endfunction
  function automatic word_t BEQ (int rs, int rt, int off); return enc_i(OP_BEQ,  5'(rs), 5'(rt), 16'(off)); endfunction
  function automatic word_t BNE (int rs, int rt, int off); return enc_i(OP_BNE,  5'(rs), 5'(rt), 16'(off)); endfunction
  function automatic word_t J   (int word_idx);            return {OP_J,   26'(word_idx)}; endfunction
  function automatic word_t JAL (int word_idx);            return {OP_JAL, 26'(word_idx)}; endfunction
  function automatic word_t JR  (int rs);                  return enc_r(OP_SPECIAL, 5'(rs), 0, 0, 0, F_JR); endfunction
  function automatic word_t ADD (int rd, int rs, int rt);  return enc_r(OP_SPECIAL, 5'(rs), 5'(rt), 5'(rd), 0, F_ADD); endfunction
  function automatic word_t SUB (int rd, int rs, int rt);  return enc_r(OP_SPECIAL, 5'(rs), 5'(rt), 5'(rd), 0, F_SUB); endfunction
  function automatic word_t MUL (int rd, int rs, int rt);  return enc_r(OP_SPECIAL, 5'(rs), 5'(rt), 5'(rd), 0, F_MUL); endfunction
  function automatic word_t DIV (int rd, int rs, int rt);  return enc_r(OP_SPECIAL, 5'(rs), 5'(rt), 5'(rd), 0, F_DIV); endfunction
  function automatic word_t DIVU(int rd, int rs, int rt);  return enc_r(OP_SPECIAL, 5'(rs), 5'(rt), 5'(rd), 0, F_DIVU); endfunction
  function automatic word_t SRA (int rd, int rt, int sh);  return enc_r(OP_SPECIAL, 0, 5'(rt), 5'(rd), 5'(sh), F_SRA); endfunction
  function automatic word_t SLL (int rd, int rt, int sh);  return enc_r(OP_SPECIAL, 0, 5'(rt), 5'(rd), 5'(sh), F_SLL); endfunction
  function automatic word_t BREAK();                       return enc_r(OP_SPECIAL, 0, 0, 0, 0, F_BREAK); endfunction
  function automatic word_t NOP();                         return 32'h0; endfunction

  // parallel
  function automatic word_t PADDI(int rt, int rs, int imm); return enc_i(6'h38, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic word_t PORI (int rt, int rs, int imm); return enc_i(6'h3D, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic word_t PANDI(int rt, int rs, int imm); return enc_i(6'h3C, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic word_t PSLTI(int rt, int rs, int imm); return enc_i(6'h3A, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic word_t PLUI (int rt, int imm);         return enc_i(6'h3F, 5'(0),  5'(rt), 16'(imm)); endfunction
  function automatic word_t PLW  (int rt, int off, int rs); return enc_i(OP_P_LW, 5'(rs), 5'(rt), 16'(off)); endfunction
  function automatic word_t PSW  (int rt, int off, int rs); return enc_i(OP_P_SW, 5'(rs), 5'(rt), 16'(off)); endfunction
  function automatic word_t PADD (int rd, int rs, int rt);  return enc_r(OP_P_SPECIAL, 5'(rs), 5'(rt), 5'(rd), 0, F_ADD); endfunction
  function automatic word_t PSUB (int rd, int rs, int rt);  return enc_r(OP_P_SPECIAL, 5'(rs), 5'(rt), 5'(rd), 0, F_SUB); endfunction
  function automatic word_t PMUL (int rd, int rs, int rt);  return enc_r(OP_P_SPECIAL, 5'(rs), 5'(rt), 5'(rd), 0, F_MUL); endfunction
  function automatic word_t PDIV (int rd, int rs, int rt);  return enc_r(OP_P_SPECIAL, 5'(rs), 5'(rt), 5'(rd), 0, F_DIV); endfunction
  function automatic word_t PSRA (int rd, int rt, int sh);  return enc_r(OP_P_SPECIAL, 0, 5'(rt), 5'(rd), 5'(sh), F_SRA); endfunction
  function automatic word_t PSLL (int rd, int rt, int sh);  return enc_r(OP_P_SPECIAL, 0, 5'(rt), 5'(rd), 5'(sh), F_SLL); endfunction
endpackage
