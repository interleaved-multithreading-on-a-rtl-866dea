// Instruction encoders for writing MIPS-I test programs inside testbenches.
// Each function returns the 32-bit machine word of one instruction; branch offsets are in
// instructions relative to the delay slot, jump targets are byte addresses.
package mips_asm_pkg;
  typedef logic [31:0] w_t;

  function automatic w_t rtype(input int fn, input int rs, input int rt, input int rd, input int sh = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic w_t itype(input int op, input int rs, input int rt, input int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic w_t nop();                               return 32'h0; endfunction
  function automatic w_t sll  (int rd, int rt, int sh);       return rtype('h00, 0, rt, rd, sh); endfunction
  function automatic w_t srl  (int rd, int rt, int sh);       return rtype('h02, 0, rt, rd, sh); endfunction
  function automatic w_t sra  (int rd, int rt, int sh);       return rtype('h03, 0, rt, rd, sh); endfunction
  function automatic w_t sllv (int rd, int rt, int rs);       return rtype('h04, rs, rt, rd); endfunction
  function automatic w_t srav (int rd, int rt, int rs);       return rtype('h07, rs, rt, rd); endfunction
  function automatic w_t jr   (int rs);                       return rtype('h08, rs, 0, 0); endfunction
  function automatic w_t jalr (int rd, int rs);               return rtype('h09, rs, 0, rd); endfunction
  function automatic w_t syscall_i();                         return rtype('h0C, 0, 0, 0); endfunction
  function automatic w_t break_i();                           return rtype('h0D, 0, 0, 0); endfunction
  function automatic w_t mfhi (int rd);                       return rtype('h10, 0, 0, rd); endfunction
  function automatic w_t mthi (int rs);                       return rtype('h11, rs, 0, 0); endfunction
  function automatic w_t mflo (int rd);                       return rtype('h12, 0, 0, rd); endfunction
  function automatic w_t mtlo (int rs);                       return rtype('h13, rs, 0, 0); endfunction
  function automatic w_t mult (int rs, int rt);               return rtype('h18, rs, rt, 0); endfunction
  function automatic w_t multu(int rs, int rt);               return rtype('h19, rs, rt, 0); endfunction
  function automatic w_t div  (int rs, int rt);               return rtype('h1A, rs, rt, 0); endfunction
  function automatic w_t divu (int rs, int rt);               return rtype('h1B, rs, rt, 0); endfunction
  function automatic w_t add  (int rd, int rs, int rt);       return rtype('h20, rs, rt, rd); endfunction
  function automatic w_t addu (int rd, int rs, int rt);       return rtype('h21, rs, rt, rd); endfunction
  function automatic w_t sub  (int rd, int rs, int rt);       return rtype('h22, rs, rt, rd); endfunction
  function automatic w_t subu (int rd, int rs, int rt);       return rtype('h23, rs, rt, rd); endfunction
  function automatic w_t and_r(int rd, int rs, int rt);       return rtype('h24, rs, rt, rd); endfunction
  function automatic w_t or_r (int rd, int rs, int rt);       return rtype('h25, rs, rt, rd); endfunction
  function automatic w_t xor_r(int rd, int rs, int rt);       return rtype('h26, rs, rt, rd); endfunction
  function automatic w_t nor_r(int rd, int rs, int rt);       return rtype('h27, rs, rt, rd); endfunction
  function automatic w_t slt  (int rd, int rs, int rt);       return rtype('h2A, rs, rt, rd); endfunction
  function automatic w_t sltu (int rd, int rs, int rt);       return rtype('h2B, rs, rt, rd); endfunction
  function automatic w_t bltz (int rs, int off);              return itype('h01, rs, 'h00, off); endfunction
  function automatic w_t bgez (int rs, int off);              return itype('h01, rs, 'h01, off); endfunction
  function automatic w_t bltzal(int rs, int off);             return itype('h01, rs, 'h10, off); endfunction
  function automatic w_t bgezal(int rs, int off);             return itype('h01, rs, 'h11, off); endfunction
  function automatic w_t j    (w_t target);                   return {6'h02, target[27:2]}; endfunction
  function automatic w_t jal  (w_t target);                   return {6'h03, target[27:2]}; endfunction
  function automatic w_t beq  (int rs, int rt, int off);      return itype('h04, rs, rt, off); endfunction
  function automatic w_t bne  (int rs, int rt, int off);      return itype('h05, rs, rt, off); endfunction
  function automatic w_t blez (int rs, int off);              return itype('h06, rs, 0, off); endfunction
  function automatic w_t bgtz (int rs, int off);              return itype('h07, rs, 0, off); endfunction
  function automatic w_t addi (int rt, int rs, int imm);      return itype('h08, rs, rt, imm); endfunction
  function automatic w_t addiu(int rt, int rs, int imm);      return itype('h09, rs, rt, imm); endfunction
  function automatic w_t slti (int rt, int rs, int imm);      return itype('h0A, rs, rt, imm); endfunction
  function automatic w_t sltiu(int rt, int rs, int imm);      return itype('h0B, rs, rt, imm); endfunction
  function automatic w_t andi (int rt, int rs, int imm);      return itype('h0C, rs, rt, imm); endfunction
  function automatic w_t ori  (int rt, int rs, int imm);      return itype('h0D, rs, rt, imm); endfunction
  function automatic w_t xori (int rt, int rs, int imm);      return itype('h0E, rs, rt, imm); endfunction
  function automatic w_t lui  (int rt, int imm);              return itype('h0F, 0, rt, imm); endfunction
  function automatic w_t mfc0 (int rt, int rd);               return {6'h10, 5'h00, 5'(rt), 5'(rd), 11'h0}; endfunction
  function automatic w_t mtc0 (int rt, int rd);               return {6'h10, 5'h04, 5'(rt), 5'(rd), 11'h0}; endfunction
  function automatic w_t rfe  ();                             return {6'h10, 1'b1, 19'h0, 6'h10}; endfunction
  function automatic w_t lb   (int rt, int off, int rs);      return itype('h20, rs, rt, off); endfunction
  function automatic w_t lh   (int rt, int off, int rs);      return itype('h21, rs, rt, off); endfunction
  function automatic w_t lw   (int rt, int off, int rs);      return itype('h23, rs, rt, off); endfunction
  function automatic w_t lbu  (int rt, int off, int rs);      return itype('h24, rs, rt, off); endfunction
  function automatic w_t lhu  (int rt, int off, int rs);      return itype('h25, rs, rt, off); endfunction
  function automatic w_t sb   (int rt, int off, int rs);      return itype('h28, rs, rt, off); endfunction
  function automatic w_t sh   (int rt, int off, int rs);      return itype('h29, rs, rt, off); endfunction
  function automatic w_t sw   (int rt, int off, int rs);      return itype('h2B, rs, rt, off); endfunction
endpackage
