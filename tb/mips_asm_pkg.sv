// mips_asm_pkg: instruction encoders used by the testbenches to build
// programs for the multithreaded processor (MIPS I field layout, plus the
// 3-operand MUL/MULH of this design). Branch offsets are in instructions,
// relative to the instruction after the branch, as in MIPS.
package mips_asm_pkg;
  function automatic logic [31:0] r_type(int fn, int rd, int rs, int rt, int sa = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sa), 6'(fn)};
  endfunction
  function automatic logic [31:0] i_type(int op, int rt, int rs, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] ADDU(int rd, int rs, int rt); return r_type('h21, rd, rs, rt); endfunction
  function automatic logic [31:0] SUBU(int rd, int rs, int rt); return r_type('h23, rd, rs, rt); endfunction
  function automatic logic [31:0] AND_(int rd, int rs, int rt); return r_type('h24, rd, rs, rt); endfunction
  function automatic logic [31:0] OR_ (int rd, int rs, int rt); return r_type('h25, rd, rs, rt); endfunction
  function automatic logic [31:0] XOR_(int rd, int rs, int rt); return r_type('h26, rd, rs, rt); endfunction
  function automatic logic [31:0] NOR_(int rd, int rs, int rt); return r_type('h27, rd, rs, rt); endfunction
  function automatic logic [31:0] SLT (int rd, int rs, int rt); return r_type('h2A, rd, rs, rt); endfunction
  function automatic logic [31:0] SLTU(int rd, int rs, int rt); return r_type('h2B, rd, rs, rt); endfunction
  function automatic logic [31:0] MUL (int rd, int rs, int rt); return r_type('h18, rd, rs, rt); endfunction
  function automatic logic [31:0] MULH(int rd, int rs, int rt); return r_type('h19, rd, rs, rt); endfunction
  function automatic logic [31:0] SLL (int rd, int rt, int sa); return r_type('h00, rd, 0, rt, sa); endfunction
  function automatic logic [31:0] SRL (int rd, int rt, int sa); return r_type('h02, rd, 0, rt, sa); endfunction
  function automatic logic [31:0] SRA (int rd, int rt, int sa); return r_type('h03, rd, 0, rt, sa); endfunction
  function automatic logic [31:0] SLLV(int rd, int rt, int rs); return r_type('h04, rd, rs, rt); endfunction
  function automatic logic [31:0] SRLV(int rd, int rt, int rs); return r_type('h06, rd, rs, rt); endfunction
  function automatic logic [31:0] SRAV(int rd, int rt, int rs); return r_type('h07, rd, rs, rt); endfunction
  function automatic logic [31:0] JR  (int rs);                 return r_type('h08, 0, rs, 0); endfunction
  function automatic logic [31:0] JALR(int rd, int rs);         return r_type('h09, rd, rs, 0); endfunction
  function automatic logic [31:0] ADDIU(int rt, int rs, int imm); return i_type('h09, rt, rs, imm); endfunction
  function automatic logic [31:0] SLTI (int rt, int rs, int imm); return i_type('h0A, rt, rs, imm); endfunction
  function automatic logic [31:0] SLTIU(int rt, int rs, int imm); return i_type('h0B, rt, rs, imm); endfunction
  function automatic logic [31:0] ANDI (int rt, int rs, int imm); return i_type('h0C, rt, rs, imm); endfunction
  function automatic logic [31:0] ORI  (int rt, int rs, int imm); return i_type('h0D, rt, rs, imm); endfunction
  function automatic logic [31:0] XORI (int rt, int rs, int imm); return i_type('h0E, rt, rs, imm); endfunction
  function automatic logic [31:0] LUI  (int rt, int imm);         return i_type('h0F, rt, 0, imm); endfunction
  function automatic logic [31:0] LW (int rt, int off, int rs); return i_type('h23, rt, rs, off); endfunction
  function automatic logic [31:0] LB (int rt, int off, int rs); return i_type('h20, rt, rs, off); endfunction
  function automatic logic [31:0] LBU(int rt, int off, int rs); return i_type('h24, rt, rs, off); endfunction
  function automatic logic [31:0] LH (int rt, int off, int rs); return i_type('h21, rt, rs, off); endfunction
  function automatic logic [31:0] LHU(int rt, int off, int rs); return i_type('h25, rt, rs, off); endfunction
  function automatic logic [31:0] SW (int rt, int off, int rs); return i_type('h2B, rt, rs, off); endfunction
  function automatic logic [31:0] SH (int rt, int off, int rs); return i_type('h29, rt, rs, off); endfunction
  function automatic logic [31:0] SB (int rt, int off, int rs); return i_type('h28, rt, rs, off); endfunction
  function automatic logic [31:0] BEQ (int rs, int rt, int off); return i_type('h04, rt, rs, off); endfunction
  function automatic logic [31:0] BNE (int rs, int rt, int off); return i_type('h05, rt, rs, off); endfunction
  function automatic logic [31:0] BLEZ(int rs, int off);         return i_type('h06, 0, rs, off); endfunction
  function automatic logic [31:0] BGTZ(int rs, int off);         return i_type('h07, 0, rs, off); endfunction
  function automatic logic [31:0] BLTZ(int rs, int off);         return i_type('h01, 0, rs, off); endfunction
  function automatic logic [31:0] BGEZ(int rs, int off);         return i_type('h01, 1, rs, off); endfunction
  function automatic logic [31:0] J   (int word_index);          return {6'h02, 26'(word_index)}; endfunction
  function automatic logic [31:0] JAL (int word_index);          return {6'h03, 26'(word_index)}; endfunction
  function automatic logic [31:0] NOP();                         return 32'h0; endfunction
endpackage
