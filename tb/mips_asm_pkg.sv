// mips_asm_pkg: MIPS I instruction encoders for writing test programs.
//
// Each function returns the 32-bit machine word of one instruction, following
// the standard MIPS I encodings (R-type: op rs rt rd shamt funct; I-type: op rs
// rt imm16; J-type: op target26). Branch offsets are given in instructions,
// relative to the delay slot, as the hardware applies them.
// The encodings are the standard MIPS I ones; the function names are this package's.
package mips_asm_pkg;

  function automatic logic [31:0] r_type(int rs, int rt, int rd, int sh, int fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic logic [31:0] i_type(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] nop();                 return 32'h0; endfunction
  function automatic logic [31:0] sll (int rd, int rt, int sh); return r_type(0, rt, rd, sh, 6'h00); endfunction
  function automatic logic [31:0] srl (int rd, int rt, int sh); return r_type(0, rt, rd, sh, 6'h02); endfunction
  function automatic logic [31:0] sra (int rd, int rt, int sh); return r_type(0, rt, rd, sh, 6'h03); endfunction
  function automatic logic [31:0] sllv(int rd, int rt, int rs); return r_type(rs, rt, rd, 0, 6'h04); endfunction
  function automatic logic [31:0] srav(int rd, int rt, int rs); return r_type(rs, rt, rd, 0, 6'h07); endfunction
  function automatic logic [31:0] jr  (int rs);                 return r_type(rs, 0, 0, 0, 6'h08); endfunction
  function automatic logic [31:0] jalr(int rd, int rs);         return r_type(rs, 0, rd, 0, 6'h09); endfunction
  function automatic logic [31:0] syscall();                    return r_type(0, 0, 0, 0, 6'h0C); endfunction
  function automatic logic [31:0] mfhi(int rd);                 return r_type(0, 0, rd, 0, 6'h10); endfunction
  function automatic logic [31:0] mthi(int rs);                 return r_type(rs, 0, 0, 0, 6'h11); endfunction
  function automatic logic [31:0] mflo(int rd);                 return r_type(0, 0, rd, 0, 6'h12); endfunction
  function automatic logic [31:0] mtlo(int rs);                 return r_type(rs, 0, 0, 0, 6'h13); endfunction
  function automatic logic [31:0] mult_(int rs, int rt);        return r_type(rs, rt, 0, 0, 6'h18); endfunction
  function automatic logic [31:0] multu(int rs, int rt);        return r_type(rs, rt, 0, 0, 6'h19); endfunction
  function automatic logic [31:0] div_ (int rs, int rt);        return r_type(rs, rt, 0, 0, 6'h1A); endfunction
  function automatic logic [31:0] divu (int rs, int rt);        return r_type(rs, rt, 0, 0, 6'h1B); endfunction
  function automatic logic [31:0] addu(int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h21); endfunction
  function automatic logic [31:0] subu(int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h23); endfunction
  function automatic logic [31:0] and_(int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h24); endfunction
  function automatic logic [31:0] or_ (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h25); endfunction
  function automatic logic [31:0] xor_(int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h26); endfunction
  function automatic logic [31:0] nor_(int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h27); endfunction
  function automatic logic [31:0] slt (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h2A); endfunction
  function automatic logic [31:0] sltu(int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h2B); endfunction
  function automatic logic [31:0] bltz(int rs, int off);        return i_type(6'h01, rs, 0, off); endfunction
  function automatic logic [31:0] bgez(int rs, int off);        return i_type(6'h01, rs, 1, off); endfunction
  function automatic logic [31:0] bgezal(int rs, int off);      return i_type(6'h01, rs, 17, off); endfunction
  function automatic logic [31:0] j   (int target_byte);        return {6'h02, 26'(target_byte >> 2)}; endfunction
  function automatic logic [31:0] jal (int target_byte);        return {6'h03, 26'(target_byte >> 2)}; endfunction
  function automatic logic [31:0] beq (int rs, int rt, int off); return i_type(6'h04, rs, rt, off); endfunction
  function automatic logic [31:0] bne (int rs, int rt, int off); return i_type(6'h05, rs, rt, off); endfunction
  function automatic logic [31:0] blez(int rs, int off);        return i_type(6'h06, rs, 0, off); endfunction
  function automatic logic [31:0] bgtz(int rs, int off);        return i_type(6'h07, rs, 0, off); endfunction
  function automatic logic [31:0] addiu(int rt, int rs, int imm); return i_type(6'h09, rs, rt, imm); endfunction
  function automatic logic [31:0] slti (int rt, int rs, int imm); return i_type(6'h0A, rs, rt, imm); endfunction
  function automatic logic [31:0] sltiu(int rt, int rs, int imm); return i_type(6'h0B, rs, rt, imm); endfunction
  function automatic logic [31:0] andi (int rt, int rs, int imm); return i_type(6'h0C, rs, rt, imm); endfunction
  function automatic logic [31:0] ori  (int rt, int rs, int imm); return i_type(6'h0D, rs, rt, imm); endfunction
  function automatic logic [31:0] xori (int rt, int rs, int imm); return i_type(6'h0E, rs, rt, imm); endfunction
  function automatic logic [31:0] lui  (int rt, int imm);         return i_type(6'h0F, 0, rt, imm); endfunction
  function automatic logic [31:0] mfc0 (int rt, int rd);          return {6'h10, 5'd0, 5'(rt), 5'(rd), 11'd0}; endfunction
  function automatic logic [31:0] mtc0 (int rt, int rd);          return {6'h10, 5'd4, 5'(rt), 5'(rd), 11'd0}; endfunction
  function automatic logic [31:0] lb   (int rt, int imm, int rs); return i_type(6'h20, rs, rt, imm); endfunction
  function automatic logic [31:0] lh   (int rt, int imm, int rs); return i_type(6'h21, rs, rt, imm); endfunction
  function automatic logic [31:0] lw   (int rt, int imm, int rs); return i_type(6'h23, rs, rt, imm); endfunction
  function automatic logic [31:0] lbu  (int rt, int imm, int rs); return i_type(6'h24, rs, rt, imm); endfunction
  function automatic logic [31:0] lhu  (int rt, int imm, int rs); return i_type(6'h25, rs, rt, imm); endfunction
  function automatic logic [31:0] sb   (int rt, int imm, int rs); return i_type(6'h28, rs, rt, imm); endfunction
  function automatic logic [31:0] sh   (int rt, int imm, int rs); return i_type(6'h29, rs, rt, imm); endfunction
  function automatic logic [31:0] sw   (int rt, int imm, int rs); return i_type(6'h2B, rs, rt, imm); endfunction

endpackage
