// Tiny MIPS assembler for testbenches: each function returns one encoded
// 32-bit instruction, so test programs can be written as readable lists.
// Register arguments are register numbers 0-31; immediates are 16-bit.
package mips_asm_pkg;
  function automatic logic [31:0] r_type(input int rs, rt, rd, sh, fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic logic [31:0] i_type(input int op, rs, rt, input int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] addu (input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h21); endfunction
  function automatic logic [31:0] subu (input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h23); endfunction
  function automatic logic [31:0] and_ (input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h24); endfunction
  function automatic logic [31:0] or_  (input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h25); endfunction
  function automatic logic [31:0] xor_ (input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h26); endfunction
  function automatic logic [31:0] nor_ (input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h27); endfunction
  function automatic logic [31:0] slt  (input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h2A); endfunction
  function automatic logic [31:0] sltu (input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h2B); endfunction
  function automatic logic [31:0] sll  (input int rd, rt, sh);  return r_type(0, rt, rd, sh, 'h00); endfunction
  function automatic logic [31:0] srl  (input int rd, rt, sh);  return r_type(0, rt, rd, sh, 'h02); endfunction
  function automatic logic [31:0] sra  (input int rd, rt, sh);  return r_type(0, rt, rd, sh, 'h03); endfunction
  function automatic logic [31:0] sllv (input int rd, rt, rs);  return r_type(rs, rt, rd, 0, 'h04); endfunction
  function automatic logic [31:0] srlv (input int rd, rt, rs);  return r_type(rs, rt, rd, 0, 'h06); endfunction
  function automatic logic [31:0] jr   (input int rs);          return r_type(rs, 0, 0, 0, 'h08); endfunction
  function automatic logic [31:0] jalr (input int rd, rs);      return r_type(rs, 0, rd, 0, 'h09); endfunction
  function automatic logic [31:0] mfhi (input int rd);          return r_type(0, 0, rd, 0, 'h10); endfunction
  function automatic logic [31:0] mflo (input int rd);          return r_type(0, 0, rd, 0, 'h12); endfunction
  function automatic logic [31:0] mthi (input int rs);          return r_type(rs, 0, 0, 0, 'h11); endfunction
  function automatic logic [31:0] mult (input int rs, rt);      return r_type(rs, rt, 0, 0, 'h18); endfunction
  function automatic logic [31:0] multu(input int rs, rt);      return r_type(rs, rt, 0, 0, 'h19); endfunction
  function automatic logic [31:0] addiu(input int rt, rs, imm); return i_type('h09, rs, rt, imm); endfunction
  function automatic logic [31:0] slti (input int rt, rs, imm); return i_type('h0A, rs, rt, imm); endfunction
  function automatic logic [31:0] andi (input int rt, rs, imm); return i_type('h0C, rs, rt, imm); endfunction
  function automatic logic [31:0] ori  (input int rt, rs, imm); return i_type('h0D, rs, rt, imm); endfunction
  function automatic logic [31:0] lui  (input int rt, imm);     return i_type('h0F, 0, rt, imm); endfunction
  function automatic logic [31:0] lw   (input int rt, imm, rs); return i_type('h23, rs, rt, imm); endfunction
  function automatic logic [31:0] lb   (input int rt, imm, rs); return i_type('h20, rs, rt, imm); endfunction
  function automatic logic [31:0] lbu  (input int rt, imm, rs); return i_type('h24, rs, rt, imm); endfunction
  function automatic logic [31:0] lh   (input int rt, imm, rs); return i_type('h21, rs, rt, imm); endfunction
  function automatic logic [31:0] lhu  (input int rt, imm, rs); return i_type('h25, rs, rt, imm); endfunction
  function automatic logic [31:0] sw   (input int rt, imm, rs); return i_type('h2B, rs, rt, imm); endfunction
  function automatic logic [31:0] sh   (input int rt, imm, rs); return i_type('h29, rs, rt, imm); endfunction
  function automatic logic [31:0] sb   (input int rt, imm, rs); return i_type('h28, rs, rt, imm); endfunction
  // branch offsets are in instructions, relative to the delay slot
  function automatic logic [31:0] beq  (input int rs, rt, off); return i_type('h04, rs, rt, off); endfunction
  function automatic logic [31:0] bne  (input int rs, rt, off); return i_type('h05, rs, rt, off); endfunction
  function automatic logic [31:0] blez (input int rs, off);     return i_type('h06, rs, 0, off); endfunction
  function automatic logic [31:0] bgtz (input int rs, off);     return i_type('h07, rs, 0, off); endfunction
  function automatic logic [31:0] bltz (input int rs, off);     return i_type('h01, rs, 0, off); endfunction
  function automatic logic [31:0] bgez (input int rs, off);     return i_type('h01, rs, 1, off); endfunction
  function automatic logic [31:0] bgezal(input int rs, off);    return i_type('h01, rs, 'h11, off); endfunction
  function automatic logic [31:0] j    (input int byte_addr);   return {6'h02, 26'(byte_addr >> 2)}; endfunction
  function automatic logic [31:0] jal  (input int byte_addr);   return {6'h03, 26'(byte_addr >> 2)}; endfunction
  function automatic logic [31:0] mfc0 (input int rt, rd);      return {6'h10, 5'h00, 5'(rt), 5'(rd), 11'h0}; endfunction
  function automatic logic [31:0] mtc0 (input int rt, rd);      return {6'h10, 5'h04, 5'(rt), 5'(rd), 11'h0}; endfunction
  function automatic logic [31:0] eret ();                      return 32'h4200_0018; endfunction
  function automatic logic [31:0] nop  ();                      return 32'h0000_0000; endfunction
endpackage
