// tz_asm_pkg: instruction encoders for the testbenches (MIPS32 field layout,
// with the core's own encodings for mul/div/rem, see tz_core).
package tz_asm_pkg;
  function automatic logic [31:0] r_type(input int rs, input int rt, input int rd,
                                         input int sh, input logic [5:0] fn, input logic [5:0] op = 6'h00);
    return {op, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] i_type(input logic [5:0] op, input int rs, input int rt, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] ADDU(int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h21); endfunction
  function automatic logic [31:0] SUBU(int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h23); endfunction
  function automatic logic [31:0] AND_(int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h24); endfunction
  function automatic logic [31:0] OR_ (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h25); endfunction
  function automatic logic [31:0] XOR_(int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h26); endfunction
  function automatic logic [31:0] NOR_(int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h27); endfunction
  function automatic logic [31:0] SLT (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h2a); endfunction
  function automatic logic [31:0] SLTU(int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h2b); endfunction
  function automatic logic [31:0] SLL (int rd, int rt, int sh); return r_type(0, rt, rd, sh, 6'h00); endfunction
  function automatic logic [31:0] SRL (int rd, int rt, int sh); return r_type(0, rt, rd, sh, 6'h02); endfunction
  function automatic logic [31:0] SRA (int rd, int rt, int sh); return r_type(0, rt, rd, sh, 6'h03); endfunction
  function automatic logic [31:0] SLLV(int rd, int rt, int rs); return r_type(rs, rt, rd, 0, 6'h04); endfunction
  function automatic logic [31:0] SRLV(int rd, int rt, int rs); return r_type(rs, rt, rd, 0, 6'h06); endfunction
  function automatic logic [31:0] SRAV(int rd, int rt, int rs); return r_type(rs, rt, rd, 0, 6'h07); endfunction
  function automatic logic [31:0] JR  (int rs);                 return r_type(rs, 0, 0, 0, 6'h08); endfunction
  function automatic logic [31:0] JALR(int rd, int rs);         return r_type(rs, 0, rd, 0, 6'h09); endfunction
  function automatic logic [31:0] MUL (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h02, 6'h1c); endfunction
  function automatic logic [31:0] DIV (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h1a, 6'h1c); endfunction
  function automatic logic [31:0] DIVU(int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h1b, 6'h1c); endfunction
  function automatic logic [31:0] REM (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h1e, 6'h1c); endfunction
  function automatic logic [31:0] REMU(int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h1f, 6'h1c); endfunction
  function automatic logic [31:0] ADDIU(int rt, int rs, int imm); return i_type(6'h09, rs, rt, imm); endfunction
  function automatic logic [31:0] SLTI (int rt, int rs, int imm); return i_type(6'h0a, rs, rt, imm); endfunction
  function automatic logic [31:0] SLTIU(int rt, int rs, int imm); return i_type(6'h0b, rs, rt, imm); endfunction
  function automatic logic [31:0] ANDI (int rt, int rs, int imm); return i_type(6'h0c, rs, rt, imm); endfunction
  function automatic logic [31:0] ORI  (int rt, int rs, int imm); return i_type(6'h0d, rs, rt, imm); endfunction
  function automatic logic [31:0] XORI (int rt, int rs, int imm); return i_type(6'h0e, rs, rt, imm); endfunction
  function automatic logic [31:0] LB (int rt, int off, int rs); return i_type(6'h20, rs, rt, off); endfunction
  function automatic logic [31:0] LH (int rt, int off, int rs); return i_type(6'h21, rs, rt, off); endfunction
  function automatic logic [31:0] LW (int rt, int off, int rs); return i_type(6'h23, rs, rt, off); endfunction
  function automatic logic [31:0] LBU(int rt, int off, int rs); return i_type(6'h24, rs, rt, off); endfunction
  function automatic logic [31:0] LHU(int rt, int off, int rs); return i_type(6'h25, rs, rt, off); endfunction
  function automatic logic [31:0] SB (int rt, int off, int rs); return i_type(6'h28, rs, rt, off); endfunction
  function automatic logic [31:0] SH (int rt, int off, int rs); return i_type(6'h29, rs, rt, off); endfunction
  function automatic logic [31:0] SW (int rt, int off, int rs); return i_type(6'h2b, rs, rt, off); endfunction
  // branch offsets are in instructions, relative to the next instruction
  function automatic logic [31:0] BEQ (int rs, int rt, int off); return i_type(6'h04, rs, rt, off); endfunction
  function automatic logic [31:0] BNE (int rs, int rt, int off); return i_type(6'h05, rs, rt, off); endfunction
  function automatic logic [31:0] BLEZ(int rs, int off);         return i_type(6'h06, rs, 0, off); endfunction
  function automatic logic [31:0] BGTZ(int rs, int off);         return i_type(6'h07, rs, 0, off); endfunction
  function automatic logic [31:0] BLTZ(int rs, int off);         return i_type(6'h01, rs, 0, off); endfunction
  function automatic logic [31:0] BGEZ(int rs, int off);         return i_type(6'h01, rs, 1, off); endfunction
  function automatic logic [31:0] J  (logic [31:0] target); return {6'h02, target[27:2]}; endfunction
  function automatic logic [31:0] JAL(logic [31:0] target); return {6'h03, target[27:2]}; endfunction
  function automatic logic [31:0] MFC0(int rt); return {6'h10, 5'd0, 5'(rt), 5'd0, 11'd0}; endfunction
  function automatic logic [31:0] MTC0(int rt); return {6'h10, 5'd4, 5'(rt), 5'd0, 11'd0}; endfunction
  function automatic logic [31:0] NOP(); return 32'h0000_0000; endfunction
endpackage
