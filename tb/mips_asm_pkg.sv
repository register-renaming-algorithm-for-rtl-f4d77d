// mips_asm_pkg: small MIPS-I instruction encoders used by the testbenches to
// build programs in SystemVerilog (no external files).
package mips_asm_pkg;
  function automatic logic [31:0] rtype(input int rs, rt, rd, sa, fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sa), 6'(fn)};
  endfunction
  function automatic logic [31:0] itype(input int op, rs, rt, input int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] addu (input int rd, rs, rt); return rtype(rs, rt, rd, 0, 'h21); endfunction
  function automatic logic [31:0] subu (input int rd, rs, rt); return rtype(rs, rt, rd, 0, 'h23); endfunction
  function automatic logic [31:0] and_ (input int rd, rs, rt); return rtype(rs, rt, rd, 0, 'h24); endfunction
  function automatic logic [31:0] or_  (input int rd, rs, rt); return rtype(rs, rt, rd, 0, 'h25); endfunction
  function automatic logic [31:0] xor_ (input int rd, rs, rt); return rtype(rs, rt, rd, 0, 'h26); endfunction
  function automatic logic [31:0] nor_ (input int rd, rs, rt); return rtype(rs, rt, rd, 0, 'h27); endfunction
  function automatic logic [31:0] slt  (input int rd, rs, rt); return rtype(rs, rt, rd, 0, 'h2a); endfunction
  function automatic logic [31:0] sltu (input int rd, rs, rt); return rtype(rs, rt, rd, 0, 'h2b); endfunction
  function automatic logic [31:0] sll  (input int rd, rt, sa); return rtype(0, rt, rd, sa, 'h00); endfunction
  function automatic logic [31:0] srl  (input int rd, rt, sa); return rtype(0, rt, rd, sa, 'h02); endfunction
  function automatic logic [31:0] sra  (input int rd, rt, sa); return rtype(0, rt, rd, sa, 'h03); endfunction
  function automatic logic [31:0] sllv (input int rd, rt, rs); return rtype(rs, rt, rd, 0, 'h04); endfunction
  function automatic logic [31:0] jr   (input int rs);         return rtype(rs, 0, 0, 0, 'h08); endfunction
  function automatic logic [31:0] jalr (input int rd, rs);     return rtype(rs, 0, rd, 0, 'h09); endfunction
  function automatic logic [31:0] mfhi (input int rd);         return rtype(0, 0, rd, 0, 'h10); endfunction
  function automatic logic [31:0] mflo (input int rd);         return rtype(0, 0, rd, 0, 'h12); endfunction
  function automatic logic [31:0] mult (input int rs, rt);     return rtype(rs, rt, 0, 0, 'h18); endfunction
  function automatic logic [31:0] multu(input int rs, rt);     return rtype(rs, rt, 0, 0, 'h19); endfunction
  function automatic logic [31:0] div  (input int rs, rt);     return rtype(rs, rt, 0, 0, 'h1a); endfunction
  function automatic logic [31:0] divu (input int rs, rt);     return rtype(rs, rt, 0, 0, 'h1b); endfunction
  function automatic logic [31:0] addiu(input int rt, rs, imm); return itype('h09, rs, rt, imm); endfunction
  function automatic logic [31:0] slti (input int rt, rs, imm); return itype('h0a, rs, rt, imm); endfunction
  function automatic logic [31:0] sltiu(input int rt, rs, imm); return itype('h0b, rs, rt, imm); endfunction
  function automatic logic [31:0] andi (input int rt, rs, imm); return itype('h0c, rs, rt, imm); endfunction
  function automatic logic [31:0] ori  (input int rt, rs, imm); return itype('h0d, rs, rt, imm); endfunction
  function automatic logic [31:0] xori (input int rt, rs, imm); return itype('h0e, rs, rt, imm); endfunction
  function automatic logic [31:0] lui  (input int rt, imm);     return itype('h0f, 0, rt, imm); endfunction
  function automatic logic [31:0] lw   (input int rt, off, base); return itype('h23, base, rt, off); endfunction
  function automatic logic [31:0] sw   (input int rt, off, base); return itype('h2b, base, rt, off); endfunction
  // branch offsets are in instructions, relative to the delay slot
  function automatic logic [31:0] beq  (input int rs, rt, off); return itype('h04, rs, rt, off); endfunction
  function automatic logic [31:0] bne  (input int rs, rt, off); return itype('h05, rs, rt, off); endfunction
  function automatic logic [31:0] blez (input int rs, off);     return itype('h06, rs, 0, off); endfunction
  function automatic logic [31:0] bgtz (input int rs, off);     return itype('h07, rs, 0, off); endfunction
  function automatic logic [31:0] bltz (input int rs, off);     return itype('h01, rs, 0, off); endfunction
  function automatic logic [31:0] bgez (input int rs, off);     return itype('h01, rs, 1, off); endfunction
  function automatic logic [31:0] j    (input logic [31:0] target); return {6'h02, target[27:2]}; endfunction
  function automatic logic [31:0] jal  (input logic [31:0] target); return {6'h03, target[27:2]}; endfunction
  localparam logic [31:0] NOP = 32'd0;
endpackage
