// Instruction encoders for writing small MIPS32 test programs in
// testbenches.  Each function returns one 32-bit instruction word.
package mips_asm;
  function automatic logic [31:0] rtype(input int rs, rt, rd, sh, fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic logic [31:0] itype(input int op, rs, rt, imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] ADDU (input int rd, rs, rt); return rtype(rs, rt, rd, 0, 'h21); endfunction
  function automatic logic [31:0] SUBU (input int rd, rs, rt); return rtype(rs, rt, rd, 0, 'h23); endfunction
  function automatic logic [31:0] AND_ (input int rd, rs, rt); return rtype(rs, rt, rd, 0, 'h24); endfunction
  function automatic logic [31:0] OR_  (input int rd, rs, rt); return rtype(rs, rt, rd, 0, 'h25); endfunction
  function automatic logic [31:0] SLT  (input int rd, rs, rt); return rtype(rs, rt, rd, 0, 'h2a); endfunction
  function automatic logic [31:0] SLL  (input int rd, rt, sh); return rtype(0, rt, rd, sh, 'h00); endfunction
  function automatic logic [31:0] SRL  (input int rd, rt, sh); return rtype(0, rt, rd, sh, 'h02); endfunction
  function automatic logic [31:0] SRA  (input int rd, rt, sh); return rtype(0, rt, rd, sh, 'h03); endfunction
  function automatic logic [31:0] JR   (input int rs);         return rtype(rs, 0, 0, 0, 'h08); endfunction
  function automatic logic [31:0] MUL  (input int rd, rs, rt); return {6'h1c, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h02}; endfunction
  function automatic logic [31:0] ADDIU(input int rt, rs, imm); return itype('h09, rs, rt, imm); endfunction
  function automatic logic [31:0] ANDI (input int rt, rs, imm); return itype('h0c, rs, rt, imm); endfunction
  function automatic logic [31:0] ORI  (input int rt, rs, imm); return itype('h0d, rs, rt, imm); endfunction
  function automatic logic [31:0] LUI  (input int rt, imm);     return itype('h0f, 0, rt, imm); endfunction
  function automatic logic [31:0] LW   (input int rt, off, base); return itype('h23, base, rt, off); endfunction
  function automatic logic [31:0] SW   (input int rt, off, base); return itype('h2b, base, rt, off); endfunction
  function automatic logic [31:0] BEQ  (input int rs, rt, off); return itype('h04, rs, rt, off); endfunction
  function automatic logic [31:0] BNE  (input int rs, rt, off); return itype('h05, rs, rt, off); endfunction
  function automatic logic [31:0] J    (input int idx);         return {6'h02, 26'(idx)}; endfunction
  function automatic logic [31:0] JAL  (input int idx);         return {6'h03, 26'(idx)}; endfunction
  function automatic logic [31:0] NOP  ();                      return 32'h0; endfunction
endpackage
