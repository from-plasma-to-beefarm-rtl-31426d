// mips_asm_pkg: instruction encoders used by the testbenches to build small
// MIPS programs in memory (standard MIPS I/R4000 encodings).
package mips_asm_pkg;
  function automatic logic [31:0] r_type(input int rs, rt, rd, sh, fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic logic [31:0] i_type(input int op, rs, rt, input logic [15:0] imm);
    return {6'(op), 5'(rs), 5'(rt), imm};
  endfunction
  function automatic logic [31:0] ADDU(input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h21); endfunction
  function automatic logic [31:0] SUBU(input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h23); endfunction
  function automatic logic [31:0] AND_(input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h24); endfunction
  function automatic logic [31:0] OR_ (input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h25); endfunction
  function automatic logic [31:0] SLT (input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h2A); endfunction
  function automatic logic [31:0] SLL (input int rd, rt, sh); return r_type(0, rt, rd, sh, 'h00); endfunction
  function automatic logic [31:0] SRA (input int rd, rt, sh); return r_type(0, rt, rd, sh, 'h03); endfunction
  function automatic logic [31:0] JR  (input int rs); return r_type(rs, 0, 0, 0, 'h08); endfunction
  function automatic logic [31:0] JALR(input int rd, rs); return r_type(rs, 0, rd, 0, 'h09); endfunction
  function automatic logic [31:0] SYSCALL(); return r_type(0, 0, 0, 0, 'h0C); endfunction
  function automatic logic [31:0] MFHI(input int rd); return r_type(0, 0, rd, 0, 'h10); endfunction
  function automatic logic [31:0] MFLO(input int rd); return r_type(0, 0, rd, 0, 'h12); endfunction
  function automatic logic [31:0] MULT(input int rs, rt); return r_type(rs, rt, 0, 0, 'h18); endfunction
  function automatic logic [31:0] DIV (input int rs, rt); return r_type(rs, rt, 0, 0, 'h1A); endfunction
  function automatic logic [31:0] ADDIU(input int rt, rs, input int imm); return i_type('h09, rs, rt, 16'(imm)); endfunction
  function automatic logic [31:0] ORI  (input int rt, rs, input int imm); return i_type('h0D, rs, rt, 16'(imm)); endfunction
  function automatic logic [31:0] LUI  (input int rt, input int imm); return i_type('h0F, 0, rt, 16'(imm)); endfunction
  function automatic logic [31:0] BEQ  (input int rs, rt, input int off); return i_type('h04, rs, rt, 16'(off)); endfunction
  function automatic logic [31:0] BNE  (input int rs, rt, input int off); return i_type('h05, rs, rt, 16'(off)); endfunction
  function automatic logic [31:0] J    (input logic [31:0] addr); return {6'h02, addr[27:2]}; endfunction
  function automatic logic [31:0] JAL  (input logic [31:0] addr); return {6'h03, addr[27:2]}; endfunction
  function automatic logic [31:0] LW   (input int rt, rs, input int off); return i_type('h23, rs, rt, 16'(off)); endfunction
  function automatic logic [31:0] LB   (input int rt, rs, input int off); return i_type('h20, rs, rt, 16'(off)); endfunction
  function automatic logic [31:0] LHU  (input int rt, rs, input int off); return i_type('h25, rs, rt, 16'(off)); endfunction
  function automatic logic [31:0] SW   (input int rt, rs, input int off); return i_type('h2B, rs, rt, 16'(off)); endfunction
  function automatic logic [31:0] SB   (input int rt, rs, input int off); return i_type('h28, rs, rt, 16'(off)); endfunction
  function automatic logic [31:0] LL   (input int rt, rs, input int off); return i_type('h30, rs, rt, 16'(off)); endfunction
  function automatic logic [31:0] SC   (input int rt, rs, input int off); return i_type('h38, rs, rt, 16'(off)); endfunction
  function automatic logic [31:0] MFC0 (input int rt, rd); return {6'h10, 5'h00, 5'(rt), 5'(rd), 11'h0}; endfunction
  function automatic logic [31:0] MTC0 (input int rt, rd); return {6'h10, 5'h04, 5'(rt), 5'(rd), 11'h0}; endfunction
  function automatic logic [31:0] TLBWI(); return 32'h4200_0002; endfunction
  function automatic logic [31:0] TLBP (); return 32'h4200_0008; endfunction
  function automatic logic [31:0] ERET (); return 32'h4200_0018; endfunction
  function automatic logic [31:0] NOP  (); return 32'h0000_0000; endfunction
endpackage
