// eecs_asm_pkg: instruction assembler functions for the E.E.C.S. testbenches.
// Each function returns the 16-bit encoding of one instruction, so that test
// programs can be written as readable lists of calls. Register arguments are
// register numbers 0..7; imm and disp are 8-bit fields.
package eecs_asm_pkg;
  import eecs_pkg::*;

  function automatic logic [15:0] rr(input logic [3:0] ex, input int rd, input int rs);
    return {OP_REG, 1'b0, 3'(rd), ex, 1'b0, 3'(rs)};
  endfunction
  function automatic logic [15:0] ri(input logic [3:0] op, input int rd, input int imm);
    return {op, 1'b0, 3'(rd), 8'(imm)};
  endfunction
  function automatic logic [15:0] ADD (input int rd, input int rs); return rr(EX_ADD, rd, rs); endfunction
  function automatic logic [15:0] SUB (input int rd, input int rs); return rr(EX_SUB, rd, rs); endfunction
  function automatic logic [15:0] CMP (input int rd, input int rs); return rr(EX_CMP, rd, rs); endfunction
  function automatic logic [15:0] AND_(input int rd, input int rs); return rr(EX_AND, rd, rs); endfunction
  function automatic logic [15:0] OR_ (input int rd, input int rs); return rr(EX_OR,  rd, rs); endfunction
  function automatic logic [15:0] XOR_(input int rd, input int rs); return rr(EX_XOR, rd, rs); endfunction
  function automatic logic [15:0] MOV (input int rd, input int rs); return rr(EX_MOV, rd, rs); endfunction
  function automatic logic [15:0] ADDI(input int rd, input int imm); return ri(OP_ADDI, rd, imm); endfunction
  function automatic logic [15:0] SUBI(input int rd, input int imm); return ri(OP_SUBI, rd, imm); endfunction
  function automatic logic [15:0] CMPI(input int rd, input int imm); return ri(OP_CMPI, rd, imm); endfunction
  function automatic logic [15:0] ANDI(input int rd, input int imm); return ri(OP_ANDI, rd, imm); endfunction
  function automatic logic [15:0] ORI (input int rd, input int imm); return ri(OP_ORI,  rd, imm); endfunction
  function automatic logic [15:0] XORI(input int rd, input int imm); return ri(OP_XORI, rd, imm); endfunction
  function automatic logic [15:0] MOVI(input int rd, input int imm); return ri(OP_MOVI, rd, imm); endfunction
  function automatic logic [15:0] LUI (input int rd, input int imm); return ri(OP_LUI,  rd, imm); endfunction
  function automatic logic [15:0] LSH (input int rd, input int rs);
    return {OP_SHFT, 1'b0, 3'(rd), EX_LSH, 1'b0, 3'(rs)};
  endfunction
  function automatic logic [15:0] LSHI(input int rd, input bit right, input int amt);
    return {OP_SHFT, 1'b0, 3'(rd), 3'b000, right, 4'(amt)};
  endfunction
  function automatic logic [15:0] LD  (input int rd, input int ra); return {OP_SPEC, 1'b0, 3'(rd), EX_LD, 1'b0, 3'(ra)}; endfunction
  function automatic logic [15:0] ST  (input int rs, input int ra); return {OP_SPEC, 1'b0, 3'(rs), EX_ST, 1'b0, 3'(ra)}; endfunction
  function automatic logic [15:0] JAL (input int rl, input int rt); return {OP_SPEC, 1'b0, 3'(rl), EX_JAL, 1'b0, 3'(rt)}; endfunction
  function automatic logic [15:0] JCND(input cond_e cc, input int rt); return {OP_SPEC, cc, EX_JCND, 1'b0, 3'(rt)}; endfunction
  function automatic logic [15:0] BCND(input cond_e cc, input int disp); return {OP_BCND, cc, 8'(disp)}; endfunction
  function automatic logic [15:0] EI  (); return {OP_SPEC, 4'h0, EX_EI,   4'h0}; endfunction
  function automatic logic [15:0] DI  (); return {OP_SPEC, 4'h0, EX_DI,   4'h0}; endfunction
  function automatic logic [15:0] RETX(); return {OP_SPEC, 4'h0, EX_RETX, 4'h0}; endfunction
  function automatic logic [15:0] SEND(input int raddr, input int rdata);
    return {OP_SPEC, 1'b0, 3'(raddr), EX_SEND, 1'b0, 3'(rdata)};
  endfunction
  function automatic logic [15:0] RECV(input int rbase); return {OP_SPEC, 1'b0, 3'(rbase), EX_RECV, 4'h0}; endfunction
  function automatic logic [15:0] NOP (); return 16'h0000; endfunction
endpackage
