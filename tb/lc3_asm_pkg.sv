// lc3_asm_pkg: tiny LC-3 assembler helpers for the testbenches.
//
// Each function returns the 16-bit encoding of one instruction. Offsets are
// PC-relative word offsets as the instruction holds them; off() computes
// such an offset from the address of the instruction and of its target.
package lc3_asm_pkg;
  typedef logic [15:0] w16;

  function automatic w16 off(input w16 at, input w16 target);
    return target - (at + 16'd1);
  endfunction

  function automatic w16 ADDr(input int dr, sr1, sr2);
    return {4'b0001, 3'(dr), 3'(sr1), 3'b000, 3'(sr2)};
  endfunction
  function automatic w16 ADDi(input int dr, sr1, imm);
    return {4'b0001, 3'(dr), 3'(sr1), 1'b1, 5'(imm)};
  endfunction
  function automatic w16 ANDi(input int dr, sr1, imm);
    return {4'b0101, 3'(dr), 3'(sr1), 1'b1, 5'(imm)};
  endfunction
  function automatic w16 NOT_(input int dr, sr);
    return {4'b1001, 3'(dr), 3'(sr), 6'b111111};
  endfunction
  function automatic w16 LD(input int dr, input w16 o);
    return {4'b0010, 3'(dr), o[8:0]};
  endfunction
  function automatic w16 LDI(input int dr, input w16 o);
    return {4'b1010, 3'(dr), o[8:0]};
  endfunction
  function automatic w16 ST(input int sr, input w16 o);
    return {4'b0011, 3'(sr), o[8:0]};
  endfunction
  function automatic w16 STI(input int sr, input w16 o);
    return {4'b1011, 3'(sr), o[8:0]};
  endfunction
  function automatic w16 LDR(input int dr, base, o6);
    return {4'b0110, 3'(dr), 3'(base), 6'(o6)};
  endfunction
  function automatic w16 STR(input int sr, base, o6);
    return {4'b0111, 3'(sr), 3'(base), 6'(o6)};
  endfunction
  function automatic w16 LEA(input int dr, input w16 o);
    return {4'b1110, 3'(dr), o[8:0]};
  endfunction
  function automatic w16 BR(input logic [2:0] nzp, input w16 o);
    return {4'b0000, nzp, o[8:0]};
  endfunction
  function automatic w16 JSR(input w16 o);
    return {5'b01001, o[10:0]};
  endfunction
  function automatic w16 JMP(input int base);
    return {4'b1100, 3'b000, 3'(base), 6'b0};
  endfunction
  function automatic w16 TRAP(input logic [7:0] v);
    return {4'b1111, 4'b0000, v};
  endfunction
  localparam w16 RET = 16'hC1C0;
  localparam w16 RTI = 16'h8000;
  localparam w16 ILLEGAL = 16'hD000;
endpackage
