// alu: LC-3 arithmetic/logic unit.
//
// Operand A is the SR1 register output. Operand B is, when IR[5] is 1, the
// 5-bit immediate IR[4:0] sign-extended, and otherwise SR2. ALUK picks
// ADD, AND, NOT A or PASS A. Combinational. The lecture design shows the
// unit and its place between the register file and the bus; the operations
// are those of the LC-3 instruction set.
module alu
  import lc3_pkg::*;
(
  input  word_t  a,
  input  word_t  sr2,
  input  word_t  ir,
  input  aluk_e  aluk,
  output word_t  y
);
  word_t b;
  assign b = ir[5] ? {{11{ir[4]}}, ir[4:0]} : sr2;

  always_comb begin
    unique case (aluk)
      ALU_ADD:   y = a + b;
      ALU_AND:   y = a & b;
      ALU_NOT:   y = ~a;
      ALU_PASSA: y = a;
    endcase
  end
endmodule
