// reg_file: eight 16-bit general registers R0..R7 with the DRMUX and SR1MUX
// selectors of the interrupt-capable LC-3.
//
// DRMUX picks the destination: 00 IR[11:9], 01 R7 (3'b111), 10 R6/SP
// (3'b110). SR1MUX picks the first source: 00 IR[11:9], 01 IR[8:6], 10 R6/SP.
// The second source is always IR[2:0]. The R6 and R7 selections are
// constant register numbers, so the hardware can reach the stack pointer and
// the link register whatever the instruction holds. Both tables follow the
// lecture design. Reads are combinational; a write happens at the rising
// edge when ld_reg is high. Registers reset to 0 (this design's choice).
module reg_file
  import lc3_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  word_t    ir,
  input  drmux_e   drmux,
  input  sr1mux_e  sr1mux,
  input  logic     ld_reg,
  input  word_t    din,
  output word_t    sr1_out,
  output word_t    sr2_out
);
  word_t      regs [8];
  logic [2:0] dr, sr1;

  always_comb begin
    unique case (drmux)
      DR_IR119: dr = ir[11:9];
      DR_R7:    dr = 3'b111;
      default:  dr = 3'b110;
    endcase
    unique case (sr1mux)
      SR1_IR119: sr1 = ir[11:9];
      SR1_IR86:  sr1 = ir[8:6];
      default:   sr1 = 3'b110;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) regs[i] <= '0;
    end else if (ld_reg) begin
      regs[dr] <= din;
    end
  end

  assign sr1_out = regs[sr1];
  assign sr2_out = regs[ir[2:0]];
endmodule
