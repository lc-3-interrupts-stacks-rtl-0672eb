// stack_ops: stack-pointer unit of the LC-3 (the "stackOps" box).
//
// Its input is the register-file SR1 output, which the control points at
// R6 (the stack pointer). It keeps the two saved stack pointers, Saved_SSP
// (supervisor) and Saved_USP (user), each a 16-bit register that loads the
// input on LD_SavedSSP / LD_SavedUSP. SPMUX picks the unit's output, which
// the GateSP driver puts on the system bus:
//   00 SP+1   01 SP-1   10 Saved_SSP   11 Saved_USP
// The structure and SPMUX encoding follow the lecture design. The reset
// value of Saved_SSP is a parameter (the supervisor stack start, x3000 by
// default, this design's choice); Saved_USP resets to 0.
module stack_ops
  import lc3_pkg::*;
#(
  parameter word_t SSP_INIT = 16'h3000
) (
  input  logic    clk,
  input  logic    rst,
  input  word_t   sp_in,
  input  spmux_e  spmux,
  input  logic    ld_saved_ssp,
  input  logic    ld_saved_usp,
  output word_t   sp_out,
  output word_t   saved_ssp,
  output word_t   saved_usp
);
  always_ff @(posedge clk) begin
    if (rst) begin
      saved_ssp <= SSP_INIT;
      saved_usp <= '0;
    end else begin
      if (ld_saved_ssp) saved_ssp <= sp_in;
      if (ld_saved_usp) saved_usp <= sp_in;
    end
  end

  always_comb begin
    unique case (spmux)
      SP_INC: sp_out = sp_in + 16'd1;
      SP_DEC: sp_out = sp_in - 16'd1;
      SP_SSP: sp_out = saved_ssp;
      SP_USP: sp_out = saved_usp;
    endcase
  end
endmodule
