// tb_stack_ops: checks SPMUX selections (SP+1, SP-1, Saved_SSP, Saved_USP)
// and the loads of the two saved stack pointers, including the lecture's
// example values (user SP x4000, supervisor SP x2FF5).
module tb_stack_ops;
  import lc3_pkg::*;
  logic clk = 0, rst = 1;
  word_t sp_in = '0, sp_out, saved_ssp, saved_usp;
  spmux_e spmux = SP_INC;
  logic ld_saved_ssp = 0, ld_saved_usp = 0;
  int checks = 0, failures = 0;

  stack_ops dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  word_t essp, eusp, e;
  initial begin
    @(posedge clk); #1 rst = 0;
    check(saved_ssp == 16'h3000 && saved_usp == 16'h0000, "reset values");
    // interrupt entry from user mode: Saved_USP <- SP, SP <- Saved_SSP
    sp_in = 16'h4000; ld_saved_usp = 1; spmux = SP_SSP; #1;
    check(sp_out == 16'h3000, "SPMUX 10 selects Saved_SSP");
    @(posedge clk); #1 ld_saved_usp = 0;
    check(saved_usp == 16'h4000, "Saved_USP loaded");
    sp_in = 16'h2FF5; ld_saved_ssp = 1; spmux = SP_USP; #1;
    check(sp_out == 16'h4000, "SPMUX 11 selects Saved_USP");
    @(posedge clk); #1 ld_saved_ssp = 0;
    check(saved_ssp == 16'h2FF5, "Saved_SSP loaded");
    essp = saved_ssp; eusp = saved_usp;
    for (int i = 0; i < 300; i++) begin
      sp_in = 16'($urandom); spmux = spmux_e'($urandom % 4);
      ld_saved_ssp = ($urandom % 4) == 0; ld_saved_usp = ($urandom % 4) == 0;
      #1;
      case (spmux)
        SP_INC: e = sp_in + 1;
        SP_DEC: e = sp_in - 1;
        SP_SSP: e = essp;
        default: e = eusp;
      endcase
      check(sp_out == e, "SPMUX output");
      if (ld_saved_ssp) essp = sp_in;
      if (ld_saved_usp) eusp = sp_in;
      @(posedge clk); #1;
      check(saved_ssp == essp && saved_usp == eusp, "saved pointers");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
