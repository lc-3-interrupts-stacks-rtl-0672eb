// tb_reg_file: checks DRMUX and SR1MUX selections (IR fields, R7, R6) and
// the SR2 read port against a reference register array.
module tb_reg_file;
  import lc3_pkg::*;
  logic clk = 0, rst = 1;
  word_t ir = '0, din = '0, sr1_out, sr2_out;
  drmux_e drmux = DR_IR119;
  sr1mux_e sr1mux = SR1_IR119;
  logic ld_reg = 0;
  int checks = 0, failures = 0;
  word_t ref_regs [8];

  reg_file dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int dr, s1;
  initial begin
    for (int i = 0; i < 8; i++) ref_regs[i] = '0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 500; i++) begin
      ir = 16'($urandom); din = 16'($urandom); ld_reg = 1'($urandom);
      drmux = drmux_e'($urandom % 3); sr1mux = sr1mux_e'($urandom % 3);
      dr = (drmux == DR_IR119) ? int'(ir[11:9]) : (drmux == DR_R7) ? 7 : 6;
      s1 = (sr1mux == SR1_IR119) ? int'(ir[11:9]) : (sr1mux == SR1_IR86) ? int'(ir[8:6]) : 6;
      #1;
      check(sr1_out == ref_regs[s1], "SR1 read");
      check(sr2_out == ref_regs[ir[2:0]], "SR2 read");
      if (ld_reg) ref_regs[dr] = din;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
