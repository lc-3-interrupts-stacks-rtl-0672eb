// tb_psr: checks the PSR field loads, both PSRMUX sources, the condition-code
// logic and the fixed-zero bits against values computed in the testbench.
module tb_psr;
  import lc3_pkg::*;
  logic clk = 0, rst = 1;
  word_t bus = '0;
  psrmux_e psrmux = PSR_FROM_BUS;
  logic ld_priv = 0, ld_priority = 0, ld_cc = 0, set_priv = 0;
  logic [2:0] priority_in = '0;
  word_t psr_out;
  logic priv;
  logic [2:0] priority_lvl, nzp;
  int checks = 0, failures = 0;

  psr dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic logic [2:0] cc_of(input word_t v);
    return v[15] ? 3'b100 : (v == 0) ? 3'b010 : 3'b001;
  endfunction

  word_t exp;
  initial begin
    @(posedge clk); #1 rst = 0;
    check(psr_out == 16'h0002, "reset value");
    exp = 16'h0002;
    for (int i = 0; i < 300; i++) begin
      bus = 16'($urandom); psrmux = psrmux_e'(1'($urandom));
      ld_priv = 1'($urandom); ld_priority = 1'($urandom); ld_cc = 1'($urandom);
      set_priv = 1'($urandom); priority_in = 3'($urandom);
      if (psrmux == PSR_FROM_BUS) begin
        if (ld_priv) exp[15] = bus[15];
        if (ld_priority) exp[10:8] = bus[10:8];
        if (ld_cc) exp[2:0] = bus[2:0];
      end else begin
        if (ld_priv) exp[15] = set_priv;
        if (ld_priority) exp[10:8] = priority_in;
        if (ld_cc) exp[2:0] = cc_of(bus);
      end
      @(posedge clk); #1;
      check(psr_out == exp, "PSR after load");
      check(priv == exp[15] && priority_lvl == exp[10:8] && nzp == exp[2:0], "field outputs");
    end
    // explicit condition codes
    psrmux = PSR_FROM_CTL; ld_priv = 0; ld_priority = 0; ld_cc = 1;
    bus = 16'h8000; @(posedge clk); #1 check(nzp == 3'b100, "N");
    bus = 16'h0000; @(posedge clk); #1 check(nzp == 3'b010, "Z");
    bus = 16'h0001; @(posedge clk); #1 check(nzp == 3'b001, "P");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
