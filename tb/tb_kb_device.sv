// tb_kb_device: checks KBSR/KBDR behaviour: a key sets RDY and KBDR, IRQ is
// RDY & EN, only KBSR[14] is writable, and a read of KBDR clears RDY.
module tb_kb_device;
  import lc3_pkg::*;
  logic clk = 0, rst = 1;
  logic key_valid = 0, kbsr_wr = 0, kbdr_rd = 0;
  logic [7:0] key_data = '0;
  word_t wdata = '0, kbsr, kbdr;
  logic irq;
  int checks = 0, failures = 0;

  kb_device dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s kbsr=%h kbdr=%h", what, kbsr, kbdr); end
  endtask

  logic rdy, en; logic [7:0] d;
  initial begin
    @(posedge clk); #1 rst = 0;
    check(kbsr == 0 && kbdr == 0 && !irq, "reset");
    key_valid = 1; key_data = 8'h61; @(posedge clk); #1 key_valid = 0;
    check(kbsr == 16'h8000 && kbdr == 16'h0061, "key sets RDY and KBDR");
    check(!irq, "no IRQ while EN=0");
    wdata = 16'hFFFF; kbsr_wr = 1; @(posedge clk); #1 kbsr_wr = 0;
    check(kbsr == 16'hC000, "only EN is writable");
    check(irq, "IRQ = RDY & EN");
    kbdr_rd = 1; @(posedge clk); #1 kbdr_rd = 0;
    check(kbsr == 16'h4000 && !irq, "KBDR read clears RDY");
    // random sequence against a reference
    rdy = 0; en = 1; d = 8'h61;
    for (int i = 0; i < 400; i++) begin
      key_valid = ($urandom % 3) == 0; key_data = 8'($urandom);
      kbsr_wr = ($urandom % 5) == 0; kbdr_rd = ($urandom % 3) == 0; wdata = 16'($urandom);
      if (kbsr_wr) en = wdata[14];
      if (key_valid) begin rdy = 1; d = key_data; end
      else if (kbdr_rd) rdy = 0;
      @(posedge clk); #1;
      check(kbsr == {rdy, en, 14'b0} && kbdr == {8'b0, d} && irq == (rdy & en), "reference");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
