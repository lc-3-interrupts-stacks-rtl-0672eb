// tb_irq_daisy_chain: exhaustive check of the 8-device chain: the grant is
// one-hot, goes to the highest requesting index, and IRQ is the OR of all
// requests.
module tb_irq_daisy_chain;
  logic [7:0] req, grant, e;
  logic irq;
  int checks = 0, failures = 0;

  irq_daisy_chain #(.N(8)) dut (.*);
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s req=%b grant=%b", what, req, grant); end
  endtask
  initial begin
    for (int v = 0; v < 256; v++) begin
      req = 8'(v); #1;
      e = '0;
      for (int i = 7; i >= 0; i--) if (req[i]) begin e[i] = 1'b1; break; end
      check(grant == e, "grant to highest requester");
      check(irq == (v != 0), "IRQ line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
