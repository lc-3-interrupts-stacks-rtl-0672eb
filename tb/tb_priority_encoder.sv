// tb_priority_encoder: exhaustive check of the 8-line priority encoder.
module tb_priority_encoder;
  logic [7:0] lines;
  logic [2:0] code;
  logic valid;
  int checks = 0, failures = 0, e;

  priority_encoder dut (.*);
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s lines=%b code=%0d", what, lines, code); end
  endtask
  initial begin
    lines = 8'b0001_0000; #1 check(code == 3'b100 && valid, "keyboard line gives 100");
    for (int v = 0; v < 256; v++) begin
      lines = 8'(v); #1;
      e = 0;
      for (int i = 0; i < 8; i++) if (lines[i]) e = i;
      check(valid == (v != 0), "valid");
      if (v != 0) check(code == 3'(e), "code of highest line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
