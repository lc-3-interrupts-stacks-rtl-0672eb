// tb_vector_rom32: reads all 32 words and checks them against the table
// rules (00ppp hardware interrupts, 01xxx x0100, 10xxx x0101) and the
// keyboard word at address 00100 (x0180).
module tb_vector_rom32;
  import lc3_pkg::*;
  logic [4:0] addr;
  word_t data, e;
  int checks = 0, failures = 0;

  vector_rom32 dut (.*);
  initial begin
    #10000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s addr=%b", what, addr); end
  endtask
  initial begin
    addr = 5'b00100; #1 check(data == 16'h0180, "keyboard word");
    for (int a = 0; a < 32; a++) begin
      addr = 5'(a); #1;
      if (a < 8)        e = 16'h0180 + 16'((a + 4) % 8);
      else if (a < 16)  e = 16'h0100;
      else if (a < 24)  e = 16'h0101;
      else              e = 16'h0100;
      check(data == e, "table word");
      if (a < 8) check(data >= 16'h0180 && data <= 16'h01FF, "inside the IVT");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
