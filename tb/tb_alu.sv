// tb_alu: random operands for ADD, AND, NOT and PASS with register and
// immediate second operands.
module tb_alu;
  import lc3_pkg::*;
  word_t a, sr2, ir, y, b, e;
  aluk_e aluk;
  int checks = 0, failures = 0;

  alu dut (.*);
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 1000; i++) begin
      a = 16'($urandom); sr2 = 16'($urandom); ir = 16'($urandom); aluk = aluk_e'($urandom % 4);
      #1;
      b = ir[5] ? 16'(signed'(ir[4:0])) : sr2;
      case (aluk)
        ALU_ADD: e = a + b;
        ALU_AND: e = a & b;
        ALU_NOT: e = ~a;
        default: e = a;
      endcase
      checks++;
      if (y != e) begin failures++; $display("FAIL op=%0d a=%h b=%h y=%h", aluk, a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
