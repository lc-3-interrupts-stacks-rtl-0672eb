// tb_addr_arith: random checks of base + sign-extended offset for each
// ADDR1MUX/ADDR2MUX choice and of the MARMUX trap-vector path.
module tb_addr_arith;
  import lc3_pkg::*;
  word_t pc, base_r, ir, sum, marmux_out, e, off;
  addr1mux_e addr1mux;
  addr2mux_e addr2mux;
  marmux_e marmux;
  int checks = 0, failures = 0;

  addr_arith dut (.*);
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 1000; i++) begin
      pc = 16'($urandom); base_r = 16'($urandom); ir = 16'($urandom);
      addr1mux = addr1mux_e'(1'($urandom)); addr2mux = addr2mux_e'($urandom % 4);
      marmux = marmux_e'(1'($urandom));
      #1;
      case (addr2mux)
        A2_ZERO: off = 0;
        A2_OFF6: off = 16'(signed'(ir[5:0]));
        A2_OFF9: off = 16'(signed'(ir[8:0]));
        default: off = 16'(signed'(ir[10:0]));
      endcase
      e = (addr1mux == A1_PC ? pc : base_r) + off;
      checks += 2;
      if (sum != e) begin failures++; $display("FAIL sum"); end
      if (marmux_out != (marmux == MARMUX_ADDR ? e : {8'b0, ir[7:0]})) begin failures++; $display("FAIL marmux"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
