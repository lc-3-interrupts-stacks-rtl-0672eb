// tb_lc3_control: drives the microsequencer's inputs directly and checks
// the state sequences of interrupt entry (from user and from supervisor
// mode), RTI (to user, to supervisor, and from user mode = privilege
// exception), the illegal-opcode exception, memory wait loops and some
// ordinary instructions, plus the control word of the key states.
module tb_lc3_control;
  import lc3_pkg::*;
  logic clk = 0, rst = 1;
  word_t ir = '0;
  logic ben = 0, r = 1, int_req = 0, psr15 = 0;
  ctrl_t ctrl;
  state_e state;
  int checks = 0, failures = 0;

  lc3_control dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s (state %0d)", what, state); end
  endtask

  task automatic expect_seq(input state_e seq[$], input string name);
    foreach (seq[i]) begin
      check(state == seq[i], name);
      @(posedge clk); #1;
    end
  endtask

  // Control words of the interrupt-related states.
  always @(negedge clk) if (!rst) begin
    case (state)
      S18: check(ctrl.gate == G_PC && ctrl.ld_mar && ctrl.ld_pc && ctrl.pcmux == PCMUX_INC, "18 MAR<-PC, PC<-PC+1");
      S49: check(ctrl.ld_vector && ctrl.vectormux == VEC_INT && ctrl.gate == G_PSR && ctrl.ld_mdr &&
                 !ctrl.mio_en && ctrl.ld_priv && !ctrl.set_priv && ctrl.psrmux == PSR_FROM_CTL &&
                 ctrl.ld_priority, "49 control word");
      S44: check(ctrl.ld_vector && ctrl.vectormux == VEC_PRIV && ctrl.gate == G_PSR && ctrl.ld_mdr &&
                 ctrl.ld_priv && !ctrl.set_priv && !ctrl.ld_priority, "44 control word");
      S13: check(ctrl.ld_vector && ctrl.vectormux == VEC_OPC && ctrl.gate == G_PSR && ctrl.ld_mdr &&
                 ctrl.ld_priv && !ctrl.ld_priority, "13 control word");
      S45: check(ctrl.ld_saved_usp && ctrl.sr1mux == SR1_SP && ctrl.spmux == SP_SSP && ctrl.gate == G_SP &&
                 ctrl.ld_reg && ctrl.drmux == DR_SP, "45 control word");
      S37, S47: check(ctrl.spmux == SP_DEC && ctrl.gate == G_SP && ctrl.ld_mar && ctrl.ld_reg &&
                 ctrl.drmux == DR_SP && ctrl.sr1mux == SR1_SP, "37/47 control word");
      S41, S48: check(ctrl.mio_en && ctrl.r_w, "41/48 write");
      S43: check(ctrl.gate == G_PCM1 && ctrl.ld_mdr && !ctrl.mio_en, "43 MDR<-PC-1");
      S50: check(ctrl.gate == G_VECTOR && ctrl.ld_mar, "50 MAR<-Vector");
      S52: check(ctrl.mio_en && !ctrl.r_w && ctrl.ld_mdr == r, "52 MDR<-M");
      S54, S38: check(ctrl.gate == G_MDR && ctrl.ld_pc && ctrl.pcmux == PCMUX_BUS, "PC<-MDR");
      S8:  check(ctrl.ld_mar && ctrl.sr1mux == SR1_SP && ctrl.gate == G_ALU && ctrl.aluk == ALU_PASSA, "8 MAR<-SP");
      S39, S34: check(ctrl.spmux == SP_INC && ctrl.gate == G_SP && ctrl.ld_reg && ctrl.drmux == DR_SP, "SP<-SP+1");
      S42: check(ctrl.gate == G_MDR && ctrl.psrmux == PSR_FROM_BUS && ctrl.ld_priv && ctrl.ld_priority &&
                 ctrl.ld_cc, "42 PSR<-MDR");
      S59: check(ctrl.ld_saved_ssp && ctrl.spmux == SP_USP && ctrl.gate == G_SP && ctrl.ld_reg &&
                 ctrl.drmux == DR_SP, "59 control word");
      default: ;
    endcase
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    // Each sequence starts in state 18 and stops just before the next 18.
    // interrupt taken in user mode
    int_req = 1; psr15 = 1;
    expect_seq('{S18, S49, S45, S37, S41, S43, S47, S48, S50, S52, S54}, "interrupt from user");
    // interrupt taken in supervisor mode: no stack switch
    psr15 = 0;
    expect_seq('{S18, S49, S37, S41, S43, S47, S48, S50, S52, S54}, "interrupt from supervisor");
    // RTI in supervisor mode returning to a user program
    int_req = 0; ir = 16'h8000; psr15 = 0;
    fork
      expect_seq('{S18, S33, S35, S32, S8, S36, S38, S39, S40, S42, S34, S59}, "RTI to user");
      begin wait (state == S34); psr15 = 1; end
    join
    // RTI returning to supervisor
    psr15 = 0;
    expect_seq('{S18, S33, S35, S32, S8, S36, S38, S39, S40, S42, S34, S51}, "RTI to supervisor");
    // RTI in user mode: privilege exception
    psr15 = 1;
    expect_seq('{S18, S33, S35, S32, S8, S44, S45, S37, S41, S43, S47, S48, S50, S52, S54},
               "privilege exception");
    // reserved opcode in supervisor and in user mode
    ir = 16'hD000; psr15 = 0;
    expect_seq('{S18, S33, S35, S32, S13, S37, S41, S43, S47, S48, S50, S52, S54}, "opcode exception (supervisor)");
    ir = 16'hD123; psr15 = 1;
    expect_seq('{S18, S33, S35, S32, S13, S45, S37, S41, S43, S47, S48, S50, S52, S54}, "opcode exception (user)");
    // memory wait loop in the fetch
    psr15 = 0; ir = 16'h1000; r = 0;
    expect_seq('{S18, S33, S33}, "33 waits for R");
    check(!ctrl.ld_mdr, "MDR not loaded before R");
    r = 1;
    expect_seq('{S33, S35, S32, S1}, "ADD");
    // LDI, BR taken, JSR, TRAP, STI
    ir = 16'hA000; expect_seq('{S18, S33, S35, S32, S10, S24, S26, S25, S27}, "LDI");
    ir = 16'h0E00; ben = 1; expect_seq('{S18, S33, S35, S32, S0, S22}, "BR taken");
    ir = 16'h4800; expect_seq('{S18, S33, S35, S32, S4, S21}, "JSR");
    ir = 16'hF033; expect_seq('{S18, S33, S35, S32, S15, S28, S30}, "TRAP");
    ir = 16'hB000; expect_seq('{S18, S33, S35, S32, S11, S29, S31, S23, S16}, "STI");
    check(state == S18, "ends in fetch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
