// tb_lc3_datapath: applies hand-written control words to the datapath and
// checks the bus, PC, IR, MAR, MDR, register, PSR and stack-unit results
// of the micro-operations used by fetch, interrupt entry and RTI.
// A second, randomised part then applies random micro-operations. It
// predicts each result from the visible state: PC, MDR, PSR, the two saved
// stack pointers, the register contents and the Vector input. The
// micro-operations cover:
// - every bus source;
// - MAR, MDR and PC loads;
// - DRMUX and SR1MUX selection;
// - the SP+1/SP-1 path;
// - PSR loads from the bus;
// - condition codes from control.
module tb_lc3_datapath;
  import lc3_pkg::*;
  logic clk = 0, rst = 1;
  ctrl_t ctrl = CTRL_IDLE;
  word_t mem_rdata = '0, vector = 16'h0180;
  logic [2:0] int_priority = 3'd4;
  word_t bus, pc, ir, mar, mdr, psr_out, saved_ssp, saved_usp;
  logic ben;
  logic [2:0] cpu_priority;
  int checks = 0, failures = 0;

  lc3_datapath dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s bus=%h pc=%h mar=%h mdr=%h psr=%h", what, bus, pc, mar, mdr, psr_out); end
  endtask
  task automatic tick(input ctrl_t c);
    ctrl = c; @(posedge clk); #1; ctrl = CTRL_IDLE;
  endtask

  ctrl_t c;
  initial begin
    @(posedge clk); #1 rst = 0;
    check(pc == 16'h0200 && psr_out == 16'h0002, "reset PC and PSR");
    // 18: MAR<-PC, PC<-PC+1
    c = CTRL_IDLE; c.gate = G_PC; c.ld_mar = 1; c.ld_pc = 1; c.pcmux = PCMUX_INC; tick(c);
    check(mar == 16'h0200 && pc == 16'h0201, "fetch step 18");
    // 33: MDR<-M ; 35: IR<-MDR  (ADD R6, R6, #-2)
    mem_rdata = 16'h1DBE;
    c = CTRL_IDLE; c.mio_en = 1; c.ld_mdr = 1; tick(c);
    check(mdr == 16'h1DBE, "MDR from memory");
    c = CTRL_IDLE; c.gate = G_MDR; c.ld_ir = 1; tick(c);
    check(ir == 16'h1DBE, "IR from MDR");
    // load R6 = x3000 from the bus through MDR
    mem_rdata = 16'h3000; c = CTRL_IDLE; c.mio_en = 1; c.ld_mdr = 1; tick(c);
    c = CTRL_IDLE; c.gate = G_MDR; c.drmux = DR_SP; c.ld_reg = 1; tick(c);
    // ADD R6,R6,#-2 through the ALU with condition codes
    c = CTRL_IDLE; c.gate = G_ALU; c.aluk = ALU_ADD; c.sr1mux = SR1_IR86; c.drmux = DR_IR119;
    c.ld_reg = 1; c.ld_cc = 1; c.psrmux = PSR_FROM_CTL; ctrl = c; #1;
    check(bus == 16'h2FFE, "ALU result on the bus");
    @(posedge clk); #1 ctrl = CTRL_IDLE;
    check(psr_out[2:0] == 3'b001, "CC P");
    // 49: MDR<-PSR, PSR[15]<-0, priority 7 (lecture variant), Vector gated later
    c = CTRL_IDLE; c.gate = G_PSR; c.ld_mdr = 1; c.psrmux = PSR_FROM_CTL; c.ld_priv = 1;
    c.set_priv = 0; c.ld_priority = 1; tick(c);
    check(mdr == 16'h0001, "old PSR saved in MDR");
    check(psr_out == 16'h0701 && cpu_priority == 3'd7, "new PSR priority 7");
    // 45: Saved_USP<-SP, SP<-Saved_SSP
    c = CTRL_IDLE; c.sr1mux = SR1_SP; c.ld_saved_usp = 1; c.spmux = SP_SSP; c.gate = G_SP;
    c.drmux = DR_SP; c.ld_reg = 1; tick(c);
    check(saved_usp == 16'h2FFE, "Saved_USP <- SP");
    c = CTRL_IDLE; c.gate = G_ALU; c.aluk = ALU_PASSA; c.sr1mux = SR1_SP; ctrl = c; #1;
    check(bus == 16'h3000, "SP <- Saved_SSP");
    // 37: MAR, SP<-SP-1
    c = CTRL_IDLE; c.sr1mux = SR1_SP; c.spmux = SP_DEC; c.gate = G_SP; c.ld_mar = 1;
    c.drmux = DR_SP; c.ld_reg = 1; tick(c);
    check(mar == 16'h2FFF, "MAR <- SP-1");
    // 43: MDR<-PC-1
    c = CTRL_IDLE; c.gate = G_PCM1; c.ld_mdr = 1; tick(c);
    check(mdr == 16'h0200, "MDR <- PC-1");
    // 50: MAR<-Vector ; 54: PC<-MDR
    c = CTRL_IDLE; c.gate = G_VECTOR; c.ld_mar = 1; tick(c);
    check(mar == 16'h0180, "MAR <- Vector");
    mem_rdata = 16'h12A0; c = CTRL_IDLE; c.mio_en = 1; c.ld_mdr = 1; tick(c);
    c = CTRL_IDLE; c.gate = G_MDR; c.ld_pc = 1; c.pcmux = PCMUX_BUS; tick(c);
    check(pc == 16'h12A0, "PC <- handler address");
    // 42: PSR<-MDR (a user PSR x8004)
    mem_rdata = 16'h8004; c = CTRL_IDLE; c.mio_en = 1; c.ld_mdr = 1; tick(c);
    c = CTRL_IDLE; c.gate = G_MDR; c.psrmux = PSR_FROM_BUS; c.ld_priv = 1; c.ld_priority = 1;
    c.ld_cc = 1; tick(c);
    check(psr_out == 16'h8004, "PSR restored from MDR");
    // 59: Saved_SSP<-SP, SP<-Saved_USP
    c = CTRL_IDLE; c.sr1mux = SR1_SP; c.ld_saved_ssp = 1; c.spmux = SP_USP; c.gate = G_SP;
    c.drmux = DR_SP; c.ld_reg = 1; tick(c);
    check(saved_ssp == 16'h2FFF, "Saved_SSP <- SP");
    c = CTRL_IDLE; c.gate = G_ALU; c.aluk = ALU_PASSA; c.sr1mux = SR1_SP; ctrl = c; #1;
    check(bus == 16'h2FFE, "SP <- Saved_USP");
    // BEN for BRn with N set: IR = x0800
    mem_rdata = 16'h0800; c = CTRL_IDLE; c.mio_en = 1; c.ld_mdr = 1; tick(c);
    c = CTRL_IDLE; c.gate = G_MDR; c.ld_ir = 1; tick(c);
    c = CTRL_IDLE; c.ld_ben = 1; tick(c);
    check(ben == 1'b1, "BEN: BRn taken with N set (PSR x8004)");
    // PC-relative address: PC + off9
    c = CTRL_IDLE; c.ld_pc = 1; c.pcmux = PCMUX_ADDR; c.addr1mux = A1_PC; c.addr2mux = A2_OFF9; tick(c);
    check(pc == 16'h12A0, "PC + 0");
    // trap vector on the bus through MARMUX
    c = CTRL_IDLE; c.gate = G_MARMUX; c.marmux = MARMUX_ZEXT8; ctrl = c; #1;
    check(bus == 16'h0000, "ZEXT IR[7:0]");
    // randomised micro-operations against a reference
    for (int n = 0; n < 400; n++) begin
      word_t exp_bus, v, r[8];
      int    op, dr, sr;
      for (int k = 0; k < 8; k++) r[k] = dut.u_rf.regs[k];
      // new instruction word and memory data
      mem_rdata = 16'($urandom); vector = 16'($urandom);
      c = CTRL_IDLE; c.mio_en = 1; c.ld_mdr = 1; tick(c);
      check(mdr == mem_rdata, "random: MDR <- M");
      c = CTRL_IDLE; c.gate = G_MDR; c.ld_ir = 1; tick(c);
      check(ir == mem_rdata, "random: IR <- MDR");
      mem_rdata = 16'($urandom);
      c = CTRL_IDLE; c.mio_en = 1; c.ld_mdr = 1; tick(c);
      op = $urandom_range(0, 9);
      c = CTRL_IDLE;
      case (op)
        0: begin c.gate = G_PC;     exp_bus = pc; end
        1: begin c.gate = G_MDR;    exp_bus = mdr; end
        2: begin c.gate = G_PCM1;   exp_bus = pc - 16'd1; end
        3: begin c.gate = G_PSR;    exp_bus = psr_out; end
        4: begin c.gate = G_VECTOR; exp_bus = vector; end
        5: begin c.gate = G_SP; c.spmux = SP_SSP; exp_bus = saved_ssp; end
        6: begin c.gate = G_SP; c.spmux = SP_USP; exp_bus = saved_usp; end
        7: begin c.gate = G_SP; c.sr1mux = SR1_SP; c.spmux = SP_INC; exp_bus = r[6] + 16'd1; end
        8: begin c.gate = G_SP; c.sr1mux = SR1_SP; c.spmux = SP_DEC; exp_bus = r[6] - 16'd1; end
        default: begin
          sr = $urandom_range(0, 2);
          c.sr1mux = sr1mux_e'(sr); c.gate = G_ALU; c.aluk = ALU_PASSA;
          exp_bus = (sr == 0) ? r[ir[11:9]] : (sr == 1) ? r[ir[8:6]] : r[6];
        end
      endcase
      // the bus value goes to MAR, and to a register picked by DRMUX
      dr = $urandom_range(0, 2);
      c.ld_mar = 1; c.ld_reg = 1; c.drmux = drmux_e'(dr);
      c.ld_cc = 1; c.psrmux = PSR_FROM_CTL;
      ctrl = c; #1;
      check(bus == exp_bus, $sformatf("random: bus source %0d", op));
      @(posedge clk); #1 ctrl = CTRL_IDLE;
      check(mar == exp_bus, "random: MAR <- bus");
      check(dut.u_rf.regs[(dr == 0) ? int'(ir[11:9]) : (dr == 1) ? 7 : 6] == exp_bus, "random: DRMUX destination");
      check(psr_out[2:0] == (exp_bus[15] ? 3'b100 : (exp_bus == 0) ? 3'b010 : 3'b001), "random: condition codes");
      // PC: increment or load from the bus
      if ($urandom_range(0, 1) == 1) begin
        v = pc + 16'd1;
        c = CTRL_IDLE; c.ld_pc = 1; c.pcmux = PCMUX_INC; tick(c);
      end else begin
        v = mdr;
        c = CTRL_IDLE; c.ld_pc = 1; c.pcmux = PCMUX_BUS; c.gate = G_MDR; tick(c);
      end
      check(pc == v, "random: PC update");
      // PSR from the bus: only the defined fields are kept
      if ($urandom_range(0, 3) == 0) begin
        v = mdr;
        c = CTRL_IDLE; c.gate = G_MDR; c.psrmux = PSR_FROM_BUS; c.ld_priv = 1; c.ld_priority = 1;
        c.ld_cc = 1; tick(c);
        check(psr_out == {v[15], 4'b0, v[10:8], 5'b0, v[2:0]} && cpu_priority == v[10:8], "random: PSR <- bus");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
