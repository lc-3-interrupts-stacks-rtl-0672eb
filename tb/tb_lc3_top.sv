// tb_lc3_top: end-to-end test of the interrupt-capable LC-3 at its default
// size (64K words of memory, one memory wait cycle).
//
// A small operating system boots in supervisor mode, sets the supervisor
// stack, enables keyboard interrupts and waits for a first key; that key is
// taken as an interrupt while in supervisor mode (no stack switch, RTI ends
// in state 51). The OS then pushes a user PSR and PC and executes RTI to
// enter a user program (state 59: switch to the user stack). The user
// program polls a TRAP x33 service until the keyboard handler has buffered
// a character. While it runs, a priority-6 device and the keyboard
// (priority 4) request at the same moment: the priority-6 request must be
// served first, and each user-mode entry must save the user SP and switch
// to the supervisor stack (state 45). The user program then runs RTI in
// user mode (privilege exception, vector x0100) and an illegal opcode
// (vector x0101); both handlers count and skip the instruction. Finally it
// pushes and pops through R6 and halts in a branch-to-self loop.
// Expected values are worked out by hand from the program below.
module tb_lc3_top;
  import lc3_pkg::*;
  import lc3_asm_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       key_valid = 1'b0;
  logic [7:0] key_data = '0;
  logic [7:0] ext_irq = '0;
  word_t      pc, psr, saved_ssp, saved_usp;
  state_e     state;
  logic       int_req;
  logic [2:0] int_priority;

  int checks = 0, failures = 0;
  longint cycle = 0;

  lc3_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // Memory layout.
  localparam word_t KBBUF = 16'h0280, KBSR_P = 16'h0281, KBDR_P = 16'h0282, KBIE = 16'h0283;
  localparam word_t UPSR = 16'h0284, UPC = 16'h0285, SSPC = 16'h0286;
  localparam word_t PRIV_CNT = 16'h0287, OPC_CNT = 16'h0288, EXT_CNT = 16'h0289;
  localparam word_t H_KB = 16'h02A0, H_PRIV = 16'h02B0, H_OPC = 16'h02C0, H_EXT = 16'h02D0;
  localparam word_t T_KB = 16'h02E0;
  localparam word_t USTK = 16'h3010, RESULT = 16'h3011, COUNT = 16'h3012, HALT = 16'h300E;

  task automatic put(input word_t a, input word_t d);
    dut.u_mem.mem[a] = d;
  endtask

  // Handler that counts in CNT, then adds 1 to the saved PC (skip).
  task automatic skip_handler(input word_t at, input word_t cnt);
    put(at + 0, ADDi(6, 6, -1));
    put(at + 1, STR(0, 6, 0));
    put(at + 2, LD(0, off(at + 2, cnt)));
    put(at + 3, ADDi(0, 0, 1));
    put(at + 4, ST(0, off(at + 4, cnt)));
    put(at + 5, LDR(0, 6, 1));
    put(at + 6, ADDi(0, 0, 1));
    put(at + 7, STR(0, 6, 1));
    put(at + 8, LDR(0, 6, 0));
    put(at + 9, ADDi(6, 6, 1));
    put(at + 10, RTI);
  endtask

  task automatic load_program();
    // vector tables
    put(16'h0033, T_KB);
    put(16'h0100, H_PRIV);
    put(16'h0101, H_OPC);
    put(16'h0180, H_KB);
    put(16'h0182, H_EXT);
    // data
    put(KBBUF, 0); put(KBSR_P, KBSR_ADDR); put(KBDR_P, KBDR_ADDR); put(KBIE, 16'h4000);
    put(UPSR, 16'h8002); put(UPC, 16'h3000); put(SSPC, 16'h3000);
    put(PRIV_CNT, 0); put(OPC_CNT, 0); put(EXT_CNT, 0);
    // OS at x0200
    put(16'h0200, LD(6, off(16'h0200, SSPC)));
    put(16'h0201, LD(1, off(16'h0201, KBIE)));
    put(16'h0202, STI(1, off(16'h0202, KBSR_P)));
    put(16'h0203, LD(0, off(16'h0203, KBBUF)));
    put(16'h0204, BR(3'b010, off(16'h0204, 16'h0203)));
    put(16'h0205, ANDi(0, 0, 0));
    put(16'h0206, ST(0, off(16'h0206, KBBUF)));
    put(16'h0207, LD(0, off(16'h0207, UPSR)));
    put(16'h0208, ADDi(6, 6, -1));
    put(16'h0209, STR(0, 6, 0));
    put(16'h020A, LD(0, off(16'h020A, UPC)));
    put(16'h020B, ADDi(6, 6, -1));
    put(16'h020C, STR(0, 6, 0));
    put(16'h020D, RTI);
    // keyboard interrupt handler
    put(H_KB + 0, ADDi(6, 6, -1));
    put(H_KB + 1, STR(0, 6, 0));
    put(H_KB + 2, LDI(0, off(H_KB + 2, KBDR_P)));
    put(H_KB + 3, ST(0, off(H_KB + 3, KBBUF)));
    put(H_KB + 4, LDR(0, 6, 0));
    put(H_KB + 5, ADDi(6, 6, 1));
    put(H_KB + 6, RTI);
    skip_handler(H_PRIV, PRIV_CNT);
    skip_handler(H_OPC, OPC_CNT);
    // priority-6 device handler: count only
    put(H_EXT + 0, ADDi(6, 6, -1));
    put(H_EXT + 1, STR(0, 6, 0));
    put(H_EXT + 2, LD(0, off(H_EXT + 2, EXT_CNT)));
    put(H_EXT + 3, ADDi(0, 0, 1));
    put(H_EXT + 4, ST(0, off(H_EXT + 4, EXT_CNT)));
    put(H_EXT + 5, LDR(0, 6, 0));
    put(H_EXT + 6, ADDi(6, 6, 1));
    put(H_EXT + 7, RTI);
    // TRAP x33: keyboard data service
    put(T_KB + 0, LD(0, off(T_KB, KBBUF)));
    put(T_KB + 1, RET);
    // user program at x3000
    put(16'h3000, LD(6, off(16'h3000, USTK)));
    put(16'h3001, ANDi(2, 2, 0));
    put(16'h3002, ADDi(2, 2, 1));
    put(16'h3003, TRAP(8'h33));
    put(16'h3004, ADDi(0, 0, 0));
    put(16'h3005, BR(3'b010, off(16'h3005, 16'h3002)));
    put(16'h3006, ST(0, off(16'h3006, RESULT)));
    put(16'h3007, ST(2, off(16'h3007, COUNT)));
    put(16'h3008, RTI);                 // privilege exception
    put(16'h3009, ILLEGAL);             // opcode exception
    put(16'h300A, ADDi(6, 6, -1));      // push R0
    put(16'h300B, STR(0, 6, 0));
    put(16'h300C, LDR(3, 6, 0));        // pop into R3
    put(16'h300D, ADDi(6, 6, 1));
    put(HALT, BR(3'b111, off(HALT, HALT)));
    put(USTK, 16'h4000);
    put(RESULT, 0);
    put(COUNT, 0);
  endtask

  // Mechanism counters.
  int n_int = 0, n_from_user = 0, n_priv = 0, n_opc = 0, n_rti_user = 0, n_rti_super = 0;
  int n_wait = 0, n_trap = 0, n_ext = 0, n_kb = 0;
  int first_prio = -1;
  bit  user_seen = 1'b0;

  always @(posedge clk) if (!rst) begin
    if (state == S49) begin
      n_int++;
      if (int_priority == 3'd6) begin
        n_ext++;
      end
      if (int_priority == 3'd4) n_kb++;
      if (user_seen && first_prio < 0) first_prio = int'(int_priority);
    end
    if (state == S45) n_from_user++;
    if (state == S44) n_priv++;
    if (state == S13) n_opc++;
    if (state == S59) n_rti_user++;
    if (state == S51) n_rti_super++;
    if (state == S15) n_trap++;
    if (state == S33 && !dut.r) n_wait++;
  end

  // State checks at the end of each interrupt/exception entry (state 54).
  word_t exp_ssp_top;
  always @(posedge clk) if (!rst && state == S54) begin
    // After entry: R6 points at the saved PC; the saved PSR is above it.
    check(dut.u_dp.psr_out[15] == 1'b0, "entry: supervisor mode");
    check(dut.u_dp.mdr == dut.u_mem.mem[dut.u_bus.vector], "entry: MDR holds the vector table entry");
    if (dut.u_bus.vector == 16'h0180 || dut.u_bus.vector == 16'h0182)
      check(dut.u_dp.psr_out[10:8] == 3'd7, "interrupt entry: priority 7");
    if (user_seen) begin
      check(dut.u_dp.u_rf.regs[6] == 16'h2FFE, "entry from user: SP = SSP - 2");
      check(dut.u_mem.mem[16'h2FFF][15] == 1'b1, "entry from user: saved PSR is user mode");
      check(saved_usp == 16'h4000, "entry from user: user SP saved");
      check((dut.u_mem.mem[16'h2FFE] >= 16'h3000 && dut.u_mem.mem[16'h2FFE] <= 16'h300D) ||
            dut.u_mem.mem[16'h2FFE] == T_KB || dut.u_mem.mem[16'h2FFE] == T_KB + 1,
            "entry from user: saved PC-1 in user code");
    end else begin
      // first keyboard interrupt, taken while the OS polls at x0203/x0204
      check(dut.u_dp.u_rf.regs[6] == 16'h2FFE, "entry from supervisor: SP - 2");
      check(dut.u_mem.mem[16'h2FFF][15] == 1'b0, "entry from supervisor: saved PSR");
      check(dut.u_mem.mem[16'h2FFE] inside {16'h0203, 16'h0204}, "entry from supervisor: saved PC-1");
      check(dut.u_bus.vector == 16'h0180, "first vector is keyboard x0180");
    end
  end

  initial begin
    load_program();
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // first key while the OS waits
    repeat (60) @(posedge clk);
    check(dut.u_dp.psr_out[15] == 1'b0 && pc < 16'h0210, "OS running in supervisor mode");
    key_data <= 8'h41; key_valid <= 1'b1;
    @(posedge clk) key_valid <= 1'b0;
    // wait for the user program
    wait (psr[15] == 1'b1);
    user_seen = 1'b1;
    wait (state == S59);
    @(posedge clk); #1;
    check(saved_ssp == 16'h3000, "RTI to user saves supervisor SP");
    check(dut.u_dp.u_rf.regs[6] == 16'h0000, "user SP loaded from Saved_USP (reset value)");
    repeat (80) @(posedge clk);
    check(pc >= 16'h3000 || pc == T_KB || pc == T_KB + 1, "user program running");
    // two devices request in the same cycle
    key_data <= 8'h42; key_valid <= 1'b1; ext_irq[6] <= 1'b1;
    @(posedge clk) key_valid <= 1'b0;
    // the level-6 device is acknowledged when its entry leaves state 49
    wait (state == S49 && int_priority == 3'd6);
    @(posedge clk) ext_irq[6] <= 1'b0;
    // run to the halt loop
    wait (state == S18 && pc == HALT);
    repeat (20) @(posedge clk);
    check(dut.u_mem.mem[RESULT] == 16'h0042, "user read second key through TRAP x33");
    check(dut.u_mem.mem[COUNT] != 16'h0000, "user loop counted");
    check(dut.u_mem.mem[PRIV_CNT] == 16'd1, "one privilege exception");
    check(dut.u_mem.mem[OPC_CNT] == 16'd1, "one opcode exception");
    check(dut.u_mem.mem[EXT_CNT] == 16'd1, "priority-6 handler ran once");
    check(first_prio == 6, "priority 6 served before keyboard");
    check(dut.u_dp.u_rf.regs[3] == 16'h0042, "push/pop through R6");
    check(dut.u_dp.u_rf.regs[6] == 16'h4000, "user SP restored after all returns");
    check(dut.u_mem.mem[16'h3FFF] == 16'h0042, "pushed word on user stack");
    check(psr[15] == 1'b1 && psr[10:8] == 3'd0, "back in user mode at priority 0");
    check(saved_ssp == 16'h3000, "supervisor SP saved on the last return");
    // every mechanism happened
    check(n_int == 3, "three interrupts");
    check(n_kb == 2 && n_ext == 1, "two keyboard, one priority-6 interrupt");
    check(n_from_user == 4, "stack switch on every user-mode entry");
    check(n_priv == 1, "privilege exception state 44");
    check(n_opc == 1, "opcode exception state 13");
    check(n_rti_user == 5, "RTI to user mode (state 59)");
    check(n_rti_super == 1, "RTI to supervisor mode (state 51)");
    check(n_trap > 0, "TRAP executed");
    check(n_wait > 0, "memory wait cycles");
    $display("int=%0d kb=%0d ext=%0d from_user=%0d priv=%0d opc=%0d rti_user=%0d rti_super=%0d trap=%0d wait=%0d cycles=%0d",
             n_int, n_kb, n_ext, n_from_user, n_priv, n_opc, n_rti_user, n_rti_super, n_trap, n_wait, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
