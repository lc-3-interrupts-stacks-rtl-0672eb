// tb_kb_example: the keyboard-interrupt walk-through with its exact numbers.
//
// Start: a user program at x3000 runs at PSR x8004 (user, priority 0, N)
// with its stack pointer R6 = x4000; the saved supervisor stack pointer is
// x2FF5; the keyboard vector x0180 holds x12A0. The keyboard interrupts the
// fetch of x3001 (PC already x3002). Expected after entry: PSR x0704
// (supervisor, priority 7, N kept), Saved_USP x4000, the old PSR x8004 at
// x2FF4 and PC-1 = x3001 at x2FF3, R6 = x2FF3, PC = x12A0. The handler reads
// KBDR and executes RTI. Expected after the return: PSR x8004, PC x3001,
// R6 x4000, Saved_SSP x2FF5.
// The supervisor stack start is set through SSP_INIT = x2FF5. A tiny boot
// routine enters user mode with RTI at a user prologue (x2F00) that loads
// R6 = x4000, leaves the N flag set and branches to x3000.
module tb_kb_example;
  import lc3_pkg::*;
  import lc3_asm_pkg::*;

  logic       clk = 1'b0, rst = 1'b1, key_valid = 1'b0;
  logic [7:0] key_data = '0, ext_irq = '0;
  word_t      pc, psr, saved_ssp, saved_usp;
  state_e     state;
  logic       int_req;
  logic [2:0] int_priority;
  int checks = 0, failures = 0;

  lc3_top #(.SSP_INIT(16'h2FF5)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s pc=%h psr=%h r6=%h", what, pc, psr, dut.u_dp.u_rf.regs[6]); end
  endtask
  task automatic put(input word_t a, input word_t d);
    dut.u_mem.mem[a] = d;
  endtask

  int entry_cycles = 0;
  bit in_entry = 0;
  always @(posedge clk) begin
    if (state == S49) in_entry <= 1;
    if (in_entry) entry_cycles <= entry_cycles + 1;
    if (state == S54) in_entry <= 0;
  end

  initial begin
    // boot at x0200: enable keyboard interrupts, push user PSR/PC, RTI
    put(16'h0200, LD(6, off(16'h0200, 16'h0280)));   // R6 <- x2FF3
    put(16'h0201, LD(1, off(16'h0201, 16'h0283)));
    put(16'h0202, STI(1, off(16'h0202, 16'h0281)));
    put(16'h0203, LD(0, off(16'h0203, 16'h0284)));
    put(16'h0204, STR(0, 6, 1));                      // x2FF4 <- x8004
    put(16'h0205, LD(0, off(16'h0205, 16'h0285)));
    put(16'h0206, STR(0, 6, 0));                      // x2FF3 <- x2F00
    put(16'h0207, RTI);
    put(16'h0280, 16'h2FF3); put(16'h0281, KBSR_ADDR); put(16'h0282, KBDR_ADDR);
    put(16'h0283, 16'h4000); put(16'h0284, 16'h8004); put(16'h0285, 16'h2F00);
    put(16'h0180, 16'h12A0);
    // user prologue: R6 <- x4000, N <- 1, go to x3000
    put(16'h2F00, LD(6, off(16'h2F00, 16'h2F10)));
    put(16'h2F01, LD(5, off(16'h2F01, 16'h2F11)));
    put(16'h2F02, BR(3'b111, off(16'h2F02, 16'h3000)));
    put(16'h2F10, 16'h4000); put(16'h2F11, 16'h8000);
    // user code: x3000 does not touch the condition codes (branch never)
    put(16'h3000, BR(3'b000, 0));
    put(16'h3001, BR(3'b000, 0));
    put(16'h3002, BR(3'b111, off(16'h3002, 16'h3002)));
    // keyboard handler at x12A0: read KBDR into R0, return
    put(16'h12A0, LDI(0, off(16'h12A0, 16'h12A2)));
    put(16'h12A1, RTI);
    put(16'h12A2, KBDR_ADDR);
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // user mode reached: PC x3000 fetched next
    wait (state == S18 && pc == 16'h3000);
    #1;
    check(psr == 16'h8004 && pc == 16'h3000, "user program at x3000, PSR x8004");
    check(dut.u_dp.u_rf.regs[6] == 16'h4000 && saved_ssp == 16'h2FF5, "R6 x4000, Saved SSP x2FF5");
    // press the key while x3000 executes so that the fetch of x3001 is interrupted
    wait (state == S32);
    key_data <= 8'h61; key_valid <= 1'b1;
    @(posedge clk) key_valid <= 1'b0;
    wait (state == S54);
    @(posedge clk); #1;
    check(pc == 16'h12A0, "PC at handler x12A0");
    check(psr == 16'h0704, "PSR 0000 0111 0000 0100");
    check(saved_usp == 16'h4000, "Saved USP x4000");
    check(dut.u_dp.u_rf.regs[6] == 16'h2FF3, "R6 x2FF3");
    check(dut.u_mem.mem[16'h2FF4] == 16'h8004, "old PSR x8004 at x2FF4");
    check(dut.u_mem.mem[16'h2FF3] == 16'h3001, "PC-1 x3001 at x2FF3");
    check(dut.u_bus.vector == 16'h0180, "Vector x0180");
    check(entry_cycles == 12, "states 45..54 take 12 cycles after state 49 (one wait per memory access)");
    wait (state == S59);
    @(posedge clk); #1;
    check(pc == 16'h3001, "PC x3001 after RTI");
    check(psr == 16'h8004, "PSR x8004 restored");
    check(dut.u_dp.u_rf.regs[6] == 16'h4000, "R6 x4000 restored");
    check(saved_ssp == 16'h2FF5, "Saved SSP x2FF5");
    check(dut.u_dp.u_rf.regs[0] == 16'h0061, "handler read the key");
    check(dut.u_kb.kbsr == 16'h4000, "KBDR read cleared RDY");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
