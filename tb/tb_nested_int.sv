// tb_nested_int: interrupting an interrupt handler.
//
// Built with LOAD_MAX_PRIORITY = 0, so an interrupt raises the processor
// priority to the device's own level instead of 7, and with VECTOR_ROM32 =
// 1, so the three vectors (x0180, x0182, x0187) come from the 32-word
// lookup. A user program is
// interrupted by the keyboard (level 4). While the keyboard handler runs, a
// level-6 device requests and interrupts the handler: this entry comes from
// supervisor mode, so no stack switch (no state 45), and its RTI ends in
// state 51 and resumes the keyboard handler. A level-3 request raised
// during the keyboard handler must wait until the handler returns to the
// user program, and is then served. Checks the order of handler entries,
// the stack depth during nesting and the final user state.
module tb_nested_int;
  import lc3_pkg::*;
  import lc3_asm_pkg::*;

  logic       clk = 1'b0, rst = 1'b1, key_valid = 1'b0;
  logic [7:0] key_data = '0, ext_irq = '0;
  bit         go_raise = 1'b0, raised = 1'b0;
  word_t      pc, psr, saved_ssp, saved_usp;
  state_e     state;
  logic       int_req;
  logic [2:0] int_priority;
  int checks = 0, failures = 0;

  lc3_top #(.LOAD_MAX_PRIORITY(1'b0), .VECTOR_ROM32(1'b1)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog log=%0d %0d %0d n59=%0d n51=%0d n45=%0d pc=%h psr=%h", dut.u_mem.mem[LOG], dut.u_mem.mem[LOG+1], dut.u_mem.mem[LOG+2], n59, n51, n45, pc, psr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s pc=%h psr=%h", what, pc, psr); end
  endtask
  task automatic put(input word_t a, input word_t d);
    dut.u_mem.mem[a] = d;
  endtask

  localparam word_t H_KB = 16'h0300, H_6 = 16'h0320, H_3 = 16'h0340, LOG = 16'h0380, LOGP = 16'h0390, KBDRP = 16'h0391;
  // handler: append its id to the log, spin a while (so others can arrive), RTI
  task automatic handler(input word_t at, input int id, input int spin);
    put(at + 0, ADDi(6, 6, -1));
    put(at + 1, STR(0, 6, 0));
    put(at + 2, ADDi(6, 6, -1));
    put(at + 3, STR(1, 6, 0));
    put(at + 4, LD(1, off(at + 4, LOGP)));          // R1 <- log pointer
    put(at + 5, ANDi(0, 0, 0));
    put(at + 6, ADDi(0, 0, id));
    put(at + 7, STR(0, 1, 0));
    put(at + 8, ADDi(1, 1, 1));
    put(at + 9, ST(1, off(at + 9, LOGP)));
    // the keyboard handler reads KBDR, which drops its request
    put(at + 10, (id == 4) ? LDI(0, off(at + 10, KBDRP)) : ANDi(0, 0, 0));
    put(at + 11, ANDi(0, 0, 0));
    put(at + 12, ADDi(0, 0, spin));
    put(at + 13, ADDi(0, 0, -1));                   // spin loop
    put(at + 14, BR(3'b001, off(at + 14, at + 13)));
    put(at + 15, LDR(1, 6, 0));
    put(at + 16, ADDi(6, 6, 1));
    put(at + 17, LDR(0, 6, 0));
    put(at + 18, ADDi(6, 6, 1));
    put(at + 19, RTI);
  endtask

  int n45 = 0, n51 = 0, n59 = 0;
  int depth_max = 0;
  always @(posedge clk) if (!rst) begin
    if (state == S45) n45++;
    if (state == S51) n51++;
    if (state == S59) n59++;
    // the two external devices: raised together once, dropped on acknowledge
    if (go_raise && !raised) begin
      ext_irq[3] <= 1'b1; ext_irq[6] <= 1'b1; raised <= 1'b1;
    end
    if (state == S49 && int_priority == 3'd6) ext_irq[6] <= 1'b0;
    if (state == S49 && int_priority == 3'd3) ext_irq[3] <= 1'b0;
  end

  initial begin
    put(16'h0180, H_KB); put(16'h0182, H_6); put(16'h0187, H_3);
    put(LOGP, LOG);
    put(KBDRP, KBDR_ADDR);
    for (int i = 0; i < 4; i++) put(16'(LOG + i), 0);
    // boot: SP, enable KB, enter user program at x3000 with PSR x8002
    put(16'h0200, LD(6, off(16'h0200, 16'h0280)));
    put(16'h0201, LD(1, off(16'h0201, 16'h0283)));
    put(16'h0202, STI(1, off(16'h0202, 16'h0281)));
    put(16'h0203, LD(0, off(16'h0203, 16'h0284)));
    put(16'h0204, ADDi(6, 6, -1));
    put(16'h0205, STR(0, 6, 0));
    put(16'h0206, LD(0, off(16'h0206, 16'h0285)));
    put(16'h0207, ADDi(6, 6, -1));
    put(16'h0208, STR(0, 6, 0));
    put(16'h0209, RTI);
    put(16'h0280, 16'h3000); put(16'h0281, KBSR_ADDR); put(16'h0283, 16'h4000);
    put(16'h0284, 16'h8002); put(16'h0285, 16'h3000);
    handler(H_KB, 4, 15);
    handler(H_6, 6, 2);
    handler(H_3, 3, 2);
    put(16'h3000, LD(6, off(16'h3000, 16'h3010)));
    put(16'h3001, ADDi(2, 2, 1));
    put(16'h3002, BR(3'b111, off(16'h3002, 16'h3001)));
    put(16'h3010, 16'h4000);
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    wait (psr[15] == 1'b1);
    repeat (30) @(posedge clk);
    key_data <= 8'h31; key_valid <= 1'b1;
    @(posedge clk) key_valid <= 1'b0;
    // inside the keyboard handler: raise level 3 and level 6
    wait (state == S18 && pc == H_KB + 13);
    @(posedge clk); #1;
    check(psr[10:8] == 3'd4 && psr[15] == 1'b0, "keyboard handler runs at priority 4");
    check(dut.u_dp.u_rf.regs[6] == 16'h2FFC, "two user words and two saved registers on the stack");
    check(dut.u_kb.kbsr[15] == 1'b0, "handler's KBDR read cleared RDY");
    go_raise = 1'b1;
    wait (state == S54);
    @(posedge clk); #1;
    check(pc == H_6, "level 6 interrupts the keyboard handler");
    check(psr == {1'b0, 4'b0, 3'd6, 5'b0, psr[2:0]}, "priority 6 in nested handler");
    check(dut.u_mem.mem[dut.u_dp.u_rf.regs[6] + 16'd1][10:8] == 3'd4 &&
          dut.u_mem.mem[dut.u_dp.u_rf.regs[6] + 16'd1][15] == 1'b0, "saved PSR is the keyboard handler's");
    check(n45 == 1, "no stack switch for the nested entry");
    wait (state == S51);
    @(posedge clk); #1;
    check(psr[10:8] == 3'd4, "RTI returns to the keyboard handler at priority 4");
    check(ext_irq[3] == 1'b1, "level 3 still waiting while priority is 4");
    // run until the level-3 handler has finished
    wait (dut.u_mem.mem[LOG + 2] == 16'd3);
    wait (n59 >= 3);
    @(posedge clk); #1;
    check(dut.u_mem.mem[LOG + 0] == 16'd4 && dut.u_mem.mem[LOG + 1] == 16'd6 &&
          dut.u_mem.mem[LOG + 2] == 16'd3, "handler order 4, 6, 3");
    check(n51 == 1, "one return to supervisor (state 51)");
    check(n45 == 2, "two entries from user mode");
    check(psr[15] == 1'b1 && psr[10:8] == 3'd0, "back in the user program");
    check(dut.u_dp.u_rf.regs[6] == 16'h4000 && saved_ssp == 16'h3000, "stacks balanced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
