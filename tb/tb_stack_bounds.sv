// tb_stack_bounds: a bounded user stack in x3F00..x3FFF, used while
// keyboard interrupts arrive.
//
// A user program uses R6 as its stack pointer. The stack is empty at
// stack_bottom = x4000 and full at SP = x3F00.
// - PUSH returns 0 in R5 after decrementing SP and storing R0. If SP is
//   already x3F00, it returns 1 and changes nothing.
// - POP returns the top in R0 and 0 in R5 after incrementing SP. If SP is
//   already x4000, it returns 1 and changes nothing.
// The program pushes 1, 2, 3, ... until PUSH reports overflow. It then pops
// until POP reports underflow, storing each popped value from x5000
// onwards.
//
// Meanwhile the testbench presses keys at random intervals. The keyboard
// handler saves R0 on the supervisor stack, reads KBDR, counts the key and
// returns. Every entry switches R6 to the supervisor stack and every RTI
// switches back. A fault in that switch would corrupt the user's stack
// pointer or contents.
//
// Checks:
// - 256 pushes and 256 pops succeed;
// - the popped values come back in reverse order;
// - SP ends at x4000 with R5 = 1;
// - sentinels just outside the stack are untouched;
// - interrupts hit with the stack partly filled;
// - the handler counted every key.
// The bounds follow the stack example this design was built around. The
// routines are this testbench's own. Default top parameters.
module tb_stack_bounds;
  import lc3_pkg::*;
  import lc3_asm_pkg::*;

  logic       clk = 1'b0, rst = 1'b1, key_valid = 1'b0;
  logic [7:0] key_data = '0, ext_irq = '0;
  word_t      pc, psr, saved_ssp, saved_usp;
  state_e     state;
  logic       int_req;
  logic [2:0] int_priority;
  int checks = 0, failures = 0;

  lc3_top dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog: pc=%h psr=%h", pc, psr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s pc=%h psr=%h", what, pc, psr); end
  endtask
  task automatic put(input word_t a, input word_t d);
    dut.u_mem.mem[a] = d;
  endtask

  localparam word_t PUSH = 16'h3100, POP = 16'h3120, HANDLER = 16'h0300, KCNT = 16'h0311,
                    OUT = 16'h5000, NPUSH = 16'h3042, NPOP = 16'h3043, HALT = 16'h3015;

  // interrupts taken while the user stack was partly filled
  int n_mid = 0, n_int = 0, keys_sent = 0;
  always @(posedge clk) if (!rst && state == S45) begin
    n_int++;
    if (dut.u_dp.u_rf.regs[6] > 16'h3F00 && dut.u_dp.u_rf.regs[6] < 16'h4000) n_mid++;
  end

  initial begin
    // boot: supervisor stack x3000, keyboard vector and enable, RTI to x3000
    put(16'h0200, LD(6,  off(16'h0200, 16'h0220)));
    put(16'h0201, LD(1,  off(16'h0201, 16'h0221)));
    put(16'h0202, STI(1, off(16'h0202, 16'h0222)));
    put(16'h0203, LD(1,  off(16'h0203, 16'h0223)));
    put(16'h0204, STI(1, off(16'h0204, 16'h0224)));
    put(16'h0205, LD(0,  off(16'h0205, 16'h0225)));
    put(16'h0206, ADDi(6, 6, -1));
    put(16'h0207, STR(0, 6, 0));
    put(16'h0208, LD(0,  off(16'h0208, 16'h0226)));
    put(16'h0209, ADDi(6, 6, -1));
    put(16'h020A, STR(0, 6, 0));
    put(16'h020B, RTI);
    put(16'h0220, 16'h3000); put(16'h0221, 16'h4000); put(16'h0222, KBSR_ADDR);
    put(16'h0223, HANDLER);  put(16'h0224, 16'h0180); put(16'h0225, 16'h8002);
    put(16'h0226, 16'h3000);
    // keyboard handler: R0 saved on the supervisor stack
    put(HANDLER + 0, ADDi(6, 6, -1));
    put(HANDLER + 1, STR(0, 6, 0));
    put(HANDLER + 2, LDI(0, off(HANDLER + 2, 16'h0310)));
    put(HANDLER + 3, LD(0,  off(HANDLER + 3, KCNT)));
    put(HANDLER + 4, ADDi(0, 0, 1));
    put(HANDLER + 5, ST(0,  off(HANDLER + 5, KCNT)));
    put(HANDLER + 6, LDR(0, 6, 0));
    put(HANDLER + 7, ADDi(6, 6, 1));
    put(HANDLER + 8, RTI);
    put(16'h0310, KBDR_ADDR); put(KCNT, 16'h0000);
    // user program
    put(16'h3000, LD(6, off(16'h3000, 16'h3040)));           // SP <- stack_bottom
    put(16'h3001, ANDi(0, 0, 0));
    put(16'h3002, ANDi(2, 2, 0));
    put(16'h3003, ADDi(0, 0, 1));                             // push loop
    put(16'h3004, JSR(off(16'h3004, PUSH)));
    put(16'h3005, ADDi(5, 5, 0));
    put(16'h3006, BR(3'b001, off(16'h3006, 16'h300A)));      // overflow: stop
    put(16'h3007, ADDi(2, 2, 1));
    put(16'h3008, BR(3'b111, off(16'h3008, 16'h3003)));
    put(16'h300A, LD(3, off(16'h300A, 16'h3041)));
    put(16'h300B, ANDi(4, 4, 0));
    put(16'h300C, JSR(off(16'h300C, POP)));                  // pop loop
    put(16'h300D, ADDi(5, 5, 0));
    put(16'h300E, BR(3'b001, off(16'h300E, 16'h3013)));      // underflow: stop
    put(16'h300F, STR(0, 3, 0));
    put(16'h3010, ADDi(3, 3, 1));
    put(16'h3011, ADDi(4, 4, 1));
    put(16'h3012, BR(3'b111, off(16'h3012, 16'h300C)));
    put(16'h3013, ST(2, off(16'h3013, NPUSH)));
    put(16'h3014, ST(4, off(16'h3014, NPOP)));
    put(HALT,     BR(3'b111, off(HALT, HALT)));
    put(16'h3040, 16'h4000); put(16'h3041, OUT); put(NPUSH, 16'hFFFF); put(NPOP, 16'hFFFF);
    // PUSH: full when SP - x3F00 <= 0
    put(PUSH + 0, ANDi(5, 5, 0));
    put(PUSH + 1, LD(1, off(PUSH + 1, PUSH + 16)));
    put(PUSH + 2, ADDr(1, 6, 1));
    put(PUSH + 3, BR(3'b110, off(PUSH + 3, PUSH + 7)));
    put(PUSH + 4, ADDi(6, 6, -1));
    put(PUSH + 5, STR(0, 6, 0));
    put(PUSH + 6, RET);
    put(PUSH + 7, ADDi(5, 5, 1));
    put(PUSH + 8, RET);
    put(PUSH + 16, 16'(-16'h3F00));
    // POP: empty when SP - x4000 >= 0
    put(POP + 0, ANDi(5, 5, 0));
    put(POP + 1, LD(1, off(POP + 1, POP + 16)));
    put(POP + 2, ADDr(1, 6, 1));
    put(POP + 3, BR(3'b011, off(POP + 3, POP + 7)));
    put(POP + 4, LDR(0, 6, 0));
    put(POP + 5, ADDi(6, 6, 1));
    put(POP + 6, RET);
    put(POP + 7, ADDi(5, 5, 1));
    put(POP + 8, RET);
    put(POP + 16, 16'(-16'h4000));
    // sentinels around the stack area
    put(16'h3EFF, 16'hDEAD); put(16'h4000, 16'hBEEF);
    for (int i = 0; i < 260; i++) put(16'(OUT + i), 16'h0000);

    repeat (2) @(posedge clk);
    rst <= 1'b0;
    wait (psr[15] == 1'b1);
    while (!(state == S18 && pc == HALT)) begin
      repeat ($urandom_range(150, 900)) @(posedge clk);
      if (dut.u_kb.kbsr[15] == 1'b0 && !(state == S18 && pc == HALT)) begin
        key_data <= 8'($urandom); key_valid <= 1'b1;
        @(posedge clk) key_valid <= 1'b0;
        keys_sent++;
      end
    end
    repeat (300) @(posedge clk);
    check(dut.u_mem.mem[NPUSH] == 16'd256, $sformatf("256 pushes before overflow (%0d)", dut.u_mem.mem[NPUSH]));
    check(dut.u_mem.mem[NPOP] == 16'd256, $sformatf("256 pops before underflow (%0d)", dut.u_mem.mem[NPOP]));
    for (int i = 0; i < 256; i++)
      check(dut.u_mem.mem[16'(OUT + i)] == 16'(256 - i), $sformatf("popped value %0d", i));
    check(dut.u_mem.mem[16'(OUT + 256)] == 16'h0000, "nothing stored after underflow");
    check(dut.u_dp.u_rf.regs[6] == 16'h4000, "SP back at stack_bottom");
    check(dut.u_dp.u_rf.regs[5] == 16'd1, "last POP reported underflow");
    check(dut.u_mem.mem[16'h3EFF] == 16'hDEAD && dut.u_mem.mem[16'h4000] == 16'hBEEF, "sentinels untouched");
    check(dut.u_mem.mem[KCNT] == 16'(keys_sent), $sformatf("handler counted %0d of %0d keys", dut.u_mem.mem[KCNT], keys_sent));
    check(n_mid >= 5, $sformatf("interrupts with the stack partly filled (%0d of %0d)", n_mid, n_int));
    check(saved_ssp == 16'h3000, "supervisor stack balanced: every entry popped by its RTI");
    $display("tb_stack_bounds: %0d keys, %0d interrupts with the stack partly filled", keys_sent, n_mid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
