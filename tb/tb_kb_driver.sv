// tb_kb_driver: an interrupt-driven keyboard driver with an 80-word buffer.
//
// The program in memory is a small operating system:
// - Boot code installs the keyboard driver and enters a user program with
//   RTI.
// - The driver's init routine writes the handler address into vector x0180
//   and its service routine into TRAP vector x0033. It sets the buffer head
//   and tail to the start of an 80-word KB_Data_Buffer and enables keyboard
//   interrupts (KBSR[14]).
// - The interrupt handler saves its registers and disables keyboard
//   interrupts. It reads KBDR and stores the character at the head of the
//   buffer. It advances the head, wrapping after 80 words, enables
//   interrupts again, restores its registers and returns with RTI.
// - The TRAP x33 service routine waits until the buffer holds a character
//   and returns it in R0 from the tail, which also wraps.
// The user program reads 100 characters through TRAP x33 and writes them
// to x4000 onwards, so both pointers wrap at least once.
//
// The testbench types characters with random gaps. It waits for RDY to
// clear before each new key, so none is lost. It also keeps fewer than 60
// characters unread, so the buffer cannot overflow.
//
// Checks:
// - every character arrives in order;
// - there are exactly 100 keyboard interrupts;
// - both pointers wrap;
// - the buffer held several characters at once;
// - every interrupt came from user mode;
// - the head and tail are equal at the end.
// The buffer size and the vector addresses follow the driver outline this
// design was built around. The program itself is this testbench's own.
// Default top parameters.
module tb_kb_driver;
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
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog: pc=%h psr=%h", pc, psr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s pc=%h psr=%h", what, pc, psr); end
  endtask
  task automatic put(input word_t a, input word_t d);
    dut.u_mem.mem[a] = d;
  endtask

  localparam int    NKEYS = 100, BUF_WORDS = 80;
  localparam word_t KB_INIT = 16'h0400, KB_INT = 16'h0420, KB_TRAP = 16'h0440,
                    SV0 = 16'h0470, SV1 = 16'h0471, SV2 = 16'h0472, TS1 = 16'h0473, TS2 = 16'h0474,
                    VEC_P = 16'h0460, TVEC_P = 16'h0461, HEAD = 16'h0462, TAIL = 16'h0463,
                    KBEN = 16'h0464, KBSR_P = 16'h0465, KBDR_P = 16'h0466, NEGEND = 16'h0467,
                    BUF_P = 16'h0468, BUF = 16'h0500, BUF_END = 16'h0550, BUF_LAST = 16'h054F, OUT = 16'h4000, HALT = 16'h3007;

  // occupancy, wraps and entry bookkeeping
  int n_kb_int = 0, n_not_user = 0, max_occ = 0, head_wraps = 0, tail_wraps = 0;
  word_t last_head = BUF, last_tail = BUF;
  always @(posedge clk) if (!rst) begin
    word_t h, t;
    int occ;
    if (state == S49) begin
      n_kb_int++;
      if (!psr[15]) n_not_user++;
    end
    h = dut.u_mem.mem[HEAD]; t = dut.u_mem.mem[TAIL];
    if (h >= BUF && h < BUF_END && t >= BUF && t < BUF_END) begin
      occ = (int'(h) - int'(t) + BUF_WORDS) % BUF_WORDS;
      if (occ > max_occ) max_occ = occ;
      if (h == BUF && last_head == BUF_LAST) head_wraps++;
      if (t == BUF && last_tail == BUF_LAST) tail_wraps++;
      last_head = h; last_tail = t;
    end
  end

  logic [7:0] keys [NKEYS];

  initial begin
    // boot: supervisor stack, install driver, enter user program at x3000
    put(16'h0200, LD(6, off(16'h0200, 16'h0230)));
    put(16'h0201, JSR(off(16'h0201, KB_INIT)));
    put(16'h0202, LD(0, off(16'h0202, 16'h0231)));
    put(16'h0203, ADDi(6, 6, -1));
    put(16'h0204, STR(0, 6, 0));
    put(16'h0205, LD(0, off(16'h0205, 16'h0232)));
    put(16'h0206, ADDi(6, 6, -1));
    put(16'h0207, STR(0, 6, 0));
    put(16'h0208, RTI);
    put(16'h0230, 16'h3000); put(16'h0231, 16'h8002); put(16'h0232, 16'h3000);
    // driver init
    put(KB_INIT + 0, LEA(1, off(KB_INIT + 0, KB_INT)));
    put(KB_INIT + 1, STI(1, off(KB_INIT + 1, VEC_P)));
    put(KB_INIT + 2, LEA(1, off(KB_INIT + 2, KB_TRAP)));
    put(KB_INIT + 3, STI(1, off(KB_INIT + 3, TVEC_P)));
    put(KB_INIT + 4, LEA(1, off(KB_INIT + 4, BUF)));
    put(KB_INIT + 5, ST(1, off(KB_INIT + 5, HEAD)));
    put(KB_INIT + 6, ST(1, off(KB_INIT + 6, TAIL)));
    put(KB_INIT + 7, LD(1, off(KB_INIT + 7, KBEN)));
    put(KB_INIT + 8, STI(1, off(KB_INIT + 8, KBSR_P)));
    put(KB_INIT + 9, RET);
    // interrupt handler
    put(KB_INT + 0,  ST(0, off(KB_INT + 0, SV0)));
    put(KB_INT + 1,  ST(1, off(KB_INT + 1, SV1)));
    put(KB_INT + 2,  ST(2, off(KB_INT + 2, SV2)));
    put(KB_INT + 3,  ANDi(0, 0, 0));
    put(KB_INT + 4,  STI(0, off(KB_INT + 4, KBSR_P)));     // KBSR[14] <- 0
    put(KB_INT + 5,  LDI(0, off(KB_INT + 5, KBDR_P)));
    put(KB_INT + 6,  STI(0, off(KB_INT + 6, HEAD)));       // Mem[head] <- key
    put(KB_INT + 7,  LD(1, off(KB_INT + 7, HEAD)));
    put(KB_INT + 8,  ADDi(1, 1, 1));
    put(KB_INT + 9,  LD(2, off(KB_INT + 9, NEGEND)));
    put(KB_INT + 10, ADDr(2, 1, 2));
    put(KB_INT + 11, BR(3'b100, off(KB_INT + 11, KB_INT + 13)));
    put(KB_INT + 12, LD(1, off(KB_INT + 12, BUF_P)));      // wrap
    put(KB_INT + 13, ST(1, off(KB_INT + 13, HEAD)));
    put(KB_INT + 14, LD(0, off(KB_INT + 14, KBEN)));
    put(KB_INT + 15, STI(0, off(KB_INT + 15, KBSR_P)));    // KBSR[14] <- 1
    put(KB_INT + 16, LD(0, off(KB_INT + 16, SV0)));
    put(KB_INT + 17, LD(1, off(KB_INT + 17, SV1)));
    put(KB_INT + 18, LD(2, off(KB_INT + 18, SV2)));
    put(KB_INT + 19, RTI);
    // TRAP x33: next character into R0, waiting while the buffer is empty
    put(KB_TRAP + 0,  ST(1, off(KB_TRAP + 0, TS1)));
    put(KB_TRAP + 1,  ST(2, off(KB_TRAP + 1, TS2)));
    put(KB_TRAP + 2,  LD(1, off(KB_TRAP + 2, TAIL)));
    put(KB_TRAP + 3,  LD(2, off(KB_TRAP + 3, HEAD)));
    put(KB_TRAP + 4,  NOT_(2, 2));
    put(KB_TRAP + 5,  ADDi(2, 2, 1));
    put(KB_TRAP + 6,  ADDr(2, 1, 2));
    put(KB_TRAP + 7,  BR(3'b010, off(KB_TRAP + 7, KB_TRAP + 2)));
    put(KB_TRAP + 8,  LDR(0, 1, 0));
    put(KB_TRAP + 9,  ADDi(1, 1, 1));
    put(KB_TRAP + 10, LD(2, off(KB_TRAP + 10, NEGEND)));
    put(KB_TRAP + 11, ADDr(2, 1, 2));
    put(KB_TRAP + 12, BR(3'b100, off(KB_TRAP + 12, KB_TRAP + 14)));
    put(KB_TRAP + 13, LD(1, off(KB_TRAP + 13, BUF_P)));
    put(KB_TRAP + 14, ST(1, off(KB_TRAP + 14, TAIL)));
    put(KB_TRAP + 15, LD(1, off(KB_TRAP + 15, TS1)));
    put(KB_TRAP + 16, LD(2, off(KB_TRAP + 16, TS2)));
    put(KB_TRAP + 17, RET);
    // driver constants
    put(VEC_P, 16'h0180); put(TVEC_P, 16'h0033); put(HEAD, 16'h0000); put(TAIL, 16'h0000);
    put(KBEN, 16'h4000); put(KBSR_P, KBSR_ADDR); put(KBDR_P, KBDR_ADDR);
    put(NEGEND, 16'(-BUF_END)); put(BUF_P, BUF);
    // user program: read NKEYS characters through TRAP x33 into OUT[]
    put(16'h3000, LD(3, off(16'h3000, 16'h3020)));
    put(16'h3001, LD(4, off(16'h3001, 16'h3021)));
    put(16'h3002, TRAP(8'h33));
    put(16'h3003, STR(0, 3, 0));
    put(16'h3004, ADDi(3, 3, 1));
    put(16'h3005, ADDi(4, 4, -1));
    put(16'h3006, BR(3'b001, off(16'h3006, 16'h3002)));
    put(HALT,     BR(3'b111, off(HALT, HALT)));
    put(16'h3020, OUT); put(16'h3021, 16'(NKEYS));
    for (int i = 0; i < NKEYS; i++) begin
      keys[i] = 8'($urandom_range(1, 255));
      put(16'(OUT + i), 16'h0000);
    end

    repeat (2) @(posedge clk);
    rst <= 1'b0;
    wait (psr[15] == 1'b1);
    for (int i = 0; i < NKEYS; i++) begin
      // one key at a time, and never more than 60 unread
      wait (dut.u_kb.kbsr[15] == 1'b0 &&
            i - (int'(dut.u_dp.u_rf.regs[3]) - int'(OUT)) < 60);
      repeat ((i >= 20 && i < 90) ? $urandom_range(0, 3) : $urandom_range(0, 400)) @(posedge clk);
      key_data <= keys[i]; key_valid <= 1'b1;
      @(posedge clk) key_valid <= 1'b0;
      @(posedge clk);
    end
    wait (state == S18 && pc == HALT);
    repeat (10) @(posedge clk);
    for (int i = 0; i < NKEYS; i++)
      check(dut.u_mem.mem[16'(OUT + i)] == {8'h00, keys[i]}, $sformatf("character %0d", i));
    check(dut.u_mem.mem[16'h0180] == KB_INT, "init installed the interrupt vector at x0180");
    check(dut.u_mem.mem[16'h0033] == KB_TRAP, "init installed TRAP vector x0033");
    check(n_kb_int == NKEYS, $sformatf("one interrupt per key (%0d)", n_kb_int));
    check(n_not_user == 0, "all interrupts taken from the user program");
    check(head_wraps >= 1 && tail_wraps >= 1, $sformatf("head wrapped %0d, tail wrapped %0d", head_wraps, tail_wraps));
    check(max_occ >= 3, $sformatf("buffer held several characters (max %0d)", max_occ));
    check(dut.u_mem.mem[HEAD] == dut.u_mem.mem[TAIL], "buffer empty at the end");
    check(dut.u_kb.kbsr[14] == 1'b1, "interrupts enabled again");
    check(psr[15] == 1'b1, "user mode at the end");
    $display("tb_kb_driver: %0d keys, max occupancy %0d, wraps %0d/%0d", NKEYS, max_occ, head_wraps, tail_wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
