// tb_mem_latency: cycle counts of fetch, interrupt entry and RTI for
// several memory latencies.
//
// Three processors run side by side, with WAIT_CYCLES = 0, 1 and 3. Each
// runs the same program:
// - boot code enters a user loop at x3000 with RTI;
// - a key is typed;
// - the keyboard handler reads KBDR and returns with RTI.
// With W = WAIT_CYCLES, every memory state lasts W + 1 cycles and the other
// states one cycle. That gives:
// - instruction fetch (18, 33, 35, 32): 4 + W cycles;
// - interrupt entry from user mode (49, 45, 37, 41, 43, 47, 48, 50, 52,
//   54): 10 + 3W cycles;
// - RTI (8, 36, 38, 39, 40, 42, 34, 59): 8 + 2W cycles, counted twice here
//   (the boot RTI and the handler's RTI).
// The testbench counts the cycles spent in those states and checks the
// totals. It also checks the state after the return in each processor: PC,
// PSR, the key in R0, and the stack pointers.
module tb_mem_latency;
  import lc3_pkg::*;
  import lc3_asm_pkg::*;

  localparam int NW = 3;
  localparam int WAITS [NW] = '{0, 1, 3};

  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0, done = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog: %0d of %0d finished", done, NW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    wait (done == NW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NW; g++) begin : gw
    localparam int W = WAITS[g];
    logic       key_valid = 1'b0;
    logic [7:0] key_data = '0, ext_irq = '0;
    word_t      pc, psr, saved_ssp, saved_usp;
    state_e     state;
    logic       int_req;
    logic [2:0] int_priority;

    lc3_top #(.WAIT_CYCLES(W)) dut (.*);

    int n_entry = 0, n_rti = 0, n_s33 = 0, run33 = 0, max33 = 0, n_fetch = 0;
    always @(posedge clk) if (!rst) begin
      if (state inside {S49, S45, S37, S41, S43, S47, S48, S50, S52, S54}) n_entry++;
      if (state inside {S8, S36, S38, S39, S40, S42, S34, S59, S51}) n_rti++;
      if (state == S33) begin run33++; if (run33 > max33) max33 = run33; end
      else run33 = 0;
      if (state == S32) n_fetch++;
    end

    initial begin
      int f0, c0;
      dut.u_mem.mem[16'h0180] = 16'h12A0;
      // boot: SP x3000, enable keyboard, frame {PSR x8002, PC x3000}, RTI
      dut.u_mem.mem[16'h0200] = LD(6,  off(16'h0200, 16'h0220));
      dut.u_mem.mem[16'h0201] = LD(1,  off(16'h0201, 16'h0221));
      dut.u_mem.mem[16'h0202] = STI(1, off(16'h0202, 16'h0222));
      dut.u_mem.mem[16'h0203] = LD(0,  off(16'h0203, 16'h0223));
      dut.u_mem.mem[16'h0204] = ADDi(6, 6, -1);
      dut.u_mem.mem[16'h0205] = STR(0, 6, 0);
      dut.u_mem.mem[16'h0206] = LD(0,  off(16'h0206, 16'h0224));
      dut.u_mem.mem[16'h0207] = ADDi(6, 6, -1);
      dut.u_mem.mem[16'h0208] = STR(0, 6, 0);
      dut.u_mem.mem[16'h0209] = RTI;
      dut.u_mem.mem[16'h0220] = 16'h3000; dut.u_mem.mem[16'h0221] = 16'h4000;
      dut.u_mem.mem[16'h0222] = KBSR_ADDR; dut.u_mem.mem[16'h0223] = 16'h8002;
      dut.u_mem.mem[16'h0224] = 16'h3000;
      // user loop and handler
      dut.u_mem.mem[16'h3000] = BR(3'b111, off(16'h3000, 16'h3000));
      dut.u_mem.mem[16'h12A0] = LDI(0, off(16'h12A0, 16'h12A2));
      dut.u_mem.mem[16'h12A1] = RTI;
      dut.u_mem.mem[16'h12A2] = KBDR_ADDR;
      wait (!rst);
      // let the user loop run, then type a key
      wait (psr[15] == 1'b1);
      repeat (40) @(posedge clk);
      key_data <= 8'h5A; key_valid <= 1'b1;
      @(posedge clk) key_valid <= 1'b0;
      wait (state == S59 && pc == 16'h3000 && n_rti > 8 + 2 * W);
      @(posedge clk); #1;
      check(n_entry == 10 + 3 * W, $sformatf("W=%0d: entry %0d cycles, expected %0d", W, n_entry, 10 + 3 * W));
      check(n_rti == 2 * (8 + 2 * W), $sformatf("W=%0d: two RTIs %0d cycles, expected %0d", W, n_rti, 2 * (8 + 2 * W)));
      check(max33 == W + 1, $sformatf("W=%0d: fetch read holds state 33 for %0d cycles", W, max33));
      check(pc == 16'h3000 && psr == 16'h8002, $sformatf("W=%0d: back in the user loop with PSR x8002", W));
      check(dut.u_dp.u_rf.regs[0] == 16'h005A, $sformatf("W=%0d: handler read the key", W));
      check(saved_ssp == 16'h3000 && saved_usp == 16'h0000 && dut.u_dp.u_rf.regs[6] == 16'h0000,
            $sformatf("W=%0d: stack pointers restored", W));
      // one fetch of the user loop: 4 + W cycles from state 18 to state 32
      wait (state == S18);
      c0 = 0; f0 = n_fetch;
      while (n_fetch == f0) begin @(posedge clk); #1; c0++; end
      check(c0 == 4 + W, $sformatf("W=%0d: fetch and decode %0d cycles, expected %0d", W, c0, 4 + W));
      done++;
    end
  end
endmodule
