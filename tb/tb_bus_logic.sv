// tb_bus_logic: checks that INT is raised only when the highest requesting
// level outranks the processor priority, that IntPriority is that level,
// and that the Vector register takes the interrupt or exception vector.
// A second instance uses the 32-word vector lookup (VECTOR_ROM32 = 1); its
// Vector register must hold the same addresses.
module tb_bus_logic;
  import lc3_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] dev_irq = '0, grant;
  logic [2:0] cpu_priority = '0, int_priority;
  vecmux_e vectormux = VEC_INT;
  logic ld_vector = 0, int_req;
  word_t vector, vector_rom;
  int checks = 0, failures = 0;

  bus_logic dut (.*);
  bus_logic #(.VECTOR_ROM32(1'b1)) dut_rom (
    .clk, .rst, .dev_irq, .cpu_priority, .vectormux, .ld_vector,
    .int_req (), .int_priority (), .grant (), .vector (vector_rom)
  );
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s irq=%b cpu=%0d", what, dev_irq, cpu_priority); end
  endtask

  int hi;
  initial begin
    @(posedge clk); #1 rst = 0;
    // keyboard alone at priority 4 against a user program at 0
    dev_irq = 8'b0001_0000; cpu_priority = 0; ld_vector = 1; #1;
    check(int_req && int_priority == 3'd4, "keyboard request");
    @(posedge clk); #1 check(vector == 16'h0180 && vector_rom == 16'h0180, "keyboard vector");
    cpu_priority = 3'd7; #1 check(!int_req, "masked while handler runs at 7");
    for (int i = 0; i < 500; i++) begin
      dev_irq = 8'($urandom); cpu_priority = 3'($urandom);
      vectormux = vecmux_e'($urandom % 4); ld_vector = 1;
      #1;
      hi = -1;
      for (int k = 0; k < 8; k++) if (dev_irq[k]) hi = k;
      check(int_req == (hi > int'(cpu_priority)), "INT condition");
      if (hi >= 0) check(int_priority == 3'(hi) && grant == 8'(1 << hi), "IntPriority and grant");
      @(posedge clk); #1;
      if (vectormux == VEC_INT && hi >= 0)
        check(vector == 16'h0180 + 16'((hi + 4) % 8) && vector_rom == vector, "interrupt vector");
      else if (vectormux == VEC_OPC)
        check(vector == 16'h0101 && vector_rom == 16'h0101, "opcode vector");
      else if (vectormux != VEC_INT)
        check(vector == 16'h0100 && vector_rom == 16'h0100, "privilege vector");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
