// tb_intv_vector: checks the Vector register for every priority and every
// VectorMUX code: keyboard (priority 4) gives x0180, privilege x0100,
// illegal opcode x0101; the register holds its value without LD_Vector.
module tb_intv_vector;
  import lc3_pkg::*;
  logic clk = 0, rst = 1;
  logic [2:0] int_priority = '0;
  vecmux_e vectormux = VEC_INT;
  logic ld_vector = 0;
  word_t vector;
  int checks = 0, failures = 0;

  intv_vector dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  word_t e, last;
  initial begin
    @(posedge clk); #1 rst = 0;
    int_priority = 3'd4; vectormux = VEC_INT; ld_vector = 1;
    @(posedge clk); #1 check(vector == 16'h0180, "keyboard vector x0180");
    vectormux = VEC_PRIV;
    @(posedge clk); #1 check(vector == 16'h0100, "privilege vector x0100");
    vectormux = VEC_OPC;
    @(posedge clk); #1 check(vector == 16'h0101, "opcode vector x0101");
    last = vector;
    for (int i = 0; i < 200; i++) begin
      int_priority = 3'($urandom); vectormux = vecmux_e'($urandom % 4); ld_vector = 1'($urandom);
      case (vectormux)
        VEC_INT:  e = 16'h0180 + 16'((int'(int_priority) + 4) % 8);
        VEC_OPC:  e = 16'h0101;
        default:  e = 16'h0100;
      endcase
      if (!ld_vector) e = last;
      @(posedge clk); #1;
      check(vector == e, "vector value");
      check(vector[15:8] == 8'h01, "vector in page x01");
      last = vector;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
