// addr_arith: LC-3 address arithmetic ("addrArith").
//
// Adds a base, chosen by ADDR1MUX (PC or the SR1 register), and an offset,
// chosen by ADDR2MUX (0, or the sign-extended IR[5:0], IR[8:0] or IR[10:0]).
// MARMUX then picks either that sum or the zero-extended trap vector
// IR[7:0] as the address that can be gated to the bus. Combinational.
// The lecture design only shows the unit; the function is the LC-3
// instruction set's.
module addr_arith
  import lc3_pkg::*;
(
  input  word_t      pc,
  input  word_t      base_r,
  input  word_t      ir,
  input  addr1mux_e  addr1mux,
  input  addr2mux_e  addr2mux,
  input  marmux_e    marmux,
  output word_t      sum,      // to PCMUX
  output word_t      marmux_out
);
  word_t base, off;

  always_comb begin
    base = (addr1mux == A1_BASER) ? base_r : pc;
    unique case (addr2mux)
      A2_ZERO:  off = '0;
      A2_OFF6:  off = {{10{ir[5]}},  ir[5:0]};
      A2_OFF9:  off = {{7{ir[8]}},   ir[8:0]};
      A2_OFF11: off = {{5{ir[10]}},  ir[10:0]};
    endcase
  end

  assign sum        = base + off;
  assign marmux_out = (marmux == MARMUX_ADDR) ? sum : {8'b0, ir[7:0]};
endmodule
