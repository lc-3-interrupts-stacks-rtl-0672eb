// intv_vector: interrupt / exception vector generation and the Vector
// register.
//
// The low byte of the vector comes from VecMUX, steered by VectorMUX[1:0]
// from the microsequencer:
//   00 INTV_ROM[IntPriority]  (I/O hardware interrupt)
//   01 x00                    (privilege exception)
//   10 x01                    (illegal-opcode exception)
//   11 x00                    (unused)
// The high byte is the constant x01, so every vector falls in the vector
// table page x0100-x01FF. The result loads the 16-bit Vector register on
// LD_Vector; state 50 later copies it to MAR.
// The INTV_ROM is 8 words of 8 bits addressed by the 3-bit IntPriority.
// Only the keyboard's entry is fixed by the lecture design: priority 4 gives
// x80, so the keyboard vector is x0180. The other seven entries are this
// design's choice: x80 + ((p - 4) mod 8), which keeps every hardware vector
// inside the interrupt vector table x0180-x01FF. Vector resets to 0.
module intv_vector
  import lc3_pkg::*;
#(
  parameter logic [7:0] PREFIX = 8'h01
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] int_priority,
  input  vecmux_e    vectormux,
  input  logic       ld_vector,
  output word_t      vector
);
  logic [7:0] rom_out, vec_lo;

  // INTV_ROM contents, computed from the address.
  always_comb rom_out = 8'h80 + {5'b0, int_priority - 3'd4};

  always_comb begin
    unique case (vectormux)
      VEC_INT:  vec_lo = rom_out;
      VEC_PRIV: vec_lo = 8'h00;
      VEC_OPC:  vec_lo = 8'h01;
      default:  vec_lo = 8'h00;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)            vector <= '0;
    else if (ld_vector) vector <= {PREFIX, vec_lo};
  end
endmodule
