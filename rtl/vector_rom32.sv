// vector_rom32: the vector table address as a single 32-word lookup.
//
// A simpler equivalent of the INTV_ROM + VecMUX + prefix path: the 5-bit
// address {VectorMUX[1:0], Priority[2:0]} reads one 16-bit word that is the
// full vector table address.
//   00ppp  hardware interrupt at priority ppp (00100, the keyboard, = x0180)
//   01xxx  privilege exception   = x0100 (low three bits ignored)
//   10xxx  illegal-opcode exception = x0101
//   11xxx  unused, returns x0100
// Only the keyboard word of the 00 group is given by the lecture design; the
// rest of that group uses the same x0180 + ((p - 4) mod 8) rule as
// intv_vector, so both implementations agree word for word. The table is
// computed rather than stored. Purely combinational.
module vector_rom32
  import lc3_pkg::*;
(
  input  logic [4:0] addr,   // {VectorMUX, Priority}
  output word_t      data
);
  always_comb begin
    unique case (addr[4:3])
      2'b00:   data = 16'h0180 + {13'b0, addr[2:0] - 3'd4};
      2'b01:   data = 16'h0100;
      2'b10:   data = 16'h0101;
      default: data = 16'h0100;
    endcase
  end
endmodule
