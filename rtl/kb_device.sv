// kb_device: keyboard interface registers KBSR and KBDR.
//
// KBSR[15] (RDY) is set by the device when it places a new character in
// KBDR and is cleared by a processor read of KBDR. KBSR[14] (EN, interrupt
// enable) is written by the program; it is the only writable KBSR bit.
// The interrupt request is IRQ = RDY & EN. All of this follows the lecture
// design. This design's own choices: KBDR holds the character in bits 7:0
// with bits 15:8 zero, a character arriving in the same cycle as a KBDR read
// leaves RDY set, and a character arriving while RDY is already set
// overwrites KBDR. Both registers reset to 0. Register updates happen at
// the rising edge; kbsr/kbdr/irq are register outputs.
module kb_device
  import lc3_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // keyboard side
  input  logic       key_valid,   // one-cycle strobe: new character
  input  logic [7:0] key_data,
  // processor side (from the memory address decode)
  input  logic       kbsr_wr,     // write KBSR with wdata
  input  logic       kbdr_rd,     // a read of KBDR completes this cycle
  input  word_t      wdata,
  output word_t      kbsr,
  output word_t      kbdr,
  output logic       irq
);
  logic       rdy, en;
  logic [7:0] data;

  always_ff @(posedge clk) begin
    if (rst) begin
      rdy  <= 1'b0;
      en   <= 1'b0;
      data <= '0;
    end else begin
      if (kbsr_wr) en <= wdata[14];
      if (key_valid) begin
        rdy  <= 1'b1;
        data <= key_data;
      end else if (kbdr_rd) begin
        rdy  <= 1'b0;
      end
    end
  end

  assign kbsr = {rdy, en, 14'b0};
  assign kbdr = {8'b0, data};
  assign irq  = rdy & en;
endmodule
