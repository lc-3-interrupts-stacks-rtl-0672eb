// bus_logic: interrupt side of the memory/IO bus logic.
//
// Device requests arrive on dev_irq, one line per priority level (line i =
// priority i; the keyboard sits on line 4). A priority daisy chain
// (irq_daisy_chain) lets only the highest requesting level drive the shared
// IRQ line, and a priority encoder turns its grant into the 3-bit
// IntPriority. The request is passed to the microsequencer as INT only if
// IntPriority is above the processor's current priority PSR[10:8], so a
// handler that runs at priority 7 is not re-entered. The vector generator
// (intv_vector) turns IntPriority, or an exception code chosen by
// VectorMUX, into the Vector register value. With VECTOR_ROM32 = 1 the
// vector instead comes from the simplified single 32-word lookup
// (vector_rom32) addressed by {VectorMUX, IntPriority} and is loaded into a
// Vector register here; both forms give the same addresses.
// The daisy chain, the encoder and the vector path follow the lecture
// design; the comparison with PSR[10:8] is this design's reading of how a
// higher-priority device interrupts a lower-priority one. INT and
// IntPriority are combinational; Vector is a register.
module bus_logic
  import lc3_pkg::*;
#(
  parameter bit VECTOR_ROM32 = 1'b0   // 0: INTV_ROM + VectorMUX + prefix, 1: 32-word lookup
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] dev_irq,       // request per priority level
  input  logic [2:0] cpu_priority,  // PSR[10:8]
  input  vecmux_e    vectormux,
  input  logic       ld_vector,
  output logic       int_req,       // INT to the microsequencer
  output logic [2:0] int_priority,
  output logic [7:0] grant,
  output word_t      vector
);
  logic irq, valid;

  irq_daisy_chain #(.N(8)) u_chain (
    .req   (dev_irq),
    .grant (grant),
    .irq   (irq)
  );

  priority_encoder u_enc (
    .lines (grant),
    .code  (int_priority),
    .valid (valid)
  );

  assign int_req = irq && valid && (int_priority > cpu_priority);

  if (VECTOR_ROM32) begin : g_rom32
    word_t rom_word;
    vector_rom32 u_rom (
      .addr ({vectormux, int_priority}),
      .data (rom_word)
    );
    always_ff @(posedge clk) begin
      if (rst)            vector <= '0;
      else if (ld_vector) vector <= rom_word;
    end
  end else begin : g_intv
    intv_vector u_vec (
      .clk          (clk),
      .rst          (rst),
      .int_priority (int_priority),
      .vectormux    (vectormux),
      .ld_vector    (ld_vector),
      .vector       (vector)
    );
  end
endmodule
