// priority_encoder: turns the daisy chain's one-hot grant into the 3-bit
// IntPriority that addresses the interrupt vector ROM and is compared with
// the processor priority.
//
// Input line i stands for priority level i. The highest set line wins, so
// the encoder is also correct if more than one line is set. valid is high
// when any line is set. Combinational. The lecture design names the block
// and its output (keyboard: IntPriority = 100); the internals are the usual
// priority encoder.
module priority_encoder (
  input  logic [7:0] lines,
  output logic [2:0] code,
  output logic       valid
);
  always_comb begin
    code  = 3'd0;
    valid = 1'b0;
    for (int i = 0; i < 8; i++) begin
      if (lines[i]) begin
        code  = 3'(i);
        valid = 1'b1;
      end
    end
  end
endmodule
