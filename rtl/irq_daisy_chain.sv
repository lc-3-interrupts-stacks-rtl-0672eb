// irq_daisy_chain: priority daisy chain that lets exactly one device drive
// the shared IRQ line.
//
// Devices are ordered from highest priority (index N-1) down to lowest
// (index 0). Each stage ORs its own request into a "busy" signal that runs
// toward the lower-priority stages; a set busy signal blocks the request
// driver of every stage after it. A device therefore drives IRQ only when it
// requests and no higher device does. The tri-state drivers of the original
// are replaced by the one-hot grant vector and an OR, which is what they
// compute when at most one of them is enabled. Combinational. An
// assertion checks that the grant is never more than one-hot.
// The chain structure follows the lecture design; the index order (highest
// index = highest priority, so that a device's index is its priority level)
// is this design's choice.
module irq_daisy_chain #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] req,     // request of each device
  output logic [N-1:0] grant,   // one-hot: which device drives IRQ
  output logic         irq      // the shared IRQ line
);
  logic [N:0] busy;  // busy[i+1]: some device at index > i requests

  always_comb begin
    busy[N] = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      grant[i] = req[i] & ~busy[i+1];
      busy[i]  = busy[i+1] | req[i];
    end
    // the rule the chain exists for: at most one device drives IRQ
    assert ($onehot0(grant)) else $error("two devices drive IRQ");
  end

  assign irq = busy[0];
endmodule
