// psr: LC-3 processor status register.
//
// Layout: PSR[15] privilege (0 supervisor, 1 user), PSR[10:8] priority,
// PSR[2:0] condition codes N, Z, P. The other bits read as 0. Each field has
// its own load enable (LD_Priv, LD_Priority, LD_CC). PSRMUX picks where the
// fields are loaded from: 0 takes them from the system bus (used by RTI when
// the saved PSR is popped), 1 takes them from the control side: SetPriv for
// the privilege bit, the priority supplied by the interrupt logic, and N/Z/P
// computed from the value on the bus (the condition-code logic).
// All of that follows the lecture design. Reset value (supervisor, priority
// 0, Z set) is this design's choice. Loads take effect at the rising clock
// edge; the output is the register contents.
module psr
  import lc3_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  word_t      bus,          // system bus
  input  psrmux_e    psrmux,
  input  logic       ld_priv,
  input  logic       ld_priority,
  input  logic       ld_cc,
  input  logic       set_priv,     // SetPriv from control
  input  logic [2:0] priority_in,  // priority from control / interrupt logic
  output word_t      psr_out,
  output logic       priv,         // PSR[15]
  output logic [2:0] priority_lvl, // PSR[10:8]
  output logic [2:0] nzp           // PSR[2:0]
);
  logic [2:0] cc_logic;

  // Condition-code logic on the bus value.
  always_comb begin
    if (bus[15])          cc_logic = 3'b100;
    else if (bus == '0)   cc_logic = 3'b010;
    else                  cc_logic = 3'b001;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      priv         <= 1'b0;
      priority_lvl <= 3'd0;
      nzp          <= 3'b010;
    end else begin
      if (ld_priv)     priv         <= (psrmux == PSR_FROM_BUS) ? bus[15]   : set_priv;
      if (ld_priority) priority_lvl <= (psrmux == PSR_FROM_BUS) ? bus[10:8] : priority_in;
      if (ld_cc)       nzp          <= (psrmux == PSR_FROM_BUS) ? bus[2:0]  : cc_logic;
    end
  end

  assign psr_out = {priv, 4'b0000, priority_lvl, 5'b00000, nzp};
endmodule
