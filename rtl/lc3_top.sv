// lc3_top: LC-3 processor with vectored, prioritised interrupts, privilege
// and illegal-opcode exceptions, and RTI, attached to 64K words of memory
// and a keyboard interface.
//
// The microsequencer (lc3_control) drives the datapath (lc3_datapath),
// which holds PC, IR, MAR, MDR, the register file, the PSR and the stack
// unit with the saved user and supervisor stack pointers. bus_logic
// resolves device interrupt requests by priority, raises INT toward the
// control when the request outranks the running program, and forms the
// Vector register. The memory unit decodes KBSR (xFE00) and KBDR (xFE02)
// to the keyboard registers (kb_device), whose request enters at priority
// level 4 and is vectored through x0180.
// Ports: key_valid/key_data deliver a typed character; ext_irq brings out
// the request lines of the other seven priority levels, whose devices are
// not part of this design (bit 4 is ORed with the keyboard's request).
// Observation outputs expose PC, PSR, the FSM state, the interrupt request
// seen by the control and the two saved stack pointers.
// VECTOR_ROM32 selects the simplified 32-word vector lookup in place of
// the INTV_ROM/VectorMUX path; LOAD_MAX_PRIORITY is explained in
// lc3_datapath.
// One clock, synchronous active-high reset. After reset the processor is in
// supervisor mode at priority 0 and fetches from PC_INIT.
module lc3_top
  import lc3_pkg::*;
#(
  parameter int unsigned ADDR_BITS         = 16,
  parameter int unsigned WAIT_CYCLES       = 1,
  parameter word_t       PC_INIT           = 16'h0200,
  parameter word_t       SSP_INIT          = 16'h3000,
  parameter bit          LOAD_MAX_PRIORITY = 1'b1,
  parameter bit          VECTOR_ROM32      = 1'b0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       key_valid,
  input  logic [7:0] key_data,
  input  logic [7:0] ext_irq,
  output word_t      pc,
  output word_t      psr,
  output state_e     state,
  output logic       int_req,
  output logic [2:0] int_priority,
  output word_t      saved_ssp,
  output word_t      saved_usp
);
  ctrl_t      ctrl;
  word_t      bus, ir, mar, mdr, mem_rdata, vector, kbsr, kbdr;
  logic       ben, r, kb_irq, kbsr_wr, kbdr_rd;
  logic [2:0] cpu_priority;
  logic [7:0] dev_irq;
  logic [7:0] grant;    // one-hot winner of the daisy chain (internal)

  lc3_control u_ctl (
    .clk, .rst, .ir, .ben, .r, .int_req,
    .psr15 (psr[15]),
    .ctrl, .state
  );

  lc3_datapath #(
    .PC_INIT (PC_INIT), .SSP_INIT (SSP_INIT), .LOAD_MAX_PRIORITY (LOAD_MAX_PRIORITY)
  ) u_dp (
    .clk, .rst, .ctrl, .mem_rdata, .vector, .int_priority,
    .bus, .pc, .ir, .mar, .mdr, .ben,
    .psr_out (psr),
    .cpu_priority, .saved_ssp, .saved_usp
  );

  assign dev_irq = ext_irq | {3'b000, kb_irq, 4'b0000};

  bus_logic #(.VECTOR_ROM32(VECTOR_ROM32)) u_bus (
    .clk, .rst, .dev_irq, .cpu_priority,
    .vectormux (ctrl.vectormux),
    .ld_vector (ctrl.ld_vector),
    .int_req, .int_priority, .grant, .vector
  );

  memory_unit #(.ADDR_BITS (ADDR_BITS), .WAIT_CYCLES (WAIT_CYCLES)) u_mem (
    .clk, .rst, .mar,
    .wdata  (mdr),
    .mio_en (ctrl.mio_en),
    .r_w    (ctrl.r_w),
    .rdata  (mem_rdata),
    .r, .kbsr, .kbdr, .kbsr_wr, .kbdr_rd
  );

  kb_device u_kb (
    .clk, .rst, .key_valid, .key_data, .kbsr_wr, .kbdr_rd,
    .wdata (mdr),
    .kbsr, .kbdr,
    .irq   (kb_irq)
  );
endmodule
