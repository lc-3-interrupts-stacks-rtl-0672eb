// lc3_datapath: LC-3 datapath with the additions for interrupts,
// exceptions and RTI.
//
// A single 16-bit system bus connects the units; at most one source drives
// it per cycle, chosen by ctrl.gate (GatePC, GateMDR, GateALU, GateMARMUX,
// GateVector, GatePC-1, GatePSR, GateSP). The tri-state drivers of the
// lecture schematic are modelled as a multiplexer. Registers PC, IR, MAR,
// MDR and BEN load at the rising edge on their LD signals.
//   PC    PCMUX 00 PC+1, 01 bus, 10 address adder. PC-1 can be gated to the
//         bus so that an interrupt saves the address of the instruction
//         whose fetch it replaced.
//   MDR   loads the memory read data when MIO_EN is set, else the bus.
//   PSR   see psr; the priority loaded on interrupt entry is 3'b111 when
//         LOAD_MAX_PRIORITY is 1 (the lecture's own LC-3), otherwise the
//         interrupting device's IntPriority (the textbook LC-3).
//   SP    stack_ops, fed from SR1 (the control points SR1MUX at R6).
// The Vector register lives in bus_logic and enters through vector.
// The reset PC (PC_INIT) and the supervisor stack start (SSP_INIT) are this
// design's choices.
module lc3_datapath
  import lc3_pkg::*;
#(
  parameter word_t PC_INIT           = 16'h0200,
  parameter word_t SSP_INIT          = 16'h3000,
  parameter bit    LOAD_MAX_PRIORITY = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  ctrl_t      ctrl,
  input  word_t      mem_rdata,
  input  word_t      vector,
  input  logic [2:0] int_priority,
  output word_t      bus,
  output word_t      pc,
  output word_t      ir,
  output word_t      mar,
  output word_t      mdr,
  output logic       ben,
  output word_t      psr_out,
  output logic [2:0] cpu_priority,
  output word_t      saved_ssp,
  output word_t      saved_usp
);
  word_t      sr1, sr2, alu_y, addr_sum, marmux_out, sp_out, pc_m1;
  logic       priv;
  logic [2:0] nzp, prio_in;

  assign pc_m1   = pc - 16'd1;
  assign prio_in = LOAD_MAX_PRIORITY ? 3'b111 : int_priority;

  reg_file u_rf (
    .clk, .rst, .ir,
    .drmux   (ctrl.drmux),
    .sr1mux  (ctrl.sr1mux),
    .ld_reg  (ctrl.ld_reg),
    .din     (bus),
    .sr1_out (sr1),
    .sr2_out (sr2)
  );

  alu u_alu (.a(sr1), .sr2, .ir, .aluk(ctrl.aluk), .y(alu_y));

  addr_arith u_addr (
    .pc, .base_r(sr1), .ir,
    .addr1mux (ctrl.addr1mux),
    .addr2mux (ctrl.addr2mux),
    .marmux   (ctrl.marmux),
    .sum      (addr_sum),
    .marmux_out
  );

  psr u_psr (
    .clk, .rst, .bus,
    .psrmux       (ctrl.psrmux),
    .ld_priv      (ctrl.ld_priv),
    .ld_priority  (ctrl.ld_priority),
    .ld_cc        (ctrl.ld_cc),
    .set_priv     (ctrl.set_priv),
    .priority_in  (prio_in),
    .psr_out,
    .priv,
    .priority_lvl (cpu_priority),
    .nzp
  );

  stack_ops #(.SSP_INIT(SSP_INIT)) u_sp (
    .clk, .rst,
    .sp_in        (sr1),
    .spmux        (ctrl.spmux),
    .ld_saved_ssp (ctrl.ld_saved_ssp),
    .ld_saved_usp (ctrl.ld_saved_usp),
    .sp_out,
    .saved_ssp,
    .saved_usp
  );

  // System bus.
  always_comb begin
    unique case (ctrl.gate)
      G_PC:     bus = pc;
      G_MDR:    bus = mdr;
      G_ALU:    bus = alu_y;
      G_MARMUX: bus = marmux_out;
      G_VECTOR: bus = vector;
      G_PCM1:   bus = pc_m1;
      G_PSR:    bus = psr_out;
      G_SP:     bus = sp_out;
      default:  bus = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc  <= PC_INIT;
      ir  <= '0;
      mar <= '0;
      mdr <= '0;
      ben <= 1'b0;
    end else begin
      if (ctrl.ld_pc) begin
        unique case (ctrl.pcmux)
          PCMUX_INC:  pc <= pc + 16'd1;
          PCMUX_BUS:  pc <= bus;
          default:    pc <= addr_sum;
        endcase
      end
      if (ctrl.ld_ir)  ir  <= bus;
      if (ctrl.ld_mar) mar <= bus;
      if (ctrl.ld_mdr) mdr <= ctrl.mio_en ? mem_rdata : bus;
      if (ctrl.ld_ben) ben <= (ir[11] & nzp[2]) | (ir[10] & nzp[1]) | (ir[9] & nzp[0]);
    end
  end
endmodule
