// lc3_control: LC-3 microsequencer with interrupt, exception and RTI
// states.
//
// A Moore-style FSM: each state drives one control word (ctrl) and picks
// the next state from INT, R (memory ready), BEN, PSR[15] and the opcode.
// State numbers are those of the LC-3 state diagram.
//   Fetch      18 MAR<-PC, PC<-PC+1, branch on INT; 33 MDR<-M (wait R);
//              35 IR<-MDR; 32 decode (BEN loaded), dispatch on IR[15:12].
//   Interrupt  49 Vector<-INTV, PSR[10:8]<-priority, MDR<-PSR, PSR[15]<-0,
//              branch on the old PSR[15]; 45 Saved_USP<-SP, SP<-Saved_SSP
//              (only when leaving user mode); 37 MAR,SP<-SP-1; 41 write
//              (old PSR); 43 MDR<-PC-1; 47 MAR,SP<-SP-1; 48 write (PC);
//              50 MAR<-Vector; 52 MDR<-M; 54 PC<-MDR; back to 18.
//   Exceptions 44 privilege (RTI in user mode): Vector<-x0100, MDR<-PSR,
//              PSR[15]<-0, then 45. 13 illegal opcode 1101: Vector<-x0101,
//              MDR<-PSR, PSR[15]<-0, then 45 or 37 on the old PSR[15].
//   RTI        8 MAR<-SP, to 44 if in user mode; 36 MDR<-M; 38 PC<-MDR;
//              39 MAR,SP<-SP+1; 40 MDR<-M; 42 PSR<-MDR; 34 SP<-SP+1 and
//              branch on the restored PSR[15]: 51 nothing, or 59
//              Saved_SSP<-SP, SP<-Saved_USP; back to 18.
// Those states and their order follow the lecture design. The remaining
// instruction states (ADD, AND, NOT, LEA, LD, LDR, LDI, ST, STR, STI, BR,
// JMP/RET, JSR/JSRR, TRAP) are the standard LC-3 ones, which the lecture
// only refers to; TRAP is the form that saves the return address in R7 and
// loads PC from the trap vector table, with no privilege change. LEA does
// not set the condition codes. Memory states hold until R and load MDR only
// in the cycle where R is high; assertions check both rules.
module lc3_control
  import lc3_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  word_t  ir,
  input  logic   ben,
  input  logic   r,
  input  logic   int_req,
  input  logic   psr15,
  output ctrl_t  ctrl,
  output state_e state
);
  state_e next;

  always_ff @(posedge clk) begin
    if (rst) state <= S18;
    else     state <= next;
  end

  // Memory handshake rules: a memory read loads MDR only in the cycle of R,
  // and a memory state is left only once R has come.
  always_ff @(posedge clk) begin
    if (!rst && ctrl.mio_en) begin
      assert (!ctrl.r_w && ctrl.ld_mdr ? r : 1'b1)
        else $error("MDR loaded from memory without R");
      assert (r || next == state)
        else $error("memory state left before R");
    end
  end

  always_comb begin
    ctrl = CTRL_IDLE;
    next = S18;
    unique case (state)
      // ---------------- fetch / decode ----------------
      S18: begin
        ctrl.gate = G_PC;  ctrl.ld_mar = 1'b1;
        ctrl.ld_pc = 1'b1; ctrl.pcmux = PCMUX_INC;
        next = int_req ? S49 : S33;
      end
      S33: begin
        ctrl.mio_en = 1'b1; ctrl.ld_mdr = r;
        next = r ? S35 : S33;
      end
      S35: begin
        ctrl.gate = G_MDR; ctrl.ld_ir = 1'b1;
        next = S32;
      end
      S32: begin
        ctrl.ld_ben = 1'b1;
        unique case (opcode_e'(ir[15:12]))
          OP_BR:   next = S0;
          OP_ADD:  next = S1;
          OP_LD:   next = S2;
          OP_ST:   next = S3;
          OP_JSR:  next = S4;
          OP_AND:  next = S5;
          OP_LDR:  next = S6;
          OP_STR:  next = S7;
          OP_RTI:  next = S8;
          OP_NOT:  next = S9;
          OP_LDI:  next = S10;
          OP_STI:  next = S11;
          OP_JMP:  next = S12;
          OP_RES:  next = S13;
          OP_LEA:  next = S14;
          OP_TRAP: next = S15;
        endcase
      end
      // ---------------- operate ----------------
      S1, S5, S9: begin
        ctrl.gate = G_ALU; ctrl.sr1mux = SR1_IR86; ctrl.drmux = DR_IR119;
        ctrl.aluk = (state == S1) ? ALU_ADD : (state == S5) ? ALU_AND : ALU_NOT;
        ctrl.ld_reg = 1'b1; ctrl.ld_cc = 1'b1; ctrl.psrmux = PSR_FROM_CTL;
        next = S18;
      end
      S14: begin
        ctrl.gate = G_MARMUX; ctrl.marmux = MARMUX_ADDR;
        ctrl.addr1mux = A1_PC; ctrl.addr2mux = A2_OFF9;
        ctrl.drmux = DR_IR119; ctrl.ld_reg = 1'b1;
        next = S18;
      end
      // ---------------- loads ----------------
      S2, S10, S3, S11: begin
        ctrl.gate = G_MARMUX; ctrl.marmux = MARMUX_ADDR;
        ctrl.addr1mux = A1_PC; ctrl.addr2mux = A2_OFF9; ctrl.ld_mar = 1'b1;
        next = (state == S2) ? S25 : (state == S10) ? S24 : (state == S3) ? S23 : S29;
      end
      S6, S7: begin
        ctrl.gate = G_MARMUX; ctrl.marmux = MARMUX_ADDR; ctrl.sr1mux = SR1_IR86;
        ctrl.addr1mux = A1_BASER; ctrl.addr2mux = A2_OFF6; ctrl.ld_mar = 1'b1;
        next = (state == S6) ? S25 : S23;
      end
      S24, S29: begin
        ctrl.mio_en = 1'b1; ctrl.ld_mdr = r;
        next = r ? ((state == S24) ? S26 : S31) : state;
      end
      S26, S31: begin
        ctrl.gate = G_MDR; ctrl.ld_mar = 1'b1;
        next = (state == S26) ? S25 : S23;
      end
      S25: begin
        ctrl.mio_en = 1'b1; ctrl.ld_mdr = r;
        next = r ? S27 : S25;
      end
      S27: begin
        ctrl.gate = G_MDR; ctrl.drmux = DR_IR119; ctrl.ld_reg = 1'b1;
        ctrl.ld_cc = 1'b1; ctrl.psrmux = PSR_FROM_CTL;
        next = S18;
      end
      // ---------------- stores ----------------
      S23: begin
        ctrl.gate = G_ALU; ctrl.aluk = ALU_PASSA; ctrl.sr1mux = SR1_IR119;
        ctrl.ld_mdr = 1'b1;
        next = S16;
      end
      S16: begin
        ctrl.mio_en = 1'b1; ctrl.r_w = 1'b1;
        next = r ? S18 : S16;
      end
      // ---------------- control transfer ----------------
      S0: next = ben ? S22 : S18;
      S22: begin
        ctrl.ld_pc = 1'b1; ctrl.pcmux = PCMUX_ADDR;
        ctrl.addr1mux = A1_PC; ctrl.addr2mux = A2_OFF9;
        next = S18;
      end
      S12: begin
        ctrl.ld_pc = 1'b1; ctrl.pcmux = PCMUX_ADDR; ctrl.sr1mux = SR1_IR86;
        ctrl.addr1mux = A1_BASER; ctrl.addr2mux = A2_ZERO;
        next = S18;
      end
      S4: next = ir[11] ? S21 : S20;
      S21, S20: begin
        ctrl.gate = G_PC; ctrl.drmux = DR_R7; ctrl.ld_reg = 1'b1;
        ctrl.ld_pc = 1'b1; ctrl.pcmux = PCMUX_ADDR; ctrl.sr1mux = SR1_IR86;
        ctrl.addr1mux = (state == S21) ? A1_PC : A1_BASER;
        ctrl.addr2mux = (state == S21) ? A2_OFF11 : A2_ZERO;
        next = S18;
      end
      S15: begin
        ctrl.gate = G_MARMUX; ctrl.marmux = MARMUX_ZEXT8; ctrl.ld_mar = 1'b1;
        next = S28;
      end
      S28: begin
        ctrl.mio_en = 1'b1; ctrl.ld_mdr = r;
        ctrl.gate = G_PC; ctrl.drmux = DR_R7; ctrl.ld_reg = 1'b1;
        next = r ? S30 : S28;
      end
      S30: begin
        ctrl.gate = G_MDR; ctrl.ld_pc = 1'b1; ctrl.pcmux = PCMUX_BUS;
        next = S18;
      end
      // ---------------- RTI ----------------
      S8: begin
        ctrl.gate = G_ALU; ctrl.aluk = ALU_PASSA; ctrl.sr1mux = SR1_SP;
        ctrl.ld_mar = 1'b1;
        next = psr15 ? S44 : S36;
      end
      S36, S40: begin
        ctrl.mio_en = 1'b1; ctrl.ld_mdr = r;
        next = r ? ((state == S36) ? S38 : S42) : state;
      end
      S38: begin
        ctrl.gate = G_MDR; ctrl.ld_pc = 1'b1; ctrl.pcmux = PCMUX_BUS;
        next = S39;
      end
      S39: begin
        ctrl.sr1mux = SR1_SP; ctrl.spmux = SP_INC; ctrl.gate = G_SP;
        ctrl.ld_mar = 1'b1; ctrl.drmux = DR_SP; ctrl.ld_reg = 1'b1;
        next = S40;
      end
      S42: begin
        ctrl.gate = G_MDR; ctrl.psrmux = PSR_FROM_BUS;
        ctrl.ld_priv = 1'b1; ctrl.ld_priority = 1'b1; ctrl.ld_cc = 1'b1;
        next = S34;
      end
      S34: begin
        ctrl.sr1mux = SR1_SP; ctrl.spmux = SP_INC; ctrl.gate = G_SP;
        ctrl.drmux = DR_SP; ctrl.ld_reg = 1'b1;
        next = psr15 ? S59 : S51;
      end
      S51: next = S18;
      S59: begin
        ctrl.sr1mux = SR1_SP; ctrl.ld_saved_ssp = 1'b1;
        ctrl.spmux = SP_USP; ctrl.gate = G_SP; ctrl.drmux = DR_SP; ctrl.ld_reg = 1'b1;
        next = S18;
      end
      // ---------------- interrupt and exception entry ----------------
      S49, S44, S13: begin
        ctrl.ld_vector = 1'b1;
        ctrl.vectormux = (state == S49) ? VEC_INT : (state == S44) ? VEC_PRIV : VEC_OPC;
        ctrl.gate = G_PSR; ctrl.ld_mdr = 1'b1;
        ctrl.psrmux = PSR_FROM_CTL; ctrl.ld_priv = 1'b1; ctrl.set_priv = 1'b0;
        ctrl.ld_priority = (state == S49);
        next = (state == S44 || psr15) ? S45 : S37;
      end
      S45: begin
        ctrl.sr1mux = SR1_SP; ctrl.ld_saved_usp = 1'b1;
        ctrl.spmux = SP_SSP; ctrl.gate = G_SP; ctrl.drmux = DR_SP; ctrl.ld_reg = 1'b1;
        next = S37;
      end
      S37, S47: begin
        ctrl.sr1mux = SR1_SP; ctrl.spmux = SP_DEC; ctrl.gate = G_SP;
        ctrl.ld_mar = 1'b1; ctrl.drmux = DR_SP; ctrl.ld_reg = 1'b1;
        next = (state == S37) ? S41 : S48;
      end
      S41, S48: begin
        ctrl.mio_en = 1'b1; ctrl.r_w = 1'b1;
        next = r ? ((state == S41) ? S43 : S50) : state;
      end
      S43: begin
        ctrl.gate = G_PCM1; ctrl.ld_mdr = 1'b1;
        next = S47;
      end
      S50: begin
        ctrl.gate = G_VECTOR; ctrl.ld_mar = 1'b1;
        next = S52;
      end
      S52: begin
        ctrl.mio_en = 1'b1; ctrl.ld_mdr = r;
        next = r ? S54 : S52;
      end
      S54: begin
        ctrl.gate = G_MDR; ctrl.ld_pc = 1'b1; ctrl.pcmux = PCMUX_BUS;
        next = S18;
      end
      default: next = S18;
    endcase
  end
endmodule
