// lc3_pkg: types and constants shared by the LC-3 interrupt-capable processor.
//
// It holds the control word that the microsequencer (lc3_control) drives into
// the datapath, the encodings of the datapath multiplexers, the FSM state
// numbers and the opcode values. The state numbers are those of the LC-3
// microsequencer (18 fetch, 32 decode, 49 interrupt, 44/13 exceptions, 8 RTI,
// ...); the mux encodings of SPMUX, SR1MUX, DRMUX, VectorMUX and PSRMUX
// follow the lecture design. Encodings of the bus source select and of ALUK
// are this design's own choice.
package lc3_pkg;

  localparam int unsigned WORD = 16;
  typedef logic [WORD-1:0] word_t;

  // Memory-mapped keyboard registers.
  localparam word_t KBSR_ADDR = 16'hFE00;
  localparam word_t KBDR_ADDR = 16'hFE02;

  typedef enum logic [3:0] {
    OP_BR  = 4'b0000, OP_ADD = 4'b0001, OP_LD  = 4'b0010, OP_ST  = 4'b0011,
    OP_JSR = 4'b0100, OP_AND = 4'b0101, OP_LDR = 4'b0110, OP_STR = 4'b0111,
    OP_RTI = 4'b1000, OP_NOT = 4'b1001, OP_LDI = 4'b1010, OP_STI = 4'b1011,
    OP_JMP = 4'b1100, OP_RES = 4'b1101, OP_LEA = 4'b1110, OP_TRAP = 4'b1111
  } opcode_e;

  // Microsequencer states, numbered as in the LC-3 state diagram.
  typedef enum logic [5:0] {
    S0  = 6'd0,  S1  = 6'd1,  S2  = 6'd2,  S3  = 6'd3,  S4  = 6'd4,  S5  = 6'd5,
    S6  = 6'd6,  S7  = 6'd7,  S8  = 6'd8,  S9  = 6'd9,  S10 = 6'd10, S11 = 6'd11,
    S12 = 6'd12, S13 = 6'd13, S14 = 6'd14, S15 = 6'd15, S16 = 6'd16, S18 = 6'd18,
    S20 = 6'd20, S21 = 6'd21, S22 = 6'd22, S23 = 6'd23, S24 = 6'd24, S25 = 6'd25,
    S26 = 6'd26, S27 = 6'd27, S28 = 6'd28, S29 = 6'd29, S30 = 6'd30, S31 = 6'd31,
    S32 = 6'd32, S33 = 6'd33, S34 = 6'd34, S35 = 6'd35, S36 = 6'd36, S37 = 6'd37,
    S38 = 6'd38, S39 = 6'd39, S40 = 6'd40, S41 = 6'd41, S42 = 6'd42, S43 = 6'd43,
    S44 = 6'd44, S45 = 6'd45, S47 = 6'd47, S48 = 6'd48, S49 = 6'd49, S50 = 6'd50,
    S51 = 6'd51, S52 = 6'd52, S54 = 6'd54, S59 = 6'd59
  } state_e;

  // Which unit drives the system bus (one tri-state gate per source).
  typedef enum logic [3:0] {
    G_NONE, G_PC, G_MDR, G_ALU, G_MARMUX, G_VECTOR, G_PCM1, G_PSR, G_SP
  } gate_e;

  typedef enum logic [1:0] { PCMUX_INC = 2'b00, PCMUX_BUS = 2'b01, PCMUX_ADDR = 2'b10 } pcmux_e;
  typedef enum logic [1:0] { DR_IR119 = 2'b00, DR_R7 = 2'b01, DR_SP = 2'b10 } drmux_e;
  typedef enum logic [1:0] { SR1_IR119 = 2'b00, SR1_IR86 = 2'b01, SR1_SP = 2'b10 } sr1mux_e;
  typedef enum logic [1:0] { SP_INC = 2'b00, SP_DEC = 2'b01, SP_SSP = 2'b10, SP_USP = 2'b11 } spmux_e;
  typedef enum logic [1:0] { VEC_INT = 2'b00, VEC_PRIV = 2'b01, VEC_OPC = 2'b10, VEC_UNUSED = 2'b11 } vecmux_e;
  typedef enum logic [1:0] { ALU_ADD = 2'b00, ALU_AND = 2'b01, ALU_NOT = 2'b10, ALU_PASSA = 2'b11 } aluk_e;
  typedef enum logic [1:0] { A2_ZERO = 2'b00, A2_OFF6 = 2'b01, A2_OFF9 = 2'b10, A2_OFF11 = 2'b11 } addr2mux_e;
  typedef enum logic { A1_PC = 1'b0, A1_BASER = 1'b1 } addr1mux_e;
  typedef enum logic { MARMUX_ZEXT8 = 1'b0, MARMUX_ADDR = 1'b1 } marmux_e;
  typedef enum logic { PSR_FROM_BUS = 1'b0, PSR_FROM_CTL = 1'b1 } psrmux_e;

  // Control word: one microinstruction's worth of datapath control.
  typedef struct packed {
    logic       ld_mar, ld_mdr, ld_ir, ld_ben, ld_reg, ld_cc, ld_pc;
    logic       ld_priv, ld_priority, ld_saved_ssp, ld_saved_usp, ld_vector;
    gate_e      gate;
    pcmux_e     pcmux;
    drmux_e     drmux;
    sr1mux_e    sr1mux;
    addr1mux_e  addr1mux;
    addr2mux_e  addr2mux;
    marmux_e    marmux;
    spmux_e     spmux;
    vecmux_e    vectormux;
    psrmux_e    psrmux;
    logic       set_priv;   // value written to PSR[15] when PSRMUX selects control
    aluk_e      aluk;
    logic       mio_en;     // memory/IO access this cycle
    logic       r_w;        // 1 = write
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{
    gate: G_NONE, pcmux: PCMUX_INC, drmux: DR_IR119, sr1mux: SR1_IR119,
    addr1mux: A1_PC, addr2mux: A2_ZERO, marmux: MARMUX_ZEXT8, spmux: SP_INC,
    vectormux: VEC_INT, psrmux: PSR_FROM_BUS, aluk: ALU_ADD, default: '0};

endpackage
