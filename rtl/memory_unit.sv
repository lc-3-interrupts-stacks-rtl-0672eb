// memory_unit: main memory, the memory address decoder and the memory
// ready signal R.
//
// The unit sees MAR as the address and MDR as the write data. An access is
// requested by MIO_EN with R.W (1 = write). R goes high WAIT_CYCLES cycles
// after the access starts (0 = the same cycle); the microsequencer holds its
// memory state until R is high, and the read data is valid, or the write is
// performed, in the cycle where R is high.
// The address decoder sends xFE00 (KBSR) and xFE02 (KBDR) to the keyboard
// registers; other addresses of the I/O page xFE00-xFFFF read as 0 and
// ignore writes. Every other address is an ordinary memory word.
// The memory is 2**ADDR_BITS words of 16 bits (64K words by default, the
// LC-3 address space) with a combinational read port. The lecture design
// draws the memory, the decoder and R; the wait count and the decode of
// unused I/O addresses are this design's choices. Memory contents are not
// reset. An assertion checks the handshake: once an access has begun,
// MIO_EN, R.W and the address are held until R.
module memory_unit
  import lc3_pkg::*;
#(
  parameter int unsigned ADDR_BITS   = 16,
  parameter int unsigned WAIT_CYCLES = 1
) (
  input  logic   clk,
  input  logic   rst,
  input  word_t  mar,
  input  word_t  wdata,
  input  logic   mio_en,
  input  logic   r_w,
  output word_t  rdata,
  output logic   r,
  // keyboard registers
  input  word_t  kbsr,
  input  word_t  kbdr,
  output logic   kbsr_wr,
  output logic   kbdr_rd
);
  localparam int unsigned DEPTH = 2 ** ADDR_BITS;

  word_t mem [DEPTH];
  logic  io_page, is_kbsr, is_kbdr;
  logic [7:0] wait_cnt;
  logic [ADDR_BITS-1:0] waddr;

  assign waddr   = mar[ADDR_BITS-1:0];
  assign io_page = (mar[15:9] == 7'b1111111);
  assign is_kbsr = (mar == KBSR_ADDR);
  assign is_kbdr = (mar == KBDR_ADDR);

  // Ready after WAIT_CYCLES cycles of a continuous access.
  assign r = mio_en && (wait_cnt == 8'(WAIT_CYCLES));

  always_ff @(posedge clk) begin
    if (rst || !mio_en || r) wait_cnt <= '0;
    else                     wait_cnt <= wait_cnt + 8'd1;
  end

  always_ff @(posedge clk) begin
    if (mio_en && r_w && r && !io_page) mem[waddr] <= wdata;
  end

  // Handshake rule: once an access has started, MIO_EN, R.W and the address
  // stay unchanged until R.
  logic  pending, pending_rw;
  word_t pending_mar;
  always_ff @(posedge clk) begin
    pending     <= !rst && mio_en && !r;
    pending_rw  <= r_w;
    pending_mar <= mar;
    if (!rst && pending)
      assert (mio_en && r_w == pending_rw && mar == pending_mar)
        else $error("memory access changed before R");
  end

  always_comb begin
    if (is_kbsr)      rdata = kbsr;
    else if (is_kbdr) rdata = kbdr;
    else if (io_page) rdata = '0;
    else              rdata = mem[waddr];
  end

  assign kbsr_wr = mio_en && r_w && r && is_kbsr;
  assign kbdr_rd = mio_en && !r_w && r && is_kbdr;
endmodule
