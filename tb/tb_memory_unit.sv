// tb_memory_unit: checks memory writes and reads through the ready signal R
// (one wait cycle at the default setting), the decode of KBSR/KBDR and of
// the rest of the I/O page, and the keyboard strobes.
module tb_memory_unit;
  import lc3_pkg::*;
  logic clk = 0, rst = 1;
  word_t mar = '0, wdata = '0, rdata, kbsr = 16'h8000, kbdr = 16'h0055;
  logic mio_en = 0, r_w = 0, r, kbsr_wr, kbdr_rd;
  int checks = 0, failures = 0;

  memory_unit dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s mar=%h rdata=%h", what, mar, rdata); end
  endtask

  // One access; returns the number of cycles until R and the read data.
  task automatic access(input word_t a, input bit wr, input word_t d, output int waits, output word_t q);
    mar = a; wdata = d; r_w = wr; mio_en = 1; waits = 0;
    #1;
    while (!r) begin @(posedge clk); #1; waits++; end
    q = rdata;
    @(posedge clk); #1;
    mio_en = 0;
  endtask

  word_t ref_mem [word_t];
  word_t a, q;
  int w;
  bit sw, sr;
  initial begin
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 200; i++) begin
      a = 16'($urandom) & 16'h3FFF;
      if ((1'($urandom)) == 0 || !ref_mem.exists(a)) begin
        ref_mem[a] = 16'($urandom);
        access(a, 1, ref_mem[a], w, q);
        check(w == 1, "write waits one cycle");
      end else begin
        access(a, 0, 0, w, q);
        check(w == 1, "read waits one cycle");
        check(q == ref_mem[a], "read data");
      end
    end
    foreach (ref_mem[k]) begin
      access(k, 0, 0, w, q);
      check(q == ref_mem[k], "read back");
    end
    // device registers
    mar = KBSR_ADDR; #1 check(rdata == 16'h8000, "KBSR decode");
    mar = KBDR_ADDR; #1 check(rdata == 16'h0055, "KBDR decode");
    mar = 16'hFE04;  #1 check(rdata == 16'h0000, "unused I/O address reads 0");
    sw = 0; sr = 0;
    fork
      begin access(KBSR_ADDR, 1, 16'h4000, w, q); end
      begin repeat (3) begin @(negedge clk); if (kbsr_wr) sw = 1; end end
    join
    check(sw, "KBSR write strobe");
    fork
      begin access(KBDR_ADDR, 0, 0, w, q); end
      begin repeat (3) begin @(negedge clk); if (kbdr_rd) sr = 1; end end
    join
    check(sr && q == 16'h0055, "KBDR read strobe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
