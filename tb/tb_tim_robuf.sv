// Testbench for tim_robuf (DEPTH 16 to keep it short): words come out of
// both buffers in order; the warning appears at 75 % fill, the overflow on
// a write to a full buffer; both only with EN_ROBUF_CHECK; a forced
// difference of the two buffers sets ROBUF_SYNCERR; clr clears everything.
module tb_tim_robuf;
  import tim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr, en_check, we, rd, empty, ovf, warn, syncerr;
  ro_word_t wdata_a, wdata_bx, rdata_a, rdata_bx;
  logic [4:0] level;
  int checks = 0, failures = 0;
  int n;

  tim_robuf #(.DEPTH(16)) dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic put(input int v);
    @(posedge clk); #1 we = 1;
    wdata_a = '{id: ID_EVENT, data: 16'(v)}; wdata_bx = '{id: ID_BCNR, data: 16'(v + 1000)};
    @(posedge clk); #1 we = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; en_check = 1; we = 0; rd = 0; wdata_a = '0; wdata_bx = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 11; i++) put(i);
    #1 chk(!warn && level == 11, "no warning at 11 of 16");
    put(11);
    @(posedge clk); #1 chk(warn && !ovf, "warning at 12 of 16 (75 %)");
    for (int i = 12; i < 16; i++) put(i);
    #1 chk(!ovf, "full but no overflow yet");
    put(99);
    #1 chk(ovf, "overflow on write to full buffer");
    n = 0;
    while (!empty) begin
      chk(rdata_a.data == 16'(n) && rdata_bx.data == 16'(n + 1000) && rdata_bx.id == ID_BCNR, "order");
      rd = 1; @(posedge clk); #1 rd = 0; n++;
    end
    chk(n == 16 && !syncerr, "16 words read, buffers in step");
    clr = 1; @(posedge clk); #1 clr = 0;
    chk(!ovf && !warn, "clr");
    en_check = 0;
    for (int i = 0; i < 17; i++) put(i);
    #1 chk(!ovf && !warn, "no flags without EN_ROBUF_CHECK");
    clr = 1; @(posedge clk); #1 clr = 0;
    // write only ROBUF_A by forcing a write into one FIFO
    @(posedge clk); #1 force dut.u_bx.wr = 1'b0; we = 1;
    @(posedge clk); #1 we = 0; release dut.u_bx.wr;
    @(posedge clk); #1 chk(syncerr, "ROBUF_SYNCERR when the buffers differ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
