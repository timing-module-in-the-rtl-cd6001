// Testbench for tim_extractor: a model queue and a model ring buffer (data
// = function of the address, one clock read latency) feed the block. For
// every L1A the RO_LENGTH words from the start address on must be written
// in order with their BC numbers and the event/calibration identifier, one
// word per clock, the first two clocks after the L1A is offered.
module tb_tim_extractor;
  import tim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr, q_empty, q_calib, q_pop, robuf_we, busy;
  logic [7:0] ro_length;
  logic [11:0] q_bc;
  logic [9:0] rb_addr;
  logic [15:0] rb_data;
  ro_word_t robuf_a, robuf_bx;
  int checks = 0, failures = 0;
  int qbc[$]; logic qcal[$];
  int ebc[$]; logic ecal[$];
  int cyc, offered_at, first_at, last_we;
  logic first_seen;

  tim_extractor dut (.*);

  function automatic logic [15:0] rbf(input logic [9:0] a);
    return {a, 6'(a * 7)} ^ 16'h5A5A;
  endfunction

  // model queue outputs, refreshed whenever the model queue changes
  task automatic upd();
    q_empty = (qbc.size() == 0);
    q_bc    = q_empty ? 12'd0 : 12'(qbc[0]);
    q_calib = q_empty ? 1'b0 : qcal[0];
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    rb_data <= rbf(rb_addr);
    if (rst_n && robuf_we) begin
      int b; logic c;
      b = ebc.pop_front(); c = ecal.pop_front();
      chk(robuf_bx.id == ID_BCNR && int'(robuf_bx.data) == (b % 4096), "BC word");
      chk(robuf_a.data == rbf(10'(b)), "data word");
      chk(robuf_a.id == (c ? ID_CALIB : ID_EVENT), "identifier");
      if (!first_seen) begin first_seen = 1; first_at = cyc; end
      last_we = cyc;
    end
  end

  always @(posedge clk) begin
    if (rst_n && q_pop) begin
      void'(qbc.pop_front()); void'(qcal.pop_front());
      #1 upd();
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic offer(input int start, input logic c);
    qbc.push_back(start); qcal.push_back(c);
    for (int k = 0; k < int'(ro_length); k++) begin ebc.push_back(start + k); ecal.push_back(c); end
    upd();
  endtask

  initial begin
    cyc = 0; clr = 0; upd(); ro_length = 8'd3; first_seen = 0; last_we = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);
    #1 offered_at = cyc; offer(100, 0);
    repeat (20) @(posedge clk);
    #1 chk(first_at - offered_at == 2, "first word two clocks after the L1A is offered");
    chk(ebc.size() == 0, "all three words written");
    // burst of L1As with different lengths
    ro_length = 8'd5;
    offered_at = cyc;
    for (int i = 0; i < 20; i++) offer(int'($urandom % 4000), 1'($urandom));
    offer(1022, 1);   // wraps around the ring-buffer end
    repeat (200) @(posedge clk);
    #1 chk(ebc.size() == 0 && !busy, "burst drained");
    chk(last_we - offered_at <= 21 * 6 + 2, "about one word per clock");
    ro_length = 8'd0;
    offer(5, 0);
    repeat (10) @(posedge clk);
    #1 chk(qbc.size() == 0 && !busy, "RO_LENGTH = 0 extracts nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
