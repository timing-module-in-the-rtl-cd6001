// Testbench for tim_l1a_queue: L1A BC numbers and calibration bits come out
// in order; a check L1A waiting more than 768 / 960 bx sets L1A_OLD_WARN /
// L1A_TOO_OLD (and not when it waits less); more than 63 pending L1As set
// TOO_MANY_L1A; clr empties the queue and clears the flags.
module tb_tim_l1a_queue;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr, bcres, l1a, calib, pop, empty, head_calib;
  logic too_many_l1a, l1a_old_warn, l1a_too_old;
  logic [11:0] head_bc;
  logic [7:0] pending;
  int checks = 0, failures = 0;
  int t;
  int exp_bc[$];
  logic exp_cal[$];

  tim_l1a_queue dut (.*);

  always @(posedge clk) t <= bcres ? 0 : t + 1;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send_l1a(input logic c);
    @(posedge clk); #1 l1a = 1; calib = c; exp_bc.push_back(t % 4096); exp_cal.push_back(c);
    @(posedge clk); #1 l1a = 0; calib = 0;
  endtask

  task automatic drain();
    #1;
    while (!empty) begin
      int b; logic c;
      b = exp_bc.pop_front(); c = exp_cal.pop_front();
      chk(int'(head_bc) == b && head_calib == c, $sformatf("queue order and content %0d %0d %0d %0d", head_bc, b, head_calib, c));
      pop = 1; @(posedge clk); #1 pop = 0;
    end
    chk(exp_bc.size() == 0, "all entries came out");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; bcres = 0; l1a = 0; calib = 0; pop = 0; t = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1 bcres = 1; @(posedge clk); #1 bcres = 0;
    for (int i = 0; i < 10; i++) begin send_l1a(1'(i % 3 == 0)); repeat ($urandom % 7) @(posedge clk); end
    repeat (300) @(posedge clk);
    drain();
    chk(!l1a_old_warn && !l1a_too_old && !too_many_l1a, "no flag for a short wait");
    // wait 800 bx: warning only
    send_l1a(0);
    repeat (800) @(posedge clk);
    drain();
    chk(l1a_old_warn && !l1a_too_old, "L1A_OLD_WARN after 800 bx");
    clr = 1; @(posedge clk); #1 clr = 0;
    chk(!l1a_old_warn, "clr clears warning");
    // wait 1000 bx: error
    send_l1a(0);
    repeat (1000) @(posedge clk);
    drain();
    chk(l1a_old_warn && l1a_too_old, "L1A_TOO_OLD after 1000 bx");
    clr = 1; @(posedge clk); #1 clr = 0;
    // 63 pending: no flag; 64: flag
    for (int i = 0; i < 63; i++) send_l1a(0);
    @(posedge clk); #1 chk(!too_many_l1a && pending == 63, "63 pending is allowed");
    send_l1a(0);
    @(posedge clk); #1 chk(too_many_l1a, "TOO_MANY_L1A at 64 pending");
    clr = 1; @(posedge clk); #1 clr = 0;
    exp_bc.delete(); exp_cal.delete();
    chk(empty && !too_many_l1a, "clr empties the queue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
