// Testbench for tim_run_control: L1A passes only between START_RUN and
// STOP_RUN and not while inhibited; TEST_ENABLE is set by its command and
// cleared by STOP_RUN; HARD_RES and L1_RESET make CLR_ALL, which stops the
// run; HARD_RES_VME acts without a BGO.
module tb_tim_run_control;
  import tim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bgo_cmd_t bgo;
  logic hard_res_vme, l1a_in, inhibit;
  logic l1a_out, run, test_enable, hard_res, l1_reset, clr_all;
  int checks = 0, failures = 0;

  tim_run_control dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic pulse_cmd(input bgo_cmd_t c);
    @(posedge clk); #1 bgo = c;
    @(posedge clk); #1 bgo = '0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bgo_cmd_t c;
    bgo = '0; hard_res_vme = 0; l1a_in = 0; inhibit = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    l1a_in = 1; #1;
    chk(l1a_out == 0 && run == 0, "no L1A before START");
    c = '0; c.start_run = 1; pulse_cmd(c);
    #1 chk(run == 1 && l1a_out == 1, "L1A after START");
    inhibit = 1; #1 chk(l1a_out == 0, "inhibit");
    inhibit = 0;
    c = '0; c.test_en = 1; pulse_cmd(c);
    #1 chk(test_enable == 1, "TEST_ENABLE set");
    c = '0; c.stop_run = 1; pulse_cmd(c);
    #1 chk(run == 0 && test_enable == 0 && l1a_out == 0, "STOP clears RUN and TEST_ENABLE");
    c = '0; c.start_run = 1; pulse_cmd(c);
    c = '0; c.test_en = 1; pulse_cmd(c);
    @(posedge clk); #1 bgo = '0; bgo.l1_reset = 1; #1;
    chk(l1_reset && clr_all && !hard_res, "L1_RESET makes CLR_ALL");
    @(posedge clk); #1 bgo = '0; #1;
    chk(run == 0 && test_enable == 0, "CLR_ALL clears RUN and TEST_ENABLE");
    c = '0; c.start_run = 1; pulse_cmd(c);
    @(posedge clk); #1 hard_res_vme = 1; #1;
    chk(hard_res && clr_all && !l1_reset, "HARD_RES_VME");
    @(posedge clk); #1 hard_res_vme = 0; #1;
    chk(run == 0, "HARD_RES stops run");
    @(posedge clk); #1 bgo = '0; bgo.hard_reset = 1; #1;
    chk(hard_res && clr_all, "HARD_RESET BGO");
    @(posedge clk); #1 bgo = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
