// Testbench for tim_event_check: the local count follows the L1As, is
// cleared by event-counter reset and HARD_RES, matching TTCrx numbers give
// no error, a wrong one sets BAD_LOCAL_EV, and a wrap sets EVNR_OVF.
module tb_tim_event_check;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic l1a, evcnt_res, hard_res, clr, en_check, ttc_evnr_vld, evnr_ovf, bad_local_ev;
  logic [23:0] ttc_evnr, loc_evnr;
  int checks = 0, failures = 0;
  int ref_cnt;

  tim_event_check dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t loc=%0d ref=%0d", what, $time, loc_evnr, ref_cnt); end
  endtask

  task automatic trigger(input int ttc_offset);
    @(posedge clk); #1 l1a = 1;
    @(posedge clk); #1 l1a = 0; ref_cnt++;
    chk(loc_evnr == 24'(ref_cnt), "count");
    repeat (2) @(posedge clk);
    #1 ttc_evnr = 24'(ref_cnt + ttc_offset); ttc_evnr_vld = 1;
    @(posedge clk); #1 ttc_evnr_vld = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {l1a, evcnt_res, hard_res, clr, ttc_evnr_vld} = '0; en_check = 1; ttc_evnr = 0;
    ref_cnt = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 20; i++) trigger(0);
    chk(!bad_local_ev && !evnr_ovf, "no error while matching");
    @(posedge clk); #1 evcnt_res = 1;
    @(posedge clk); #1 evcnt_res = 0; ref_cnt = 0;
    chk(loc_evnr == 0, "event-counter reset");
    for (int i = 0; i < 5; i++) trigger(0);
    chk(!bad_local_ev, "still matching after reset");
    trigger(1);
    chk(bad_local_ev, "BAD_LOCAL_EV on mismatch");
    @(posedge clk); #1 clr = 1;
    @(posedge clk); #1 clr = 0;
    chk(!bad_local_ev, "clr");
    @(posedge clk); #1 hard_res = 1;
    @(posedge clk); #1 hard_res = 0; ref_cnt = 0;
    chk(loc_evnr == 0, "HARD_RES clears");
    // overflow: preload near the top
    dut.loc_evnr = 24'hFFFFFE; ref_cnt = 24'hFFFFFE;
    trigger(0);
    chk(!evnr_ovf, "no overflow yet");
    @(posedge clk); #1 l1a = 1;
    @(posedge clk); #1 l1a = 0;
    chk(evnr_ovf && loc_evnr == 0, "EVNR_OVF on wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
