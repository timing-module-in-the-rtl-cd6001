// Testbench for tim_l1a_tcs_check: with the delay set to line up the TCS
// L1A with the TTC L1A no mismatch is counted; a missing TTC L1A counts one
// bx of each kind (2 mismatching bx per missing L1A at a wrong delay, 1 when
// the TTC L1A is missing); the counter saturates and sets OV_BAD_TTC.
module tb_tim_l1a_tcs_check;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] dly;
  logic en_check, clr, l1a_tcs, l1a_ttc, l1a_tcs_dly, ov_bad_ttc;
  logic [15:0] bad_cnt;
  int checks = 0, failures = 0;
  int lat;

  tim_l1a_tcs_check dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s cnt=%0d", what, bad_cnt); end
  endtask

  // TCS L1A now, TTC L1A lat bx later (or never)
  task automatic pair(input logic ttc_present);
    @(posedge clk); #1 l1a_tcs = 1;
    @(posedge clk); #1 l1a_tcs = 0;
    repeat (lat - 1) @(posedge clk);
    #1 l1a_ttc = ttc_present;
    @(posedge clk); #1 l1a_ttc = 0;
    repeat (40) @(posedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    l1a_tcs = 0; l1a_ttc = 0; clr = 0; en_check = 1;
    lat = 12;
    dly = 8'hB_F;   // 12 + 0 bx
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 10; i++) pair(1);
    #1 chk(bad_cnt == 0, "aligned L1As give no count");
    pair(0);
    #1 chk(bad_cnt == 1, "missing TTC L1A counted once");
    dly = 8'h5_5;   // 6 + 6 = 12 bx still
    pair(1);
    #1 chk(bad_cnt == 1, "same delay split over two digits");
    dly = 8'hA_F;   // 11 bx: wrong
    pair(1);
    #1 chk(bad_cnt == 3, "wrong delay gives two mismatching bx");
    clr = 1; @(posedge clk); #1 clr = 0;
    chk(bad_cnt == 0, "clr");
    dut.bad_cnt = 16'hFFFE;
    pair(1);
    #1 chk(bad_cnt == 16'hFFFF && ov_bad_ttc, "saturation and overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
