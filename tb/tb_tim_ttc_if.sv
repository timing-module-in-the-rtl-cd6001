// Testbench for tim_ttc_if: random broadcasts must give the right BGO code,
// user-message bits and last-message register; the BC number and the two
// event-counter halves are captured from the BCnt bus with their strobes;
// Dout bytes land in the dump memory, individually addressed ones in F.
module tb_tim_ttc_if;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:2] brcst;
  logic brcst_str1, brcst_str2, bcnt_str, evcnt_l_str, evcnt_h_str, dout_str;
  logic [11:0] bcnt, ttc_bcnr;
  logic [7:0] dout, subaddr, subaddr_reg, dump_data, last_msg;
  logic [3:0] dump_addr, bgo_code;
  logic bgo_strb, msg_strb, ttc_bcnr_vld, ttc_evnr_vld;
  logic [1:0] msg_bits;
  logic [23:0] ttc_evnr;
  logic [7:0] ref_dump [16];
  int checks = 0, failures = 0;

  tim_ttc_if dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {brcst_str1, brcst_str2, bcnt_str, evcnt_l_str, evcnt_h_str, dout_str} = '0;
    brcst = 0; bcnt = 0; dout = 0; subaddr = 0; subaddr_reg = 8'h5A; dump_addr = 0;
    for (int i = 0; i < 16; i++) ref_dump[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 50; it++) begin
      logic [5:0] b; logic [11:0] bcn, evl, evh;
      b = 6'($urandom);
      // system broadcast
      @(posedge clk); #1 brcst = b; brcst_str1 = 1;
      @(posedge clk); #1 brcst_str1 = 0; brcst = 6'($urandom);
      chk(bgo_strb && bgo_code == b[3:0] && last_msg[5:2] == b[3:0], "system broadcast");
      @(posedge clk); #1 chk(!bgo_strb, "strobe is one clock");
      // user broadcast
      brcst = b; brcst_str2 = 1;
      @(posedge clk); #1 brcst_str2 = 0;
      chk(msg_strb && msg_bits == b[5:4] && last_msg[7:6] == b[5:4], "user broadcast");
      // L1A sequence: BC, event low, event high
      bcn = 12'($urandom); evl = 12'($urandom); evh = 12'($urandom);
      bcnt = bcn; bcnt_str = 1;
      @(posedge clk); #1 bcnt_str = 0; bcnt = evl; evcnt_l_str = 1;
      chk(ttc_bcnr_vld && ttc_bcnr == bcn, "BC number");
      @(posedge clk); #1 evcnt_l_str = 0; bcnt = evh; evcnt_h_str = 1;
      @(posedge clk); #1 evcnt_h_str = 0; bcnt = 12'($urandom);
      chk(ttc_evnr_vld && ttc_evnr == {evh, evl}, "event number");
      // Dout
      dout = 8'($urandom);
      subaddr = (it % 5 == 0) ? subaddr_reg : 8'($urandom);
      if (subaddr == subaddr_reg) ref_dump[15] = dout; else ref_dump[subaddr[3:0]] = dout;
      dout_str = 1;
      @(posedge clk); #1 dout_str = 0;
    end
    for (int i = 0; i < 16; i++) begin
      dump_addr = 4'(i);
      @(posedge clk); #1 chk(dump_data == ref_dump[i], "dump memory");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
