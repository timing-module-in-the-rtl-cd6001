// Testbench for tim_ro_rqst_bus: random slow commands, SEND_TESTDATA and
// monitoring requests, often in the same clock. A reference model keeps its
// own pending flags and predicts every bus word (type and data) clock by
// clock, so every request must be sent exactly once and in priority order.
// DIS_RO_BUS is switched on for a while and must silence the bus.
module tb_tim_ro_rqst_bus;
  import tim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic dis, hard_res, send_testdata, mon_rqst, rq_vld;
  bgo_cmd_t bgo;
  logic [15:0] testdata, mon_rqst_id, rq_data;
  logic [1:0] rq_type;
  int checks = 0, failures = 0;
  int s_mon = 0, s_td = 0, s_cmd = 0;

  tim_ro_rqst_bus dut (.*);

  // reference model state
  logic [15:0] m_cmd = 0;
  logic        m_td = 0, m_mon = 0;
  logic        e_vld = 0;
  logic [1:0]  e_type = 0;
  logic [15:0] e_data = 0;

  always @(posedge clk) begin
    logic [15:0] nc;
    if (rst_n) begin
      checks++;
      if (rq_vld != e_vld || (e_vld && (rq_type != e_type || rq_data != e_data))) begin
        failures++;
        $display("FAIL vld=%b type=%b data=%h expected %b %b %h", rq_vld, rq_type, rq_data,
                 e_vld, e_type, e_data);
      end
      if (rq_vld) case (rq_type)
        2'b01: s_cmd++;
        2'b10: s_td++;
        2'b11: s_mon++;
        default: ;
      endcase
      nc = 0;
      {nc[9], nc[8], nc[7], nc[6], nc[5], nc[4], nc[1]} =
        {bgo.test_en, bgo.priv_gap, bgo.priv_orbit, bgo.res_orbit, bgo.start_run,
         bgo.stop_run, hard_res};
      if (dis) begin
        m_cmd = 0; m_td = 0; m_mon = 0; e_vld = 0;
      end else begin
        e_vld = 1;
        if (m_mon)           begin e_type = 2'b11; e_data = mon_rqst_id; m_mon = 0; end
        else if (m_cmd != 0) begin e_type = 2'b01; e_data = m_cmd;       m_cmd = 0; end
        else if (m_td)       begin e_type = 2'b10; e_data = testdata;    m_td = 0;  end
        else e_vld = 0;
        if (mon_rqst) m_mon = 1;
        m_cmd |= nc;
        if (send_testdata) m_td = 1;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dis = 0; hard_res = 0; send_testdata = 0; mon_rqst = 0; bgo = '0;
    testdata = 16'h7E57; mon_rqst_id = 16'h3A11;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      bgo = '0;
      case ($urandom % 8)
        0: bgo.start_run = 1;
        1: bgo.stop_run = 1;
        2: bgo.test_en = 1;
        3: bgo.priv_gap = 1;
        4: bgo.priv_orbit = 1;
        5: bgo.res_orbit = 1;
        default: ;
      endcase
      if ($urandom % 3 != 0) bgo = '0;
      hard_res      = ($urandom % 20 == 0);
      send_testdata = ($urandom % 5 == 0);
      mon_rqst      = ($urandom % 4 == 0);
      if (i % 100 == 0) testdata = 16'($urandom);
      dis = (i >= 1500 && i < 1600);
      @(posedge clk); #1;
      checks++;
      if (dis && rq_vld) begin failures++; $display("FAIL bus active while disabled"); end
    end
    {hard_res, send_testdata, mon_rqst} = '0; bgo = '0; dis = 0;
    repeat (10) @(posedge clk);
    // every kind of message must have been sent
    checks++;
    if (s_mon == 0 || s_cmd == 0 || s_td == 0) begin
      failures++; $display("FAIL kinds sent: %0d %0d %0d", s_mon, s_cmd, s_td);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
