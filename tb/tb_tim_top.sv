// End-to-end testbench for tim_top at its default parameters (full-size:
// 3564-bx orbit, 4k BC-Table, 1k ring buffer and readout buffers).
// A TTCrx model sends a BCRES every 3564 bx, L1As and BGO commands; the bus
// model programs and reads the registers over VME. Checkers:
//  - backplane: every cycle, every slot must show the internal
//    L1A/RESET/EVCNT_RES/BCRES pulses coded on {L1a, Reset} and BCRES,
//    delayed by that slot's programmed delays, zero when the slot is
//    disabled or the crate is not RUNNING;
//  - readout: each event record on the Channel Link must hold IDENTIFIER,
//    the event number, RO_LENGTH consecutive BC numbers with the ring-buffer
//    words written at the L1A's bunch crossing and after it, the word count
//    and EOF_VALUE; monitoring words must appear on the other phase;
//  - registers, status flags, Fast Signals and the frozen ring buffer;
//  - the suppressed-L1A count, against a reference count, every cycle;
//  - Readout Request bus words and the orbit monitor.
// Every mechanism is counted when it happens; a mechanism never seen is a
// failure. The test runs these phases: setup, TTC-driven triggers with a
// stalling GTFE, phase inversion, the other L1A sources, XOFF inhibit, BC-Table
// generation, periodic BCRES, bunch-counter and TTC error checks, TCS
// comparison, ring-buffer freeze, L1 reset, a trigger burst that overflows
// the queue and buffers, hard reset and the interlock.
module tb_tim_top;
  import tim_pkg::*;

  localparam int ORBIT = 3564;
  localparam int HD = 4096;           // cycle-history depth

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // DUT ports
  logic        ttc_l1accept = 0, ttc_brcst_str1 = 0, ttc_brcst_str2 = 0, ttc_evcntres = 0;
  logic        ttc_bcntres = 0, ttc_bcnt_str = 0, ttc_evcnt_l_str = 0, ttc_evcnt_h_str = 0;
  logic [7:2]  ttc_brcst = 0;
  logic [11:0] ttc_bcnt = 0;
  logic [7:0]  ttc_dout = 0, ttc_subaddr = 0;
  logic        ttc_dout_str = 0, ttc_ready = 1, ttc_sinerr = 0, ttc_dberr = 0, ttc_reset;
  logic        l1a_x = 0, orbit_x = 0, l1a_pan, reset_pan, bcres_pan;
  logic        btn_inactive = 0, btn_running = 0, set_running = 0;
  logic        led_running, led_inactive, led_l1a;
  logic        l1a_tcs = 0, tcs_bgo_strb = 0, l1a_inhibit = 0;
  logic [3:0]  tcs_bgo_code = 0;
  logic        tim_err, tim_out_of_sync, tim_warning, tim_ready, tim_busy;
  logic [N_SLOTS-1:0] bp_l1a, bp_reset, bp_bcres;
  logic [15:0] orbit_mon_rate = 0;
  logic        orbit_cnt_reset;
  logic [31:0] xoff_l1a_count;
  int unsigned xoff_ref = 0;
  logic        ro_rqst_vld;
  logic [1:0]  ro_rqst_type;
  logic [15:0] ro_rqst_data;
  logic        drivers_en, mon_rqst, gtfe_ready = 1, mon_vld = 0, link_en;
  ro_word_t    mon_word = '0;
  logic [27:0] link_a, link_b;
  logic        vme_we = 0, vme_re = 0, vme_rvld;
  logic [17:0] vme_addr = 0;
  logic [15:0] vme_wdata = 0, vme_rdata;

  tim_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(input string s);
    failures++;
    if (failures < 30) $display("FAIL @%0d: %s", cyc, s);
  endtask

  task automatic check(input logic ok, input string s);
    checks++;
    if (!ok) fail(s);
  endtask

  // ---------------- mechanism counters ----------------
  typedef enum int {
    M_SETUP_READY, M_BUSY_BEFORE_SETUP, M_VME_REG, M_L1A_TTC, M_L1A_VME, M_L1A_LEMO,
    M_L1A_PER, M_L1A_TCS, M_BLOCK_NOT_RUN, M_INHIBIT, M_BP_L1A, M_BP_RESET,
    M_BP_EVRES, M_BP_BCRES, M_SLOT_DISABLED, M_INTERLOCK_BLOCK, M_PAN_L1A,
    M_RECORD, M_GTFE_STALL, M_IDLE_WORD, M_MON_WORD, M_INVERT, M_BGO_TTC_START,
    M_BGO_PER_STOP, M_BCRES_PER, M_MON_RQST, M_BAD_MAX_BC, M_DBERR, M_TCS_BAD,
    M_FREEZE_READ, M_L1_RESET, M_TOO_MANY, M_OLD_WARN, M_TOO_OLD, M_ROBUF_WARN,
    M_ROBUF_OVF, M_FREEZE_ON_ERR, M_HARD_RESET, M_TTC_RESET, M_EVNR_READ,
    M_EVCNT_RES, M_CRATE_DELAY, M_ORBIT_MON, M_RQ_CMD, M_RQ_TESTDATA, M_RQ_MON,
    M_RQ_DISABLED, M_NUM
  } mech_e;
  int mech [M_NUM];
  int orbit_req = 0;
  int rq_words = 0;
  localparam logic [15:0] TESTDATA = 16'h7E57, MON_ID = 16'h3A11;

  // ---------------- VME bus model ----------------
  task automatic vme_write(input logic [17:0] a, input logic [15:0] d);
    @(posedge clk); #1 vme_we = 1; vme_addr = a; vme_wdata = d;
    @(posedge clk); #1 vme_we = 0;
  endtask

  task automatic vme_read(input logic [17:0] a, output logic [15:0] d);
    @(posedge clk); #1 vme_re = 1; vme_addr = a;
    @(posedge clk); #1 vme_re = 0;
    @(posedge clk); #1;
    check(vme_rvld, "VME read not acknowledged");
    d = vme_rdata;
  endtask

  task automatic tick(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // ---------------- TTCrx model ----------------
  logic bc0_on = 0;
  int   tb_bc = 0;
  always @(posedge clk) begin
    if (bc0_on) begin
      tb_bc <= (tb_bc == ORBIT - 1) ? 0 : tb_bc + 1;
      ttc_bcntres <= #1 (tb_bc == ORBIT - 1);
    end
  end

  task automatic ttc_l1a();
    @(posedge clk); #1 ttc_l1accept = 1;
    @(posedge clk); #1 ttc_l1accept = 0;
  endtask

  task automatic ttc_bgo(input logic [3:0] code);
    @(posedge clk); #1 ttc_brcst = {2'b00, code}; ttc_brcst_str1 = 1;
    @(posedge clk); #1 ttc_brcst_str1 = 0;
    tick(2);
  endtask

  // ---------------- register shadows ----------------
  logic [15:0] dly_tb [N_SLOTS];
  logic [15:0] dis_tb, dly_pan_tb, command_tb, rocmd_tb;
  int          ro_len = 4;
  logic [15:0] ident = 16'hA5C3, eofv = 16'hE0F1, idlev = 16'h1D1E;

  function automatic int dl(input logic [3:0] h, input logic [3:0] l);
    return int'((h + 4'd1)) % 16 + int'((l + 4'd1)) % 16;
  endfunction

  // ---------------- backplane checker ----------------
  logic [1:0] code_h [64];
  logic       bcres_h [64];
  logic       bp_chk = 0;
  always @(posedge clk) begin
    logic [1:0] c;
    c = dut.evcnt_res ? 2'b11 : dut.l1a ? 2'b10 : dut.l1_reset ? 2'b01 : 2'b00;
    code_h[cyc % 64]  = c;
    bcres_h[cyc % 64] = dut.bcres;
    if (bp_chk) begin
      for (int s = 0; s < N_SLOTS; s++) begin
        int dlc, dbc;
        logic dis;
        logic [1:0] ec;
        logic eb;
        dlc = dl(dly_tb[s][15:12], dly_tb[s][11:8]);
        dbc = dl(dly_tb[s][7:4], dly_tb[s][3:0]);
        dis = (s < 16) ? dis_tb[s ^ 1] : command_tb[11];
        ec  = (dis || !drivers_en) ? 2'b00 : code_h[(cyc - dlc) % 64];
        eb  = (dis || !drivers_en) ? 1'b0 : bcres_h[(cyc - dbc) % 64];
        checks++;
        if ({bp_l1a[s], bp_reset[s]} != ec || bp_bcres[s] != eb)
          fail($sformatf("slot %0d lines %b%b%b expected %b%b", s, bp_l1a[s], bp_reset[s],
                         bp_bcres[s], ec, eb));
        if (!dis && drivers_en) begin
          if (ec == 2'b10) mech[M_BP_L1A]++;
          if (ec == 2'b01) mech[M_BP_RESET]++;
          if (ec == 2'b11) mech[M_BP_EVRES]++;
          if (eb)          mech[M_BP_BCRES]++;
        end
        if (dis && code_h[(cyc - dlc) % 64] == 2'b10 && drivers_en) mech[M_SLOT_DISABLED]++;
      end
      if (!drivers_en && code_h[cyc % 64] == 2'b10) mech[M_INTERLOCK_BLOCK]++;
      begin
        int dp;
        dp = dl(dly_pan_tb[15:12], dly_pan_tb[11:8]);
        checks++;
        if (l1a_pan != (code_h[(cyc - dp) % 64] == 2'b10)) fail("front-panel L1A");
        if (l1a_pan) mech[M_PAN_L1A]++;
      end
    end
  end

  // ---------------- suppressed-L1A counter ----------------
  // Sampled mid-cycle, when the inputs of the next clock edge are stable.
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (xoff_l1a_count != xoff_ref) fail("suppressed-L1A count");
      if (dut.bgo.start_run || dut.hard_res) xoff_ref = 0;
      else if (dut.l1a_sel && dut.run && l1a_inhibit) xoff_ref++;
    end else xoff_ref = 0;
  end

  // ---------------- source and gating observation ----------------
  always @(posedge clk) begin
    if (dut.l1a) begin
      case (dut.command[2:0])
        3'b000: mech[M_L1A_VME]++;
        3'b001: mech[M_L1A_TTC]++;
        3'b010: mech[M_L1A_LEMO]++;
        3'b011: mech[M_L1A_PER]++;
        3'b100: mech[M_L1A_TCS]++;
        default: ;
      endcase
    end
    if (dut.l1a_sel && !dut.run) mech[M_BLOCK_NOT_RUN]++;
    if (dut.l1a_sel && dut.run && l1a_inhibit) begin
      mech[M_INHIBIT]++;
      check(!dut.l1a, "inhibited L1A passed");
    end
    if (dut.bcres && dut.command[5:3] == 3'b011) mech[M_BCRES_PER]++;
    if (mon_rqst) mech[M_MON_RQST]++;
    if (dut.orbit_mon_trig) begin
      orbit_req++;
      check(mon_rqst, "statistics request not on MON_RQST");
    end
    if (!gtfe_ready && dut.rop_busy) mech[M_GTFE_STALL]++;
    if (dut.evcnt_res) mech[M_EVCNT_RES]++;
    if (ro_rqst_vld && rst_n) begin
      rq_words++;
      case (ro_rqst_type)
        2'b01: begin
          checks++;
          if (ro_rqst_data == 0) fail("empty slow command on the request bus");
          mech[M_RQ_CMD]++;
        end
        2'b10: begin
          checks++;
          if (ro_rqst_data != TESTDATA) fail("test data on the request bus");
          mech[M_RQ_TESTDATA]++;
        end
        2'b11: begin
          checks++;
          if (ro_rqst_data != MON_ID) fail("monitoring ID on the request bus");
          mech[M_RQ_MON]++;
        end
        default: fail("request bus type 00");
      endcase
    end
    if (orbit_cnt_reset) begin
      mech[M_ORBIT_MON]++;
      check(dut.bcres && orbit_mon_rate != 0, "orbit counter reset outside BCRES");
    end
  end

  // ---------------- readout checker ----------------
  // ring-buffer write data and BCRES by cycle, L1As seen by the readout
  logic [15:0] wd_h [HD];
  logic        rbres_h [HD];
  typedef struct { int c; int bc; } l1a_rec_t;
  l1a_rec_t exp_q [$];
  logic ro_chk = 0;
  int   exp_evnr = 0;
  logic [15:0] shadow [1024];

  always @(posedge clk) begin
    wd_h[cyc % HD]    = dut.ribuf_wdata;
    rbres_h[cyc % HD] = dut.bcres;
    if (!dut.freeze) shadow[dut.wr_bc[9:0]] = dut.ribuf_wdata;
    if (dut.l1a && !dut.rocmd[1] && ro_chk) exp_q.push_back('{c: cyc, bc: int'(dut.wr_bc)});
  end

  ro_word_t rec [$];
  logic [27:0] ev_ph, mon_ph;
  logic        mon_vld_q = 0, inv_q = 0;
  ro_word_t    mon_word_q;
  always @(posedge clk) begin
    // the link words were formed in the previous clock
    ev_ph  = inv_q ? link_b : link_a;
    mon_ph = inv_q ? link_a : link_b;
    if (link_en && ro_chk) begin
      if (ev_ph[27:26] == 2'b01) begin
        rec.push_back(ro_word_t'(ev_ph[17:0]));
        if (inv_q) mech[M_INVERT]++;
        if (rec.size() == 5 + 2 * ro_len) check_record();
      end else begin
        checks++;
        if (ev_ph[27:26] != 2'b00 || ev_ph[15:0] != idlev) fail("event phase not IDLE");
        mech[M_IDLE_WORD]++;
      end
      if (mon_vld_q) begin
        checks++;
        if (mon_ph[27:26] != 2'b10 || ro_word_t'(mon_ph[17:0]) != mon_word_q)
          fail("monitoring word");
        else mech[M_MON_WORD]++;
      end
    end
    mon_vld_q  = mon_vld;
    mon_word_q = mon_word;
    inv_q      = dut.rocmd[0];
  end

  task automatic check_record();
    l1a_rec_t e;
    logic stale;
    checks++;
    if (exp_q.size() == 0) begin
      fail("record without L1A");
      rec.delete();
      return;
    end
    e = exp_q.pop_front();
    exp_evnr++;
    stale = 0;
    for (int k = 0; k < ro_len; k++) if (rbres_h[(e.c + k) % HD]) stale = 1;
    if (rec[0].id != 2'b00 || rec[0].data != ident) fail("record IDENTIFIER");
    if ({rec[1].data[7:0], rec[2].data} != 24'(exp_evnr))
      fail($sformatf("event number %0d expected %0d", {rec[1].data[7:0], rec[2].data}, exp_evnr));
    for (int k = 0; k < ro_len; k++) begin
      ro_word_t bx, d;
      bx = rec[3 + 2 * k];
      d  = rec[4 + 2 * k];
      if (bx.id != ID_BCNR || bx.data != 16'((e.bc + k) % 4096))
        fail($sformatf("record BC number %0d expected %0d", bx.data, e.bc + k));
      if (d.id != ID_EVENT && d.id != ID_CALIB) fail("record data identifier");
      if (!stale && d.data != wd_h[(e.c + k) % HD])
        fail($sformatf("record data bx %0d: %h expected %h", k, d.data, wd_h[(e.c + k) % HD]));
    end
    if (rec[3 + 2 * ro_len].data != 16'(3 + 2 * ro_len)) fail("record word count");
    if (rec[4 + 2 * ro_len].data != eofv) fail("record EOR");
    mech[M_RECORD]++;
    rec.delete();
  endtask

  // random GTFE_READY stalls and monitoring words
  logic stall_on = 0;
  always @(posedge clk) begin
    if (stall_on) gtfe_ready <= #1 ($urandom % 4 != 0);
    mon_vld  <= #1 ($urandom % 3 == 0);
    mon_word <= #1 ro_word_t'($urandom);
  end

  task automatic wait_readout_idle();
    int n = 0;
    while ((exp_q.size() != 0 || rec.size() != 0 || dut.rop_busy) && n < 20000) begin
      tick(1);
      n++;
    end
    check(exp_q.size() == 0 && rec.size() == 0, "readout did not drain");
  endtask

  task automatic l1a_series(input int n);
    for (int i = 0; i < n; i++) begin
      ttc_l1a();
      tick(20 + $urandom % 200);
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    #20_000_000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test sequence ----------------
  initial begin
    logic [15:0] v;
    foreach (mech[i]) mech[i] = 0;
    tick(4);
    rst_n = 1;
    tick(2);

    // reset state
    check(tim_busy && !tim_ready, "busy before setup");
    if (tim_busy) mech[M_BUSY_BEFORE_SETUP]++;
    vme_read(A_COMMAND, v);
    check(v == 16'h0001, "COMMAND reset value");
    vme_read(A_CHIP_ID_L, v);
    check(v == 16'h4201, "CHIP_ID_L");

    // setup
    for (int s = 0; s < N_SLOTS; s++) begin
      dly_tb[s] = 16'($urandom);
      vme_write(A_DLY_BASE + 18'(2 * s), dly_tb[s]);
    end
    dis_tb = 16'($urandom) | 16'h0003;
    vme_write(A_DIS_BOARDS, dis_tb);
    dly_pan_tb = 16'h37FF;
    vme_write(A_DLY_PAN, dly_pan_tb);
    vme_write(A_DLY_TIM, 16'h5555);
    vme_write(A_DLY_CRATE_TTC, 16'd0);
    vme_write(A_ROBUF_PAR, 16'(ro_len));
    vme_write(A_IDENTIFIER, ident);
    vme_write(A_EOF_VALUE, eofv);
    vme_write(A_IDLE_VALUE, idlev);
    vme_write(A_TESTDATA, TESTDATA);
    vme_write(A_MON_RQST_ID, MON_ID);
    rocmd_tb = 16'h0800 | 16'h0040 | 16'h0020 | 16'h0010;
    vme_write(A_ROCMD, rocmd_tb);
    command_tb = 16'h8000 | 16'h0001 | (16'h1 << 3) | (16'h1 << 6) | (16'h1 << 8);
    vme_write(A_COMMAND, command_tb);
    for (int s = 0; s < N_SLOTS; s += 5) begin
      vme_read(A_DLY_BASE + 18'(2 * s), v);
      check(v == dly_tb[s], "delay register read-back");
      mech[M_VME_REG]++;
    end
    vme_read(A_COMMAND, v);
    check(v == command_tb, "COMMAND read-back");
    tick(2);
    check(tim_ready && !tim_busy, "TIM_READY after setup");
    if (tim_ready) mech[M_SETUP_READY]++;

    // the readout counters are aligned by the first BCRES
    bc0_on = 1;
    tick(ORBIT + 40);
    bp_chk = 1;
    ro_chk = 1;

    // L1As before START_RUN and before RUNNING are blocked
    ttc_l1a();
    tick(10);
    ttc_bgo(BGO_START_RUN);
    check(dut.run, "START_RUN from TTC");
    if (dut.run) mech[M_BGO_TTC_START]++;
    ttc_l1a();
    tick(10);
    btn_running = 1; tick(1); btn_running = 0; tick(1);
    check(drivers_en && led_running, "RUNNING state");

    // TTC triggers with a stalling GTFE
    stall_on = 1;
    l1a_series(30);
    wait_readout_idle();

    // event-counter reset from TTC
    @(posedge clk); #1 ttc_evcntres = 1;
    @(posedge clk); #1 ttc_evcntres = 0;
    exp_evnr = 0;
    tick(40);
    l1a_series(3);
    wait_readout_idle();
    vme_read(A_LOC_EVNR_L, v);
    check(v == 16'd3, "local event number after three L1As");
    if (v == 16'd3) mech[M_EVNR_READ]++;

    // phases swapped
    rocmd_tb[0] = 1;
    vme_write(A_ROCMD, rocmd_tb);
    l1a_series(8);
    wait_readout_idle();
    rocmd_tb[0] = 0;
    vme_write(A_ROCMD, rocmd_tb);

    // other L1A sources
    command_tb[2:0] = 3'b000;
    vme_write(A_COMMAND, command_tb);
    for (int i = 0; i < 4; i++) begin
      vme_write(A_CMD_STATUS, 16'h0800);
      tick(100);
    end
    command_tb[2:0] = 3'b010;
    vme_write(A_COMMAND, command_tb);
    for (int i = 0; i < 4; i++) begin
      l1a_x = 1; tick(3); l1a_x = 0; tick(100);
    end
    command_tb[2:0] = 3'b100;
    vme_write(A_COMMAND, command_tb);
    for (int i = 0; i < 4; i++) begin
      l1a_tcs = 1; tick(1); l1a_tcs = 0; tick(100);
    end
    command_tb[2:0] = 3'b001;
    vme_write(A_COMMAND, command_tb);
    wait_readout_idle();

    // external inhibit
    l1a_inhibit = 1;
    ttc_l1a();
    tick(5);
    ttc_l1a();
    tick(5);
    check(xoff_l1a_count >= 2, "suppressed L1As counted");
    l1a_inhibit = 0;

    // BC-Table: L1A at bx 500, monitoring request at bx 900, then STOP_RUN
    vme_write(A_BC_TABLE + 18'(2 * 500), 16'h0100);
    vme_write(A_BC_TABLE + 18'(2 * 900), 16'h0200);
    vme_read(A_BC_TABLE + 18'(2 * 500), v);
    check(v == 16'h0100, "BC-Table read-back");
    command_tb[2:0] = 3'b011;
    vme_write(A_COMMAND, command_tb);
    tick(3 * ORBIT);
    wait_readout_idle();
    vme_write(A_BC_TABLE + 18'(2 * 2000), 16'h0010 | 16'(BGO_STOP_RUN));
    command_tb[7:6] = 2'b10;
    vme_write(A_COMMAND, command_tb);
    tick(ORBIT + 10);
    check(!dut.run, "periodic STOP_RUN");
    if (!dut.run) mech[M_BGO_PER_STOP]++;
    command_tb[7:6] = 2'b01;
    command_tb[2:0] = 3'b001;
    vme_write(A_COMMAND, command_tb);
    ttc_bgo(BGO_START_RUN);
    vme_write(A_CMD_STATUS, 16'h2000);   // monitoring request by VME

    // readout-request bus: test data, then the bus disabled
    vme_write(A_CMD_STATUS, 16'h1000);
    tick(3);
    command_tb[10] = 1;
    vme_write(A_COMMAND, command_tb);
    tick(1);
    begin
      int w0;
      w0 = rq_words;
      vme_write(A_CMD_STATUS, 16'h3000);
      tick(5);
      check(rq_words == w0, "request bus silent while disabled");
      if (rq_words == w0) mech[M_RQ_DISABLED]++;
    end
    command_tb[10] = 0;
    vme_write(A_COMMAND, command_tb);

    // statistics readout every second orbit: orbit reset, then a request
    begin
      int n0, r0;
      orbit_mon_rate = 2;
      n0 = mech[M_ORBIT_MON];
      r0 = orbit_req;
      tick(4 * ORBIT + 10);
      check(mech[M_ORBIT_MON] - n0 == 2, "orbit reset every second orbit");
      check(orbit_req - r0 == 2, "monitoring request after each orbit reset");
      orbit_mon_rate = 0;
    end

    // periodic BCRES from the local orbit counter, then back to TTC
    command_tb[5:3] = 3'b011;
    vme_write(A_COMMAND, command_tb);
    tick(2 * ORBIT);
    command_tb[5:3] = 3'b001;
    vme_write(A_COMMAND, command_tb);

    // crate delay of the TTC BCRES: 1 + DLY_CRATE_TTC bx after the input
    begin
      int t0;
      wait (ttc_bcntres);
      t0 = cyc;
      wait (dut.bcres_ttc);
      check(cyc - t0 == 1, "crate delay 1 bx");
      vme_write(A_DLY_CRATE_TTC, 16'd7);
      wait (ttc_bcntres);
      t0 = cyc;
      wait (dut.bcres_ttc);
      check(cyc - t0 == 8, "crate delay 8 bx");
      if (cyc - t0 == 8) mech[M_CRATE_DELAY]++;
      vme_write(A_DLY_CRATE_TTC, 16'd0);
    end
    tick(ORBIT);

    // TCS/TTC L1A comparison: a TCS L1A without a TTC L1A
    rocmd_tb[7] = 1;
    vme_write(A_ROCMD, rocmd_tb);
    l1a_tcs = 1; tick(1); l1a_tcs = 0; tick(10);
    vme_read(A_BAD_L1A_TTC, v);
    check(v == 16'd1, "BAD_L1A_TTC count");
    if (v == 16'd1) mech[M_TCS_BAD]++;
    rocmd_tb[7] = 0;
    vme_write(A_ROCMD, rocmd_tb);

    // ring buffer frozen and read by VME
    wait_readout_idle();
    rocmd_tb[2:1] = 2'b11;
    vme_write(A_ROCMD, rocmd_tb);
    tick(2);
    for (int i = 0; i < 16; i++) begin
      int a = $urandom % 1024;
      vme_read(A_RING_BUFFER + 18'(2 * a), v);
      check(v == shadow[a], "frozen ring buffer word");
      if (v == shadow[a]) mech[M_FREEZE_READ]++;
    end
    rocmd_tb[2:1] = 2'b00;
    vme_write(A_ROCMD, rocmd_tb);
    tick(1100);

    // TTC dump register, RESET_TTCRX flip-flop
    vme_write(A_CMD_STATUS, 16'h8000);
    check(ttc_reset, "RESET_TTCRX set");
    vme_write(A_CMD_STATUS, 16'h4000);
    check(!ttc_reset, "RESET_TTCRX cleared");
    if (!ttc_reset) mech[M_TTC_RESET]++;

    // bunch-counter check: wrong ORBIT_LENGTH gives BAD_MAX_BC and TIM_ERR
    rocmd_tb[8] = 1;
    vme_write(A_ROCMD, rocmd_tb);
    tick(2 * ORBIT);
    check(!tim_err, "no TIM_ERR with correct orbit length");
    vme_write(A_ORBIT_LENGTH, 16'h0DE0);
    tick(ORBIT + 10);
    check(tim_err, "TIM_ERR on BAD_MAX_BC");
    vme_read(A_CMD_STATUS, v);
    if (tim_err && v[4]) mech[M_BAD_MAX_BC]++;
    vme_write(A_ORBIT_LENGTH, ORBIT_LENGTH_DEFAULT);
    rocmd_tb[8] = 0;
    vme_write(A_ROCMD, rocmd_tb);

    // L1 reset from TTC: RESET on the backplane, clears errors and the run
    wait_readout_idle();
    ttc_bgo(BGO_L1RESET);
    check(!dut.run && !dut.bad_max_bc, "L1 reset clears run and errors");
    if (!dut.run) mech[M_L1_RESET]++;
    ttc_bgo(BGO_START_RUN);

    // TTC double-bit error
    ttc_dberr = 1; tick(1); ttc_dberr = 0; tick(3);
    check(tim_err, "TIM_ERR on double-bit error");
    if (tim_err) mech[M_DBERR]++;

    // burst: queue, readout buffers and age monitor overflow
    wait_readout_idle();
    ro_chk = 0;
    stall_on = 0;
    gtfe_ready = 0;
    vme_write(A_ROBUF_PAR, 16'd100);
    rocmd_tb[3] = 1;
    vme_write(A_ROCMD, rocmd_tb);
    for (int i = 0; i < 70; i++) begin
      ttc_l1a();
      tick(1);
      if (dut.too_many_l1a) mech[M_TOO_MANY]++;
    end
    tick(3000);
    check(dut.too_many_l1a && dut.l1a_old_warn && dut.l1a_too_old, "queue flags");
    check(dut.robuf_warn && dut.robuf_ovf, "readout buffer flags");
    check(tim_out_of_sync && tim_warning, "Fast Signals on overflow");
    if (dut.l1a_old_warn) mech[M_OLD_WARN]++;
    if (dut.l1a_too_old)  mech[M_TOO_OLD]++;
    if (dut.robuf_warn)   mech[M_ROBUF_WARN]++;
    if (dut.robuf_ovf)    mech[M_ROBUF_OVF]++;
    check(dut.freeze, "ring buffer frozen on error");
    if (dut.freeze) mech[M_FREEZE_ON_ERR]++;

    // hard reset by VME clears everything
    vme_write(A_CMD_STATUS, 16'h0002);
    tick(3);
    check(!tim_out_of_sync && !tim_warning && !tim_err && !dut.run, "hard reset");
    if (!tim_out_of_sync && !dut.run) mech[M_HARD_RESET]++;
    gtfe_ready = 1;
    rocmd_tb[3] = 0;
    vme_write(A_ROCMD, rocmd_tb);
    vme_write(A_ROBUF_PAR, 16'(ro_len));
    exp_q.delete();
    rec.delete();
    exp_evnr = 0;
    tick(20);
    ro_chk = 1;
    ttc_bgo(BGO_START_RUN);
    l1a_series(3);
    wait_readout_idle();

    // interlock: INACTIVE blocks the backplane
    btn_inactive = 1; tick(1); btn_inactive = 0; tick(1);
    check(!drivers_en && led_inactive, "INACTIVE state");
    l1a_series(2);
    wait_readout_idle();
    tick(50);

    // summary
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-20s %0d", mech_e'(m), mech[m]);
      checks++;
      if (mech[m] == 0) fail($sformatf("mechanism %s never happened", mech_e'(m)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
