// tim_top: the TIM (timing) chip of the Level-1 Global Trigger crate.
// It takes the LHC timing signals (L1A, bunch-counter reset BCRES, BGO
// commands) from one of several sources - the TTCrx receiver, the front
// panel, the TCS board, VME commands or its own BC-Table simulator - and
// sends L1A, RESET (RESYNC), EVCNT_RES and BCRES to every board in the crate
// over point-to-point backplane lines, each slot with its own programmable
// delay and disable. It keeps a local bunch-crossing counter and event
// counter and checks them against the TTCrx, compares the TCS and TTC L1As,
// and reports errors and warnings as Fast Signals to the TCS board.
// For the GT crate it also records its own signals in a 1k ring buffer and,
// for every L1A, extracts RO_LENGTH bunch crossings of it through an L1A
// queue into derandomizing readout buffers, from which the readout
// processor builds event records for the GTFE board over a Channel Link.
// Data flow:
//   sources -> tim_source_select -> tim_run_control (RUN gating, resets)
//     -> 17 x tim_bp_channel (backplane), DLY_PAN channel (front panel),
//        DLY_TIM channel -> tim_l1a_queue -> tim_extractor <- tim_ring_buffer
//        -> tim_robuf -> tim_rop -> tim_rop_mux -> Channel Link words
//   tim_orbit_monitor: statistics counter reset and readout every n orbits
//   tim_ro_rqst_bus: slow commands, test data and monitoring requests to
//     the boards over the readout-request bus
//   tim_xoff_counter: L1As suppressed while the DAQ holds XOFF
//     (l1a_inhibit), brought out on xoff_l1a_count
// The blocks and their connections follow the TIM description; the
// synchronous pulse detection of the front-panel inputs, the external L1A
// inhibit input and the alignment of the readout counters (ring buffer
// counter on the undelayed BCRES, L1A-queue counter on the DLY_TIM-delayed
// BCRES, so equal L1A and BCRES delays in DLY_TIM select the L1A's own bx
// as the first read-out bx) are this design's choices. All logic runs on the
// 40 MHz bunch-crossing clock.
module tim_top
  import tim_pkg::*;
#(
  parameter logic [3:0] CARD_NR = 4'd0   // card number in CHIP_ID_L
) (
  input  logic        clk,              // 40 MHz bunch-crossing clock
  input  logic        rst_n,            // active-low synchronous reset
  // TTCrx receiver
  input  logic        ttc_l1accept,     // L1Accept
  input  logic [7:2]  ttc_brcst,        // Brcst[7:2]
  input  logic        ttc_brcst_str1,   // BrcstStr1
  input  logic        ttc_brcst_str2,   // BrcstStr2
  input  logic        ttc_evcntres,     // EvCntRes
  input  logic        ttc_bcntres,      // BCntRes
  input  logic [11:0] ttc_bcnt,         // BCnt bus
  input  logic        ttc_bcnt_str,     // BCntStr
  input  logic        ttc_evcnt_l_str,  // EvCntLStr
  input  logic        ttc_evcnt_h_str,  // EvCntHStr
  input  logic [7:0]  ttc_dout,         // Dout
  input  logic [7:0]  ttc_subaddr,      // SubAddr
  input  logic        ttc_dout_str,     // DoutStr
  input  logic        ttc_ready,        // TTCReady
  input  logic        ttc_sinerr,       // single-bit error
  input  logic        ttc_dberr,        // double-bit error
  output logic        ttc_reset,        // RESET_TTCRX flip-flop
  // front panel
  input  logic        l1a_x,            // external L1A (LEMO)
  input  logic        orbit_x,          // external ORBIT / BCRES (LEMO)
  output logic        l1a_pan,          // L1A to front panel
  output logic        reset_pan,        // RESET to front panel
  output logic        bcres_pan,        // BCRES to front panel
  input  logic        btn_inactive,     // INACTIVE push-button
  input  logic        btn_running,      // RUNNING push-button
  input  logic        set_running,      // SET_RUNNING from VME chip
  output logic        led_running,      // RUNNING LED
  output logic        led_inactive,     // INACTIVE LED
  output logic        led_l1a,          // L1A LED
  // TCS board
  input  logic        l1a_tcs,          // L1A from TCS
  input  logic        tcs_bgo_strb,     // BGO strobe from TCS
  input  logic [3:0]  tcs_bgo_code,     // BGO code from TCS
  input  logic        l1a_inhibit,      // external L1A inhibit
  output logic        tim_err,          // Fast Signal TIM_ERR
  output logic        tim_out_of_sync,  // Fast Signal TIM_OUT_OF_SYNC
  output logic        tim_warning,      // Fast Signal TIM_WARNING_OVFLO
  output logic        tim_ready,        // Fast Signal TIM_READY
  output logic        tim_busy,         // Fast Signal TIM_BUSY
  // backplane, one bit per slot L1,R1,L2,R2,...,L8,R8,L9
  output logic [N_SLOTS-1:0] bp_l1a,    // coded line L1a
  output logic [N_SLOTS-1:0] bp_reset,  // coded line Reset
  output logic [N_SLOTS-1:0] bp_bcres,  // BCRES line
  output logic        drivers_en,       // backplane drivers enabled
  output logic        mon_rqst,         // monitoring request
  input  logic [15:0] orbit_mon_rate,   // orbits between statistics readings, 0 = off
  output logic        orbit_cnt_reset,  // save-and-clear statistics counters
  output logic [31:0] xoff_l1a_count,   // L1As suppressed by XOFF in this run
  output logic        ro_rqst_vld,      // RO-RQST bus word valid
  output logic [1:0]  ro_rqst_type,     // RO-RQST bus word type
  output logic [15:0] ro_rqst_data,     // RO-RQST bus data
  // readout link to GTFE
  input  logic        gtfe_ready,       // GTFE_READY
  input  ro_word_t    mon_word,         // monitoring word for phase B
  input  logic        mon_vld,          // monitoring word valid
  output logic [27:0] link_a,           // Channel Link word, phase A
  output logic [27:0] link_b,           // Channel Link word, phase B
  output logic        link_en,          // Channel Link enable
  // VME chip bus
  input  logic        vme_we,           // write strobe
  input  logic        vme_re,           // read strobe
  input  logic [17:0] vme_addr,         // byte address
  input  logic [15:0] vme_wdata,        // write data
  output logic [15:0] vme_rdata,        // read data
  output logic        vme_rvld          // read data valid
);

  // ---------------- registers ----------------
  logic [15:0] dly_slot [N_SLOTS];
  logic [15:0] dly_tim, dly_pan, dis_boards, dly_crate_ttc, dly_crate_ecl;
  logic [15:0] trig_period, bgo_period, orbit_length, command, rocmd;
  logic [15:0] robuf_par, identifier, idle_value, eof_value, testdata, mon_rqst_id;
  logic [15:0] cmd_pulse, status;
  logic [7:0]  ttc_subaddr_reg, dly_l1a_tcs;
  logic [3:0]  dump_addr;
  logic [7:0]  dump_data;
  logic        bct_we;
  logic [11:0] bct_addr, bct_wdata, bct_rdata;
  logic [9:0]  ribuf_vme_addr;

  // ---------------- TTCrx interface ----------------
  logic        ttc_bgo_strb, ttc_msg_strb, ttc_bcnr_vld, ttc_evnr_vld;
  logic [3:0]  ttc_bgo_code;
  logic [1:0]  ttc_msg_bits;
  logic [7:0]  last_msg;
  logic [11:0] ttc_bcnr;
  logic [23:0] ttc_evnr;

  tim_ttc_if u_ttc (
    .clk, .rst_n, .brcst(ttc_brcst), .brcst_str1(ttc_brcst_str1),
    .brcst_str2(ttc_brcst_str2), .bcnt(ttc_bcnt), .bcnt_str(ttc_bcnt_str),
    .evcnt_l_str(ttc_evcnt_l_str), .evcnt_h_str(ttc_evcnt_h_str),
    .dout(ttc_dout), .subaddr(ttc_subaddr), .dout_str(ttc_dout_str),
    .subaddr_reg(ttc_subaddr_reg), .dump_addr, .dump_data,
    .bgo_strb(ttc_bgo_strb), .bgo_code(ttc_bgo_code),
    .msg_strb(ttc_msg_strb), .msg_bits(ttc_msg_bits), .last_msg,
    .ttc_bcnr, .ttc_bcnr_vld, .ttc_evnr, .ttc_evnr_vld);

  // ---------------- front panel pulses ----------------
  logic l1a_x_q, orbit_x_q, l1a_lemo, orbit_p;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      l1a_x_q   <= 1'b0;
      orbit_x_q <= 1'b0;
    end else begin
      l1a_x_q   <= l1a_x;
      orbit_x_q <= orbit_x;
    end
  end
  assign l1a_lemo = l1a_x & ~l1a_x_q;
  assign orbit_p  = orbit_x & ~orbit_x_q;

  // ---------------- crate delays ----------------
  logic bcres_ttc, bcres_lemo;
  tim_crate_delay u_crate_ttc (.clk, .rst_n, .delay(dly_crate_ttc),
                               .in(ttc_bcntres), .out(bcres_ttc));
  tim_crate_delay u_crate_ecl (.clk, .rst_n, .delay(dly_crate_ecl),
                               .in(orbit_p), .out(bcres_lemo));

  // ---------------- BC-Table ----------------
  logic [11:0] bc;
  logic        bcres, bcres_per, bct_enabled;
  logic        per_monrqst, per_l1a, per_msg_strb, per_bgo_strb;
  logic [1:0]  per_msg_bits;
  logic [3:0]  per_bgo_code;

  tim_bc_table u_bct (
    .clk, .rst_n, .bc, .bcres, .hard_res_vme(cmd_pulse[1]),
    .trig_period, .bgo_period, .vme_we(bct_we), .vme_addr(bct_addr),
    .vme_wdata(bct_wdata), .vme_rdata(bct_rdata), .enabled(bct_enabled),
    .per_monrqst, .per_l1a, .msg_bits(per_msg_bits), .msg_strb(per_msg_strb),
    .bgo_strb(per_bgo_strb), .bgo_code(per_bgo_code));

  // ---------------- BGO decoding and source selection ----------------
  bgo_cmd_t bgo_ttc, bgo_per, bgo_tcs, bgo_vme, bgo;
  usr_msg_t msg;
  logic     l1a_sel, evcnt_res;

  tim_bgo_decoder u_dec_ttc (.strb(ttc_bgo_strb), .code(ttc_bgo_code), .cmd(bgo_ttc));
  tim_bgo_decoder u_dec_per (.strb(per_bgo_strb), .code(per_bgo_code), .cmd(bgo_per));
  tim_bgo_decoder u_dec_tcs (.strb(tcs_bgo_strb), .code(tcs_bgo_code), .cmd(bgo_tcs));

  always_comb begin
    bgo_vme            = '0;
    bgo_vme.test_en    = cmd_pulse[9];
    bgo_vme.priv_gap   = cmd_pulse[8];
    bgo_vme.priv_orbit = cmd_pulse[7];
    bgo_vme.res_orbit  = cmd_pulse[6];
    bgo_vme.start_run  = cmd_pulse[5];
    bgo_vme.stop_run   = cmd_pulse[4];
    bgo_vme.l1_reset   = cmd_pulse[2];
    bgo_vme.hard_reset = cmd_pulse[1];
  end

  tim_source_select u_sel (
    .sel(command[9:0]),
    .l1a_vme(cmd_pulse[11]), .l1a_ttc(ttc_l1accept), .l1a_lemo, .l1a_per(per_l1a),
    .l1a_tcs, .bcres_vme(cmd_pulse[0]), .bcres_ttc, .bcres_orbit(bcres_lemo),
    .bcres_per, .bgo_vme, .bgo_ttc, .bgo_per, .bgo_tcs,
    .msg_ttc('{bits: ttc_msg_bits, strb: ttc_msg_strb}),
    .msg_per('{bits: per_msg_bits, strb: per_msg_strb}),
    .evres_vme(cmd_pulse[3]), .evres_ttc(ttc_evcntres),
    .l1a(l1a_sel), .bcres, .bgo, .msg, .evcnt_res);

  // ---------------- run control and reset tree ----------------
  logic l1a, run, test_enable, hard_res, l1_reset, clr_all;
  tim_run_control u_run (
    .clk, .rst_n, .bgo, .hard_res_vme(cmd_pulse[1]), .l1a_in(l1a_sel),
    .inhibit(l1a_inhibit), .l1a_out(l1a), .run, .test_enable, .hard_res,
    .l1_reset, .clr_all);

  // L1As lost while the DAQ holds XOFF (the l1a_inhibit input)
  tim_xoff_counter u_xoff (
    .clk, .rst_n, .l1a_in(l1a_sel), .xoff(l1a_inhibit), .run,
    .clr(bgo.start_run | hard_res), .count(xoff_l1a_count));

  // ---------------- local BC counter and checks ----------------
  logic        bad_max_bc, bad_local_bc;
  logic [15:0] bc_diff, max_bcnr;
  tim_bc_counter u_bc (
    .clk, .rst_n, .bcres, .orbit_length, .en_check(rocmd[8]), .clr(clr_all),
    .l1a, .ttc_bcnr, .ttc_bcnr_vld, .bc, .bcres_per, .bad_max_bc,
    .bad_local_bc, .bc_diff, .max_bcnr);

  logic [23:0] loc_evnr;
  logic        evnr_ovf, bad_local_ev;
  tim_event_check u_ev (
    .clk, .rst_n, .l1a, .evcnt_res, .hard_res, .clr(clr_all),
    .en_check(rocmd[6]), .ttc_evnr, .ttc_evnr_vld, .loc_evnr, .evnr_ovf,
    .bad_local_ev);

  logic        l1a_tcs_dly, ov_bad_ttc;
  logic [15:0] bad_l1a_ttc;
  tim_l1a_tcs_check u_tcs (
    .clk, .rst_n, .dly(dly_l1a_tcs), .en_check(command[12] | rocmd[7]),
    .clr(clr_all), .l1a_tcs, .l1a_ttc(ttc_l1accept), .l1a_tcs_dly,
    .bad_cnt(bad_l1a_ttc), .ov_bad_ttc);

  // ---------------- backplane channels ----------------
  logic running;
  logic [N_SLOTS-1:0] slot_dis;
  always_comb begin
    for (int i = 0; i < N_SLOTS - 1; i++)
      slot_dis[i] = (i % 2 == 0) ? dis_boards[i+1] : dis_boards[i-1];
    slot_dis[N_SLOTS-1] = command[11];
  end

  for (genvar s = 0; s < N_SLOTS; s++) begin : g_slot
    logic sl1a, sres, sbc;
    tim_bp_channel u_ch (
      .clk, .rst_n, .dly_reg(dly_slot[s]), .disable_i(slot_dis[s]),
      .l1a, .l1_reset, .evcnt_res, .bcres, .bp_l1a(sl1a), .bp_reset(sres),
      .bp_bcres(sbc));
    assign bp_l1a[s]   = sl1a & running;
    assign bp_reset[s] = sres & running;
    assign bp_bcres[s] = sbc  & running;
  end

  logic pan_c1, pan_c0;
  tim_bp_channel u_pan (
    .clk, .rst_n, .dly_reg(dly_pan), .disable_i(1'b0), .l1a, .l1_reset,
    .evcnt_res, .bcres, .bp_l1a(pan_c1), .bp_reset(pan_c0), .bp_bcres(bcres_pan));
  assign l1a_pan   = pan_c1 & ~pan_c0;
  assign reset_pan = ~pan_c1 & pan_c0;

  logic tim_c1, tim_c0, bcres_tim, l1a_tim;
  tim_bp_channel u_timch (
    .clk, .rst_n, .dly_reg(dly_tim), .disable_i(1'b0), .l1a, .l1_reset,
    .evcnt_res, .bcres, .bp_l1a(tim_c1), .bp_reset(tim_c0), .bp_bcres(bcres_tim));
  assign l1a_tim = tim_c1 & ~tim_c0 & ~rocmd[1];

  tim_interlock u_lock (
    .clk, .rst_n, .btn_inactive, .btn_running, .set_running, .running,
    .led_running, .led_inactive);
  assign drivers_en = running;
  assign led_l1a    = l1a;

  // statistics readout every n orbits during a run
  logic orbit_mon_trig;
  tim_orbit_monitor u_orbmon (
    .clk, .rst_n, .run, .new_run(bgo.start_run), .bcres, .rate(orbit_mon_rate),
    .orbit_reset(orbit_cnt_reset), .mon_trig(orbit_mon_trig));
  assign mon_rqst   = per_monrqst | cmd_pulse[13] | orbit_mon_trig;

  // readout-request bus: slow commands, test data, monitoring requests
  tim_ro_rqst_bus u_rqbus (
    .clk, .rst_n, .dis(command[10]), .bgo, .hard_res, .send_testdata(cmd_pulse[12]),
    .testdata, .mon_rqst, .mon_rqst_id, .rq_vld(ro_rqst_vld), .rq_type(ro_rqst_type),
    .rq_data(ro_rqst_data));

  // ---------------- ring buffer ----------------
  logic [15:0] ribuf_wdata, ribuf_rdata;
  logic [9:0]  ex_addr;
  logic [11:0] wr_bc;
  logic        freeze;
  assign ribuf_wdata = {l1a_tcs, l1a_tcs_dly, ttc_l1accept, l1a_lemo,
                        per_monrqst, per_l1a, 1'b0, evcnt_res,
                        orbit_p, bcres_lemo, ttc_bcntres, bcres_ttc,
                        l1_reset, bgo.priv_orbit, bgo.priv_gap, bgo.test_en};
  assign freeze = rocmd[2] | (rocmd[3] & (tim_err | tim_out_of_sync));

  tim_ring_buffer u_ribuf (
    .clk, .rst_n, .bcres, .freeze, .wdata(ribuf_wdata), .wr_bc,
    .rd_addr(rocmd[1] ? ribuf_vme_addr : ex_addr), .rd_data(ribuf_rdata));

  // ---------------- L1A queue, extraction, readout buffers ----------------
  logic        q_empty, q_calib, q_pop, too_many_l1a, l1a_old_warn, l1a_too_old;
  logic [11:0] q_bc;
  logic [7:0]  q_pending;
  tim_l1a_queue u_queue (
    .clk, .rst_n, .clr(clr_all), .bcres(bcres_tim), .l1a(l1a_tim),
    .calib(test_enable), .pop(q_pop), .empty(q_empty), .head_bc(q_bc),
    .head_calib(q_calib), .pending(q_pending), .too_many_l1a, .l1a_old_warn,
    .l1a_too_old);

  logic     rb_we, ex_busy;
  ro_word_t rb_wa, rb_wbx;
  tim_extractor u_ex (
    .clk, .rst_n, .clr(clr_all), .ro_length(robuf_par[7:0]), .q_empty, .q_bc,
    .q_calib, .q_pop, .rb_addr(ex_addr), .rb_data(ribuf_rdata),
    .robuf_we(rb_we), .robuf_a(rb_wa), .robuf_bx(rb_wbx), .busy(ex_busy));

  logic       robuf_rd, robuf_empty, robuf_ovf, robuf_warn, robuf_syncerr;
  ro_word_t   robuf_a, robuf_bx;
  logic [10:0] robuf_level;
  tim_robuf u_robuf (
    .clk, .rst_n, .clr(clr_all), .en_check(rocmd[4]), .we(rb_we),
    .wdata_a(rb_wa), .wdata_bx(rb_wbx), .rd(robuf_rd), .rdata_a(robuf_a),
    .rdata_bx(robuf_bx), .empty(robuf_empty), .level(robuf_level),
    .ovf(robuf_ovf), .warn(robuf_warn), .syncerr(robuf_syncerr));

  // ---------------- readout processor and link ----------------
  ro_word_t    rop_word;
  logic        rop_vld, rop_busy;
  logic [23:0] rop_evnr;
  tim_rop u_rop (
    .clk, .rst_n, .clr(clr_all), .evcnt_res, .gtfe_ready,
    .ro_length(robuf_par[7:0]), .identifier, .eof_value, .robuf_empty,
    .robuf_a, .robuf_bx, .robuf_rd, .word(rop_word), .word_vld(rop_vld),
    .evnr(rop_evnr), .in_record(rop_busy));

  tim_rop_mux u_mux (
    .clk, .rst_n, .link_on(rocmd[11]), .invert(rocmd[0]), .idle_value,
    .ev_word(rop_word), .ev_vld(rop_vld), .mon_word, .mon_vld,
    .phase_a(link_a), .phase_b(link_b), .link_en);

  // ---------------- status and Fast Signals ----------------
  logic sinerr_s, dberr_s;
  always_ff @(posedge clk) begin
    if (!rst_n || clr_all) begin
      sinerr_s <= 1'b0;
      dberr_s  <= 1'b0;
    end else begin
      if (ttc_sinerr) sinerr_s <= 1'b1;
      if (ttc_dberr)  dberr_s  <= 1'b1;
    end
  end

  assign status = {ov_bad_ttc, too_many_l1a, l1a_too_old, l1a_old_warn,
                   robuf_ovf, robuf_warn, robuf_syncerr, evnr_ovf,
                   bad_local_ev, 2'b00, bad_max_bc, bad_local_bc,
                   sinerr_s, dberr_s, ttc_ready | command[13]};

  tim_fast_signals u_fast (
    .clk, .rst_n, .setup_done(command[15]), .ttc_ready, .ttc_rdy_vme(command[13]),
    .en_bc_check(rocmd[8]), .en_queue_check(rocmd[5]), .bad_max_bc,
    .bad_local_bc, .dberr(dberr_s), .robuf_syncerr, .robuf_ovf, .robuf_warn,
    .l1a_too_old, .too_many_l1a, .l1a_old_warn, .tim_err, .tim_out_of_sync,
    .tim_warning, .tim_ready, .tim_busy);

  // ---------------- VME registers ----------------
  tim_vme_regs #(.CARD_NR(CARD_NR)) u_vme (
    .clk, .rst_n, .vme_we, .vme_re, .vme_addr, .vme_wdata, .vme_rdata, .vme_rvld,
    .dly_slot, .dly_tim, .dly_pan, .dis_boards, .dly_crate_ttc, .dly_crate_ecl,
    .trig_period, .bgo_period, .orbit_length, .ttc_subaddr(ttc_subaddr_reg),
    .command, .rocmd, .dly_l1a_tcs, .robuf_par, .identifier, .idle_value,
    .eof_value, .testdata, .mon_rqst_id, .cmd_pulse, .reset_ttcrx(ttc_reset),
    .status, .last_msg, .robuf_bx_head(robuf_bx.data), .robuf_a_head(robuf_a.data),
    .bad_l1a_ttc, .bc_diff, .max_bcnr, .ttc_bcnr, .loc_evnr, .ttc_evnr,
    .dump_addr, .dump_data, .bct_we, .bct_addr, .bct_wdata, .bct_rdata,
    .ribuf_addr(ribuf_vme_addr), .ribuf_rdata);

endmodule
