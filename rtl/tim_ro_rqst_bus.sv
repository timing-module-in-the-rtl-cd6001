// tim_ro_rqst_bus: sender for the readout-request (RO-RQST) bus on the
// backplane of the GT crate.
// Three kinds of message go to all boards over this bus:
//   type 01  slow commands: the selected BGO commands TEST_ENABLE,
//            PRIVATE_GAP, PRIVATE_ORBIT, RES_ORBIT, START_RUN, STOP_RUN and
//            HARD_RES, as a bit mask laid out like the command-pulse
//            register (bits 9, 8, 7, 6, 5, 4, 1);
//   type 10  test data: the TESTDATA register, on SEND_TESTDATA;
//   type 11  monitoring request: the MON_RQST ID register, on MON_RQST.
// Each kind has a pending flag, so nothing is lost when requests coincide;
// slow commands that arrive while one is pending are merged into its mask.
// One word per clock is sent, monitoring requests first, then slow
// commands, then test data. DIS_RO_BUS (COMMAND bit 10) stops the bus and
// drops what is pending.
// Which commands use the bus, test data, the MON_RQST ID and the disable
// bit follow the register description; the word layout, the type codes and
// the priority are this design's choices, as no bus format is given.
// Timing: a request seen in clock n is sent (rq_vld high) in clock n+1 at
// the earliest.
module tim_ro_rqst_bus
  import tim_pkg::*;
(
  input  logic        clk,           // bunch-crossing clock
  input  logic        rst_n,         // active-low synchronous reset
  input  logic        dis,           // DIS_RO_BUS
  input  bgo_cmd_t    bgo,           // selected BGO commands
  input  logic        hard_res,      // HARD_RES from any source
  input  logic        send_testdata, // SEND_TESTDATA command pulse
  input  logic [15:0] testdata,      // TESTDATA register
  input  logic        mon_rqst,      // monitoring request from any source
  input  logic [15:0] mon_rqst_id,   // MON_RQST ID register
  output logic        rq_vld,        // bus word valid
  output logic [1:0]  rq_type,       // 01 command, 10 test data, 11 monitoring
  output logic [15:0] rq_data        // bus data
);

  logic [15:0] cmd_new, cmd_pend;
  logic        td_pend, mon_pend;
  logic        cmd_any;

  always_comb begin
    cmd_new    = '0;
    cmd_new[9] = bgo.test_en;
    cmd_new[8] = bgo.priv_gap;
    cmd_new[7] = bgo.priv_orbit;
    cmd_new[6] = bgo.res_orbit;
    cmd_new[5] = bgo.start_run;
    cmd_new[4] = bgo.stop_run;
    cmd_new[1] = hard_res;
  end
  assign cmd_any = (cmd_pend != 16'd0);

  always_ff @(posedge clk) begin
    if (!rst_n || dis) begin
      cmd_pend <= '0;
      td_pend  <= 1'b0;
      mon_pend <= 1'b0;
      rq_vld   <= 1'b0;
      rq_type  <= 2'b00;
      rq_data  <= '0;
    end else begin
      rq_vld <= 1'b0;
      // send one pending message
      if (mon_pend) begin
        rq_vld  <= 1'b1;
        rq_type <= 2'b11;
        rq_data <= mon_rqst_id;
      end else if (cmd_any) begin
        rq_vld  <= 1'b1;
        rq_type <= 2'b01;
        rq_data <= cmd_pend;
      end else if (td_pend) begin
        rq_vld  <= 1'b1;
        rq_type <= 2'b10;
        rq_data <= testdata;
      end
      // update the pending flags: clear what was sent, add new requests
      mon_pend <= mon_rqst;   // a pending request is always sent at once
      cmd_pend <= ((!mon_pend && cmd_any) ? 16'd0 : cmd_pend) | cmd_new;
      td_pend  <= ((!mon_pend && !cmd_any && td_pend) ? 1'b0 : td_pend) | send_testdata;
    end
  end

endmodule
