// tim_bgo_decoder: turns a strobed 4-bit BGO command code into one pulse per
// command (bgo_cmd_t). Codes: 1 BC0, 2 TEST_ENABLE, 3 PRIVATE_GAP,
// 4 PRIVATE_ORBIT, 5 L1RESET, 6 HARD_RESET, 7 RESET_EVENT_COUNTER,
// 8 RESET_ORBIT, 9 START_RUN, A STOP_RUN; 0 and B..F give nothing.
// The code table follows the BC-Table description; decoding BC0 (used as a
// BCRES source) is this design's reading of the SEL_BCRES table.
// Purely combinational: the output is valid while strb is high.
module tim_bgo_decoder
  import tim_pkg::*;
(
  input  logic     strb,   // BGO strobe
  input  logic [3:0] code, // BGO command code
  output bgo_cmd_t cmd     // decoded command pulses
);

  always_comb begin
    cmd = '0;
    if (strb) begin
      unique case (code)
        BGO_BC0:        cmd.bc0        = 1'b1;
        BGO_TEST_EN:    cmd.test_en    = 1'b1;
        BGO_PRIV_GAP:   cmd.priv_gap   = 1'b1;
        BGO_PRIV_ORBIT: cmd.priv_orbit = 1'b1;
        BGO_L1RESET:    cmd.l1_reset   = 1'b1;
        BGO_HARD_RESET: cmd.hard_reset = 1'b1;
        BGO_RES_EVCNT:  cmd.evcnt_res  = 1'b1;
        BGO_RES_ORBIT:  cmd.res_orbit  = 1'b1;
        BGO_START_RUN:  cmd.start_run  = 1'b1;
        BGO_STOP_RUN:   cmd.stop_run   = 1'b1;
        default:        cmd = '0;
      endcase
    end
  end

endmodule
