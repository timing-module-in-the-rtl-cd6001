// tim_run_control: run state and reset tree of the TIM chip.
//  RUN_FF      set by START_RUN, cleared by STOP_RUN and by CLR_ALL.
//  TEST_ENABLE set by the TEST_ENABLE command, cleared by STOP_RUN and CLR_ALL.
//  HARD_RES    = HARD_RES_VME or a HARD_RESET BGO.
//  L1_RESET    = L1RES_VME or an L1RESET BGO (forwarded to all boards).
//  CLR_ALL     = HARD_RES or L1_RESET: clears error flags, RUN_FF,
//                TEST_ENABLE, the L1A queue and the readout controller.
// An L1A is passed on only while RUN_FF is set and INHIBIT is low.
// The VME pulses for the BGO commands enter through the selected BGO source
// (bgo); only HARD_RES_VME acts whatever the selection, because it must stop
// the BC-Table. Run state, reset functions and the L1A inhibit follow the
// document; the flip-flop priority (clear wins over set) is this design's.
// Timing: flip-flops change one clock after the command; the reset pulses
// and the gated L1A are combinational.
module tim_run_control
  import tim_pkg::*;
(
  input  logic     clk,           // bunch-crossing clock
  input  logic     rst_n,         // active-low synchronous reset
  input  bgo_cmd_t bgo,           // selected BGO commands
  input  logic     hard_res_vme,  // HARD_RES_VME pulse (any selection)
  input  logic     l1a_in,        // selected L1A
  input  logic     inhibit,       // extra L1A inhibit
  output logic     l1a_out,       // L1A sent to the boards
  output logic     run,           // RUN_FF
  output logic     test_enable,   // TEST_ENABLE flip-flop
  output logic     hard_res,      // HARD_RES pulse
  output logic     l1_reset,      // L1_RESET pulse
  output logic     clr_all        // CLR_ALL pulse
);

  assign hard_res = hard_res_vme | bgo.hard_reset;
  assign l1_reset = bgo.l1_reset;
  assign clr_all  = hard_res | l1_reset;
  assign l1a_out  = l1a_in & run & ~inhibit;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run         <= 1'b0;
      test_enable <= 1'b0;
    end else begin
      if (clr_all || bgo.stop_run) run <= 1'b0;
      else if (bgo.start_run)      run <= 1'b1;
      if (clr_all || bgo.stop_run) test_enable <= 1'b0;
      else if (bgo.test_en)        test_enable <= 1'b1;
    end
  end

endmodule
