// tim_bp_channel: timing signals for one backplane slot (or for the TIM
// readout logic, or for the front panel).
// L1A, RESET (RESYNC) and EVCNT_RES share two backplane lines {L1a, Reset}:
// 00 nothing, 01 RESET, 10 L1A, 11 EVCNT_RES. Those two lines are delayed
// together by the L1A_DLY digits of the slot's delay register; BCRES has a
// line of its own, delayed by the RES_DLY digits. A disabled slot drives
// all lines low. The encoding, the register layout
// {L1A_DLY_H, L1A_DLY_L, RES_DLY_H, RES_DLY_L} and the disable follow the
// register description; the priority EVCNT_RES > L1A > RESET when they
// coincide is this design's choice.
// Timing: outputs follow the inputs by the programmed delay (0..30 bx).
module tim_bp_channel
  import tim_pkg::*;
(
  input  logic        clk,        // 40 MHz bunch-crossing clock
  input  logic        rst_n,      // active-low synchronous reset
  input  logic [15:0] dly_reg,    // DLY_xx register: L1A_DLY_H,L1A_DLY_L,RES_DLY_H,RES_DLY_L
  input  logic        disable_i,  // 1 = slot disabled
  input  logic        l1a,        // L1A pulse
  input  logic        l1_reset,   // RESET/RESYNC pulse
  input  logic        evcnt_res,  // event-counter reset pulse
  input  logic        bcres,      // bunch-counter reset pulse
  output logic        bp_l1a,     // coded line L1a
  output logic        bp_reset,   // coded line Reset
  output logic        bp_bcres    // BCRES line
);

  bp_code_e   code;
  logic [1:0] code_dly;
  logic       bcres_dly;

  always_comb begin
    if (evcnt_res)     code = BP_EVCNT_RES;
    else if (l1a)      code = BP_L1A;
    else if (l1_reset) code = BP_RESET;
    else               code = BP_NOP;
  end

  tim_delay_line #(.WIDTH(2)) u_dly_l1a (
    .clk(clk), .rst_n(rst_n), .dly_h(dly_reg[15:12]), .dly_l(dly_reg[11:8]),
    .d(code), .q(code_dly));

  tim_delay_line #(.WIDTH(1)) u_dly_res (
    .clk(clk), .rst_n(rst_n), .dly_h(dly_reg[7:4]), .dly_l(dly_reg[3:0]),
    .d(bcres), .q(bcres_dly));

  assign bp_l1a   = code_dly[1] & ~disable_i;
  assign bp_reset = code_dly[0] & ~disable_i;
  assign bp_bcres = bcres_dly   & ~disable_i;

endmodule
