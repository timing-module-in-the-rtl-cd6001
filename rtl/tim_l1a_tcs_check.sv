// tim_l1a_tcs_check: checks that every L1A sent by the TCS board over the
// backplane also arrives over the TTC fibre.
// The TCS L1A is delayed by the two digits of DLY_L1A_TCS (same coding as
// the other delays: F = none, 0..30 bx) so that it lines up with the TTC
// L1A. While CHECK_TTC_CHAIN (or EN_TTC_CHECK) is set, every bx where the
// two disagree increments the 16-bit BAD_L1A_TTC counter, which saturates
// and sets the sticky OV_BAD_TTC. clr clears counter and flag.
// Function follows the document; counter width and saturation are this
// design's. Timing: the counter changes one clock after a mismatch.
module tim_l1a_tcs_check (
  input  logic        clk,          // bunch-crossing clock
  input  logic        rst_n,        // active-low synchronous reset
  input  logic [7:0]  dly,          // DLY_L1A_TCS register bits 7..0
  input  logic        en_check,     // check enable
  input  logic        clr,          // clear counter and flag
  input  logic        l1a_tcs,      // L1A from TCS
  input  logic        l1a_ttc,      // L1A from TTCrx
  output logic        l1a_tcs_dly,  // delayed TCS L1A
  output logic [15:0] bad_cnt,      // BAD_L1A_TTC counter
  output logic        ov_bad_ttc    // sticky counter overflow
);

  tim_delay_line #(.WIDTH(1)) u_dly (
    .clk(clk), .rst_n(rst_n), .dly_h(dly[7:4]), .dly_l(dly[3:0]),
    .d(l1a_tcs), .q(l1a_tcs_dly));

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      bad_cnt    <= '0;
      ov_bad_ttc <= 1'b0;
    end else if (en_check && (l1a_tcs_dly != l1a_ttc)) begin
      if (bad_cnt == '1) ov_bad_ttc <= 1'b1;
      else               bad_cnt    <= bad_cnt + 16'd1;
    end
  end

endmodule
