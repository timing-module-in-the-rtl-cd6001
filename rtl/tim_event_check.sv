// tim_event_check: local 24-bit event counter and its check against the
// TTCrx event counter.
// The counter counts L1As sent, is cleared by the event-counter reset and by
// HARD_RES, and sets the sticky EVNR_OVF (information only) when it wraps.
// The count including an L1A is latched and compared with the next TTCrx
// event number; a difference sets the sticky BAD_LOCAL_EV when
// EN_EVNR_CHECK is set. clr (CLR_ALL) clears the flags.
// Function follows the document; the latch-and-compare timing is this
// design's. Timing: the count changes one clock after the L1A.
module tim_event_check (
  input  logic        clk,          // bunch-crossing clock
  input  logic        rst_n,        // active-low synchronous reset
  input  logic        l1a,          // L1A sent
  input  logic        evcnt_res,    // event-counter reset
  input  logic        hard_res,     // HARD_RES clears the counter
  input  logic        clr,          // clear flags
  input  logic        en_check,     // EN_EVNR_CHECK
  input  logic [23:0] ttc_evnr,     // TTCrx event number
  input  logic        ttc_evnr_vld, // TTCrx event number strobe
  output logic [23:0] loc_evnr,     // local event number
  output logic        evnr_ovf,     // sticky counter overflow
  output logic        bad_local_ev  // sticky mismatch flag
);

  logic [23:0] evnr_at_l1a;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      loc_evnr     <= '0;
      evnr_at_l1a  <= '0;
      evnr_ovf     <= 1'b0;
      bad_local_ev <= 1'b0;
    end else begin
      if (evcnt_res || hard_res) begin
        loc_evnr <= '0;
      end else if (l1a) begin
        loc_evnr    <= loc_evnr + 24'd1;
        evnr_at_l1a <= loc_evnr + 24'd1;
        if (loc_evnr == '1) evnr_ovf <= 1'b1;
      end
      if (ttc_evnr_vld && en_check && ttc_evnr != evnr_at_l1a) bad_local_ev <= 1'b1;
      if (clr) begin
        evnr_ovf     <= 1'b0;
        bad_local_ev <= 1'b0;
      end
    end
  end

endmodule
