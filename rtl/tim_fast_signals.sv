// tim_fast_signals: the Fast Signals sent from the TIM board to the TCS board.
//  TIM_ERR           = BAD_MAX_BC | BAD_LOCAL_BC (when EN_BC_CHECK) | DBERR
//  TIM_OUT_OF_SYNC   = ROBUF_SYNCERR | ROBUF_OVF |
//                      L1A_TOO_OLD | TOO_MANY_L1A (when EN_L1AQUEUE_CHECK)
//  TIM_WARNING_OVFLO = L1A_OLD_WARN (when EN_L1AQUEUE_CHECK) | WARNING_ROBUF_OVF
//  TIM_READY         = TIM_SETUPDONE & TTC_READY & ~TIM_BUSY
//  TIM_BUSY          = ~TIM_SETUPDONE
// TTC_READY is the TTCrx flag or its software emulation TTC_RDY_VME. The
// ROBUF flags are already gated by EN_ROBUF_CHECK where they are made.
// The compositions follow the document; the gating of BAD_MAX_BC and
// BAD_LOCAL_BC by EN_BC_CHECK is repeated here for safety.
// Timing: outputs registered, one clock after the flags.
module tim_fast_signals (
  input  logic clk,             // bunch-crossing clock
  input  logic rst_n,           // active-low synchronous reset
  input  logic setup_done,      // TIM_SETUPDONE
  input  logic ttc_ready,       // TTC_READY from TTCrx
  input  logic ttc_rdy_vme,     // TTC_RDY_VME emulation
  input  logic en_bc_check,     // EN_BC_CHECK
  input  logic en_queue_check,  // EN_L1AQUEUE_CHECK
  input  logic bad_max_bc,      // BAD_MAX_BC
  input  logic bad_local_bc,    // BAD_LOCAL_BC
  input  logic dberr,           // sticky TTCrx double-bit error
  input  logic robuf_syncerr,   // ROBUF_SYNCERR
  input  logic robuf_ovf,       // ROBUF_OVF
  input  logic robuf_warn,      // WARNING_ROBUF_OVF
  input  logic l1a_too_old,     // L1A_TOO_OLD
  input  logic too_many_l1a,    // TOO_MANY_L1A
  input  logic l1a_old_warn,    // L1A_OLD_WARN
  output logic tim_err,         // TIM_ERR
  output logic tim_out_of_sync, // TIM_OUT_OF_SYNC
  output logic tim_warning,     // TIM_WARNING_OVFLO
  output logic tim_ready,       // TIM_READY
  output logic tim_busy         // TIM_BUSY
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tim_err         <= 1'b0;
      tim_out_of_sync <= 1'b0;
      tim_warning     <= 1'b0;
      tim_ready       <= 1'b0;
      tim_busy        <= 1'b1;
    end else begin
      tim_err         <= (en_bc_check & (bad_max_bc | bad_local_bc)) | dberr;
      tim_out_of_sync <= robuf_syncerr | robuf_ovf |
                         (en_queue_check & (l1a_too_old | too_many_l1a));
      tim_warning     <= (en_queue_check & l1a_old_warn) | robuf_warn;
      tim_busy        <= ~setup_done;
      tim_ready       <= setup_done & (ttc_ready | ttc_rdy_vme);
    end
  end

endmodule
