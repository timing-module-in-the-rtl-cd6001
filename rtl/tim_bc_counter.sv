// tim_bc_counter: local bunch-crossing counter of the TIM chip and its checks.
// The 16-bit counter (upper 4 bits always zero in use) is cleared by BCRES
// and also wraps by itself after ORBIT_LENGTH+1, so an orbit lasts
// ORBIT_LENGTH+2 bx (3564 with the default 0x0DEA). Once a first BCRES has
// been seen, the counter/comparator generates a periodic BCRES (bcres_per)
// in the last bx of every orbit; selecting it as the BCRES source keeps the
// orbit running without an external orbit signal.
// Check 1 (BAD_MAX_BC): at each BCRES after the first, the count must equal
// ORBIT_LENGTH+1; MAX_BCNR keeps the count seen at the last BCRES.
// Check 2 (BAD_LOCAL_BC): the local count latched at an L1A is subtracted
// from the TTCrx BC number delivered for that L1A; BC_DIFF holds the
// difference, and a change of it sets BAD_LOCAL_BC.
// Both checks run only when EN_BC_CHECK is set; flags are sticky until clr.
// Counter, comparator and checks follow the document; the latching of the
// local count at L1A and the "first BCRES starts" rule are this design's.
// Timing: bcres at clock n gives bc = 0 at clock n+1.
module tim_bc_counter (
  input  logic        clk,           // bunch-crossing clock
  input  logic        rst_n,         // active-low synchronous reset
  input  logic        bcres,         // selected BCRES pulse
  input  logic [15:0] orbit_length,  // ORBIT_LENGTH register
  input  logic        en_check,      // EN_BC_CHECK
  input  logic        clr,           // clear error flags (CLR_ALL)
  input  logic        l1a,           // L1A: latch local count
  input  logic [11:0] ttc_bcnr,      // BC number from TTCrx for the last L1A
  input  logic        ttc_bcnr_vld,  // ttc_bcnr strobe
  output logic [11:0] bc,            // local BC number
  output logic        bcres_per,     // periodic BCRES
  output logic        bad_max_bc,    // sticky BAD_MAX_BC
  output logic        bad_local_bc,  // sticky BAD_LOCAL_BC
  output logic [15:0] bc_diff,       // BC_DIFF register
  output logic [15:0] max_bcnr       // MAX_BCNR register
);

  logic [15:0] cnt;
  logic        started;
  logic [11:0] bc_at_l1a;
  logic        diff_valid;
  logic [11:0] diff_now;

  assign bc        = cnt[11:0];
  assign bcres_per = started && (cnt == orbit_length + 16'd1);
  assign diff_now  = ttc_bcnr - bc_at_l1a;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt          <= '0;
      started      <= 1'b0;
      bad_max_bc   <= 1'b0;
      bad_local_bc <= 1'b0;
      bc_diff      <= '0;
      max_bcnr     <= '0;
      bc_at_l1a    <= '0;
      diff_valid   <= 1'b0;
    end else begin
      if (bcres || cnt >= orbit_length + 16'd1) cnt <= '0;
      else                                      cnt <= cnt + 16'd1;

      if (bcres) begin
        started  <= 1'b1;
        max_bcnr <= cnt;
        if (started && en_check && cnt != orbit_length + 16'd1) bad_max_bc <= 1'b1;
      end

      if (l1a) bc_at_l1a <= cnt[11:0];
      if (ttc_bcnr_vld) begin
        bc_diff    <= {4'd0, diff_now};
        diff_valid <= 1'b1;
        if (diff_valid && en_check && diff_now != bc_diff[11:0]) bad_local_bc <= 1'b1;
      end

      if (clr) begin
        bad_max_bc   <= 1'b0;
        bad_local_bc <= 1'b0;
        diff_valid   <= 1'b0;
      end
    end
  end

endmodule
