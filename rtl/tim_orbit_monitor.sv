// tim_orbit_monitor: 1/n orbit counter for reading the crate's statistics
// counters (dead-time and rate counters) every n orbits during a run.
// The counter is cleared when a run starts and counts BCRES pulses (one per
// orbit). Every n-th BCRES of the run is an orbit-reset BCRES: orbit_reset
// pulses with it, telling the boards to save and then clear their counters. In the orbit that follows, a monitoring
// request (mon_trig) is sent MON_BX bunch crossings after that BCRES so the
// saved values are read out. Nothing happens while no run is active or
// while rate is 0; the start of a run drops a pending request.
// The 1/n counter, its reset by the start of a run, counting on BCRES and
// the save-then-request sequence follow the document; the rate input (the
// document gives no register for it), the position of the request within
// the orbit and the rate-0 off state are this design's choices.
// Timing: orbit_reset is combinational with the BCRES it marks; mon_trig is
// a one-clock pulse MON_BX clocks later.
module tim_orbit_monitor #(
  parameter int unsigned MON_BX = 16     // bx between orbit reset and request
) (
  input  logic        clk,          // bunch-crossing clock
  input  logic        rst_n,        // active-low synchronous reset
  input  logic        run,          // a run is active
  input  logic        new_run,      // start of a run (clears the counter)
  input  logic        bcres,        // bunch-counter reset, once per orbit
  input  logic [15:0] rate,         // n: orbits between readings, 0 = off
  output logic        orbit_reset,  // save-and-clear counters at this BCRES
  output logic        mon_trig      // monitoring request for the saved data
);

  logic [15:0] orbits;
  logic [$clog2(MON_BX+1)-1:0] wait_cnt;
  logic        waiting;
  logic        last;

  // the BCRES that completes n orbits since the last reading
  assign last        = (32'(orbits) + 1 >= 32'(rate));
  assign orbit_reset = bcres && run && !new_run && rate != 16'd0 && last;

  always_ff @(posedge clk) begin
    if (!rst_n || new_run) begin
      orbits   <= '0;
      waiting  <= 1'b0;
      wait_cnt <= '0;
      mon_trig <= 1'b0;
    end else begin
      mon_trig <= 1'b0;
      if (bcres && run && rate != 16'd0) orbits <= last ? 16'd0 : orbits + 16'd1;
      if (orbit_reset) begin
        waiting  <= 1'b1;
        wait_cnt <= '0;
      end else if (waiting) begin
        if (32'(wait_cnt) + 2 >= MON_BX) begin
          waiting  <= 1'b0;
          mon_trig <= 1'b1;
        end else begin
          wait_cnt <= wait_cnt + 1'b1;
        end
      end
    end
  end

endmodule
