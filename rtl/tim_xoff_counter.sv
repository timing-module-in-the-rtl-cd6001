// tim_xoff_counter: counts the L1As that arrive while the DAQ holds XOFF.
// While XOFF (the external L1A inhibit) is high, incoming L1As are not sent
// to the boards; each one that arrives during a run increments a 32-bit
// counter, which stops at its maximum instead of wrapping. START_RUN and
// HARD_RES clear it, so it tells how many triggers the current run lost.
// Counting suppressed L1As follows the document; the run gating, the width,
// saturation and the clear conditions are this design's choices.
// Interface: l1a_in is the selected L1A before gating; count is a top port.
// Timing: count includes an L1A from the clock after it arrived.
module tim_xoff_counter #(
  parameter int unsigned WIDTH = 32   // counter width
) (
  input  logic             clk,        // bunch-crossing clock
  input  logic             rst_n,      // active-low synchronous reset
  input  logic             l1a_in,     // selected L1A, before the inhibit
  input  logic             xoff,       // DAQ XOFF (L1A inhibit)
  input  logic             run,        // RUN_FF
  input  logic             clr,        // START_RUN or HARD_RES
  output logic [WIDTH-1:0] count       // suppressed L1As
);

  always_ff @(posedge clk) begin
    if (!rst_n || clr)
      count <= '0;
    else if (l1a_in && xoff && run && count != '1)
      count <= count + 1'b1;
  end

endmodule
