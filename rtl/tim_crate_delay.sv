// tim_crate_delay: delays a bunch-counter-reset pulse by 1 + delay bx to
// align a crate with the LHC orbit (DLY_CRATE_TTC / DLY_CRATE_ECL).
// A 16-bit counter starts on an input pulse and the output pulse is given
// when it reaches the programmed value. A new input pulse while counting
// restarts the count, so the earlier one is lost; the delay must therefore
// be below the orbit length (3564). Counter, width and formula follow the
// register description.
// Timing: input at clock n gives the output at clock n + 1 + delay.
module tim_crate_delay (
  input  logic        clk,      // bunch-crossing clock
  input  logic        rst_n,    // active-low synchronous reset
  input  logic [15:0] delay,    // DLY_CRATE register
  input  logic        in,       // BCRES pulse in
  output logic        out       // delayed BCRES pulse
);

  logic [15:0] cnt;
  logic        busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      busy <= 1'b0;
      out  <= 1'b0;
    end else begin
      out <= 1'b0;
      if (in) begin
        cnt  <= '0;
        busy <= 1'b1;
        if (delay == 16'd0) begin
          out  <= 1'b1;
          busy <= 1'b0;
        end
      end else if (busy) begin
        if (cnt + 16'd1 == delay) begin
          out  <= 1'b1;
          busy <= 1'b0;
        end
        cnt <= cnt + 16'd1;
      end
    end
  end

endmodule
