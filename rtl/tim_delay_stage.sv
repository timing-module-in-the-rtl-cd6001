// tim_delay_stage: one stage of the programmable delay line. A shift register
// of STAGE flip-flops per bit; sel chooses the tap, 0 being the undelayed
// input (combinational) and STAGE the oldest sample. Taps above STAGE give
// the oldest sample. Reset clears the shift register.
module tim_delay_stage #(
  parameter int unsigned WIDTH = 1,   // bits delayed together
  parameter int unsigned STAGE = 15   // number of shift-register taps
) (
  input  logic             clk,       // bunch-crossing clock
  input  logic             rst_n,     // active-low synchronous reset
  input  logic [3:0]       sel,       // delay in bx, 0..STAGE
  input  logic [WIDTH-1:0] d,         // input
  output logic [WIDTH-1:0] q          // delayed output
);

  logic [WIDTH-1:0] sr [1:STAGE];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 1; i <= STAGE; i++) sr[i] <= '0;
    end else begin
      sr[1] <= d;
      for (int i = 2; i <= STAGE; i++) sr[i] <= sr[i-1];
    end
  end

  always_comb begin
    if (sel == 4'd0)            q = d;
    else if (32'(sel) >= STAGE) q = sr[STAGE];
    else                        q = sr[sel];
  end

endmodule
