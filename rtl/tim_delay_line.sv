// tim_delay_line: programmable delay of 0..30 bunch crossings.
// Two delay stages are cascaded. Each stage is a 15-deep shift register with
// a tap selected by one hex digit: digit d gives (d+1) mod 16 bx, so F means
// no delay and E means 15 bx. The total delay is therefore
// ((dly_l+1) mod 16) + ((dly_h+1) mod 16): FF = 0 bx, EE = 30 bx, as in the
// delay registers of the TIM chip. A zero-delay stage is a combinational
// path, so the whole line may be combinational when both digits are F.
// Interface: d (WIDTH bits) in, q out; dly_h/dly_l are the two digits.
// The 15-bx stage and the digit coding follow the register description;
// the shift-register implementation is this design's choice.
module tim_delay_line #(
  parameter int unsigned WIDTH = 1,   // bits delayed together
  parameter int unsigned STAGE = 15   // maximum delay of one stage in bx
) (
  input  logic             clk,       // 40 MHz bunch-crossing clock
  input  logic             rst_n,     // active-low synchronous reset
  input  logic [3:0]       dly_h,     // high delay digit (F = no delay)
  input  logic [3:0]       dly_l,     // low delay digit (F = no delay)
  input  logic [WIDTH-1:0] d,         // signals to delay
  output logic [WIDTH-1:0] q          // delayed signals
);

  logic [WIDTH-1:0] mid;

  tim_delay_stage #(.WIDTH(WIDTH), .STAGE(STAGE)) u_low (
    .clk(clk), .rst_n(rst_n), .sel(dly_l + 4'd1), .d(d), .q(mid));

  tim_delay_stage #(.WIDTH(WIDTH), .STAGE(STAGE)) u_high (
    .clk(clk), .rst_n(rst_n), .sel(dly_h + 4'd1), .d(mid), .q(q));

endmodule
