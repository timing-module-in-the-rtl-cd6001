// tim_interlock: hot-swap state of the board.
// After power-up (reset) the board is INACTIVE and all backplane drivers are
// disabled. The RUNNING push-button, or SET_RUNNING from the VME chip
// (VMEbus SYSRES*), makes it RUNNING and enables the drivers; the INACTIVE
// push-button returns it to INACTIVE before removal. INACTIVE wins when
// both are pressed (this design's choice). The two LED outputs show the
// state. Buttons are expected debounced. Timing: the state changes one clock
// after a button.
module tim_interlock (
  input  logic clk,          // clock
  input  logic rst_n,        // power-up reset, active low
  input  logic btn_inactive, // INACTIVE push-button
  input  logic btn_running,  // RUNNING push-button
  input  logic set_running,  // SET_RUNNING from the VME chip
  output logic running,      // RUNNING state: drivers enabled
  output logic led_running,  // green RUNNING LED
  output logic led_inactive  // red INACTIVE LED
);

  always_ff @(posedge clk) begin
    if (!rst_n)                           running <= 1'b0;
    else if (btn_inactive)                running <= 1'b0;
    else if (btn_running || set_running)  running <= 1'b1;
  end

  assign led_running  = running;
  assign led_inactive = ~running;

endmodule
