// Testbench for tim_interlock: INACTIVE after reset, RUNNING after the
// RUNNING button or SET_RUNNING, INACTIVE after the INACTIVE button (also
// when both buttons are pressed); the LEDs show the state.
module tb_tim_interlock;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic btn_inactive, btn_running, set_running, running, led_running, led_inactive;
  int checks = 0, failures = 0;

  tim_interlock dut (.*);

  task automatic step(input logic i, input logic r, input logic s, input logic exp_run);
    @(posedge clk); #1 {btn_inactive, btn_running, set_running} = {i, r, s};
    @(posedge clk); #1 {btn_inactive, btn_running, set_running} = '0;
    checks++;
    if (running != exp_run || led_running != exp_run || led_inactive == exp_run) begin
      failures++;
      $display("FAIL step %b%b%b running=%b", i, r, s, running);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {btn_inactive, btn_running, set_running} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    step(0, 0, 0, 0);
    step(0, 1, 0, 1);
    step(0, 0, 0, 1);
    step(1, 0, 0, 0);
    step(0, 0, 1, 1);
    step(1, 1, 0, 0);
    step(0, 1, 0, 1);
    step(1, 0, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
