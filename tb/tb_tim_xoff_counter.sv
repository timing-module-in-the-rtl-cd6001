// tb_tim_xoff_counter: self-checking test of the suppressed-L1A counter.
// Random L1As, XOFF, RUN and clear pulses drive the block; a reference count
// kept in the testbench is compared every clock. A narrow 4-bit instance
// checks that the counter stops at its maximum. Prints the TB_RESULT line;
// a watchdog ends the run if it hangs.
module tb_tim_xoff_counter;
  logic clk = 0, rst_n = 0;
  logic l1a_in, xoff, run, clr;
  logic [31:0] count;
  logic [3:0]  count4;
  int checks = 0, failures = 0;
  longint unsigned ref32, ref4;

  tim_xoff_counter dut (.clk, .rst_n, .l1a_in, .xoff, .run, .clr, .count);
  tim_xoff_counter #(.WIDTH(4)) dut4 (.clk, .rst_n, .l1a_in, .xoff, .run,
                                     .clr, .count(count4));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    l1a_in = 0; xoff = 0; run = 0; clr = 0;
    ref32 = 0; ref4 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (count !== 32'(ref32)) begin
        failures++;
        $display("cycle %0d: count %0d, expected %0d", i, count, ref32);
      end
      if (count4 !== 4'(ref4)) begin
        failures++;
        $display("cycle %0d: 4-bit count %0d, expected %0d", i, count4, ref4);
      end
      checks += 2;
      l1a_in = ($urandom % 3) == 0;
      xoff   = (i / 200) % 2 == 1;
      run    = (i % 1000) < 900;
      clr    = ($urandom % 1500) == 0;
      @(posedge clk);
      #1;
      if (clr) begin
        ref32 = 0; ref4 = 0;
      end else if (l1a_in && xoff && run) begin
        ref32++;
        if (ref4 < 15) ref4++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
