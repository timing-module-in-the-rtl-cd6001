// Testbench for tim_crate_delay: the output comes exactly 1 + delay clocks
// after the input for several delays, and a second input during the count
// suppresses the first.
module tb_tim_crate_delay;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [15:0] delay;
  logic in, out;
  int checks = 0, failures = 0;

  tim_crate_delay dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse at cycle 0; out must be high only in cycle 1+d (sampled after edges)
  task automatic run(input int d);
    delay = 16'(d);
    repeat (3) @(posedge clk);
    #1 in = 1;
    @(posedge clk); #1 in = 0;
    for (int j = 1; j <= d + 5; j++) begin
      checks++;
      if (out != (j == d + 1)) begin
        failures++;
        $display("FAIL d=%0d j=%0d out=%b", d, j, out);
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    in = 0; delay = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(0); run(1); run(2); run(17); run(300); run(3563);
    // restart: second pulse 5 bx after the first, delay 10: only one output 11 bx after the second
    delay = 16'd10;
    @(posedge clk); #1 in = 1;
    @(posedge clk); #1 in = 0;
    repeat (4) @(posedge clk);
    #1 in = 1;
    @(posedge clk); #1 in = 0;
    for (int j = 1; j <= 20; j++) begin
      checks++;
      if (out != (j == 11)) begin failures++; $display("FAIL restart j=%0d", j); end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
