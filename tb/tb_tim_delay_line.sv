// Testbench for tim_delay_line: for many digit pairs a one-bx pulse is sent
// and the bx in which it comes out is compared with
// ((dly_l+1) mod 16) + ((dly_h+1) mod 16); FF, EE and mixed cases included.
module tb_tim_delay_line;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] dly_h, dly_l;
  logic [1:0] d, q;
  int checks = 0, failures = 0;

  tim_delay_line #(.WIDTH(2)) dut (.clk, .rst_n, .dly_h, .dly_l, .d, .q);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [3:0] h, input logic [3:0] l);
    int exp_dly;
    exp_dly = ((32'(l) + 1) % 16) + ((32'(h) + 1) % 16);
    dly_h = h; dly_l = l; d = '0;
    repeat (35) @(posedge clk);
    #1 d = 2'b10;
    for (int j = 0; j < 33; j++) begin
      #3;
      checks++;
      if (q != ((j == exp_dly) ? 2'b10 : 2'b00)) begin
        failures++;
        $display("FAIL h=%h l=%h j=%0d q=%b expected delay %0d", h, l, j, q, exp_dly);
      end
      @(posedge clk);
      #1 d = '0;
    end
  endtask

  initial begin
    d = '0; dly_h = 4'hF; dly_l = 4'hF;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(4'hF, 4'hF);
    run(4'hE, 4'hE);
    run(4'h0, 4'hF);
    run(4'hF, 4'h4);
    run(4'h7, 4'h2);
    for (int k = 0; k < 12; k++) run(4'($urandom), 4'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
