// Testbench for tim_bp_channel: checks the two-line code of L1A, RESET and
// EVCNT_RES (including coincidences), the separate BCRES delay, and that a
// disabled slot stays silent.
module tb_tim_bp_channel;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [15:0] dly_reg;
  logic dis, l1a, l1_reset, evcnt_res, bcres, bp_l1a, bp_reset, bp_bcres;
  int checks = 0, failures = 0;

  tim_bp_channel dut (.clk, .rst_n, .dly_reg, .disable_i(dis), .l1a, .l1_reset,
                      .evcnt_res, .bcres, .bp_l1a, .bp_reset, .bp_bcres);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one pulse set, then look for the code after dl bx and BCRES after dr bx
  task automatic send(input logic a, input logic r, input logic e, input logic b,
                      input int dl, input int dr, input logic en);
    logic [1:0] exp_code;
    exp_code = e ? 2'b11 : a ? 2'b10 : r ? 2'b01 : 2'b00;
    if (!en) exp_code = 2'b00;
    repeat (40) @(posedge clk);
    #1 {l1a, l1_reset, evcnt_res, bcres} = {a, r, e, b};
    for (int j = 0; j < 35; j++) begin
      #3;
      checks++;
      if ({bp_l1a, bp_reset} != ((j == dl) ? exp_code : 2'b00) ||
          bp_bcres != ((j == dr) ? (b & en) : 1'b0)) begin
        failures++;
        $display("FAIL j=%0d code=%b%b bc=%b", j, bp_l1a, bp_reset, bp_bcres);
      end
      @(posedge clk);
      #1 {l1a, l1_reset, evcnt_res, bcres} = '0;
    end
  endtask

  initial begin
    {l1a, l1_reset, evcnt_res, bcres} = '0; dis = 0;
    dly_reg = 16'h31F5;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    send(1, 0, 0, 0, 6, 6, 1);
    send(0, 1, 0, 1, 6, 6, 1);
    send(0, 0, 1, 0, 6, 6, 1);
    send(1, 1, 0, 1, 6, 6, 1);
    send(1, 0, 1, 0, 6, 6, 1);
    #1 dly_reg = 16'hFF_0_2;  // L1A 0 bx, RES 1+3=4 bx
    send(1, 0, 0, 1, 0, 4, 1);
    send(0, 1, 0, 0, 0, 4, 1);
    #1 dis = 1;
    send(1, 0, 0, 1, 0, 4, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
