// Testbench for tim_ring_buffer: each bx writes a value derived from the bx
// count; after a BCRES, data of bunch crossing NN must be found at address
// NN mod 1024, the last 1024 bx are readable, and freeze keeps the content.
module tb_tim_ring_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bcres, freeze;
  logic [15:0] wdata, rd_data;
  logic [11:0] wr_bc;
  logic [9:0] rd_addr;
  int checks = 0, failures = 0;
  int t;   // bx since BCRES

  tim_ring_buffer dut (.*);

  function automatic logic [15:0] pattern(input int bx);
    return 16'(bx * 40503 + 17);
  endfunction

  always @(posedge clk) begin
    t <= bcres ? 0 : t + 1;
  end
  assign wdata = pattern(t);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int now;
    bcres = 0; freeze = 0; rd_addr = 0; t = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (37) @(posedge clk);
    #1 bcres = 1;
    @(posedge clk); #1 bcres = 0;
    repeat (2500) @(posedge clk);
    #1 freeze = 1;
    now = t;     // bx number being written (not written: frozen)
    chk(int'(wr_bc) == now, "write counter equals bx number");
    repeat (100) @(posedge clk);
    for (int k = 1; k <= 1024; k++) begin
      int bx;
      bx = now - k;
      #1 rd_addr = 10'(bx % 1024);
      @(posedge clk); #1;
      chk(rd_data == pattern(bx), "content of the last 1024 bx");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
