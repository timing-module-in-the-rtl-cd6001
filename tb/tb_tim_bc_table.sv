// Testbench for tim_bc_table: entries are written over VME and read back;
// with a 200-bx orbit, PER_L1A/PER_MONRQST must appear one bx after their
// BC number in every second orbit (TRIG_PERIOD = 1), BGO and message bits
// in every orbit (BGO_PERIOD = 0), nothing before the first BCRES and
// nothing after HARD_RES_VME.
module tb_tim_bc_table;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [11:0] bc, vme_addr, vme_wdata, vme_rdata;
  logic bcres, hard_res_vme, vme_we, enabled;
  logic [15:0] trig_period, bgo_period;
  logic per_monrqst, per_l1a, msg_strb, bgo_strb;
  logic [1:0] msg_bits;
  logic [3:0] bgo_code;
  int checks = 0, failures = 0;
  int orbit, n_l1a, n_bgo;
  logic run_bc, started;

  tim_bc_table dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s bc=%0d orbit=%0d", what, bc, orbit); end
  endtask

  assign bcres = run_bc && (bc == 12'd199);

  always @(posedge clk) begin
    if (run_bc) begin
      // outputs now belong to BC number bc-1
      logic act_t, act_b, on;
      on    = started && !hard_res_vme;
      act_t = on && (orbit % 2 == 0);
      act_b = on;
      chk(per_l1a     == (act_t && bc == 12'd11), "PER_L1A");
      chk(per_monrqst == (act_t && bc == 12'd21), "PER_MONRQST");
      chk(bgo_strb    == (act_b && bc == 12'd31), "BGO strobe");
      if (bgo_strb) chk(bgo_code == 4'h9, "BGO code");
      chk(msg_strb    == (act_b && bc == 12'd41), "message strobe");
      if (msg_strb) chk(msg_bits == 2'b10, "message bits");
      n_l1a += int'(per_l1a);
      n_bgo += int'(bgo_strb);
      if (bc == 12'd0 && started) orbit++;
      if (bcres && !started) begin started = 1; orbit = -1; end
      bc <= (bc == 12'd199) ? 12'd0 : bc + 12'd1;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic vme_write(input int a, input int d);
    @(posedge clk); #1 vme_addr = 12'(a); vme_wdata = 12'(d); vme_we = 1;
    @(posedge clk); #1 vme_we = 0;
  endtask

  initial begin
    bc = 0; run_bc = 0; started = 0; orbit = 0; n_l1a = 0; n_bgo = 0;
    hard_res_vme = 0; vme_we = 0; vme_addr = 0; vme_wdata = 0;
    trig_period = 16'd1; bgo_period = 16'd0;
    for (int i = 0; i < 4096; i++) dut.mem[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    vme_write(10, 12'h100);
    vme_write(20, 12'h200);
    vme_write(30, 12'h019);
    vme_write(40, 12'h0A0);
    vme_write(4095, 12'hABC);
    @(posedge clk); #1 vme_addr = 12'd4095;
    @(posedge clk); #1 chk(vme_rdata == 12'hABC, "VME read back");
    vme_addr = 12'd30;
    @(posedge clk); #1 chk(vme_rdata == 12'h019, "VME read back 2");
    bc = 12'd150; run_bc = 1;
    repeat (1050) @(posedge clk);
    #1 hard_res_vme = 1;
    @(posedge clk); #1 hard_res_vme = 0;
    chk(enabled == 0, "HARD_RES_VME stops generation");
    run_bc = 0;
    chk(n_l1a == 3 && n_bgo == 5, "pulse counts");
    $display("orbits active: l1a=%0d bgo=%0d", n_l1a, n_bgo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
