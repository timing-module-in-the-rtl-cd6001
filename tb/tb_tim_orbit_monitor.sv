// Testbench for tim_orbit_monitor: short orbits of ORB clocks; for several
// rates the orbit-reset pulses must fall on every n-th BCRES of a run and
// each be followed by exactly one monitoring request MON_BX clocks later.
// Nothing may happen outside a run or with rate 0; a new run restarts the
// count.
module tb_tim_orbit_monitor;
  localparam int ORB = 40;
  localparam int MON_BX = 16;
  localparam int RATES [4] = '{1, 2, 3, 5};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic run, new_run, bcres, orbit_reset, mon_trig;
  logic [15:0] rate;
  int checks = 0, failures = 0;
  int cyc = 0, nbcres = 0, last_reset = -1000;

  tim_orbit_monitor #(.MON_BX(MON_BX)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  // reference model, sampled at each clock edge
  always @(posedge clk) begin
    logic exp_reset;
    if (!rst_n) begin
      nbcres = 0;
    end else begin
      if (new_run) nbcres = 0;
      exp_reset = 0;
      if (bcres && run && rate != 0 && !new_run) begin
        nbcres++;
        exp_reset = (nbcres % rate == 0);
      end
      checks++;
      if (orbit_reset != exp_reset) begin
        failures++;
        $display("FAIL @%0d orbit_reset=%b expected %b (bcres #%0d rate %0d)", cyc,
                 orbit_reset, exp_reset, nbcres, rate);
      end
      checks++;
      if (mon_trig != (cyc == last_reset + MON_BX)) begin
        failures++;
        $display("FAIL @%0d mon_trig=%b last reset @%0d", cyc, mon_trig, last_reset);
      end
      if (orbit_reset) last_reset = cyc;
      if (new_run) last_reset = -1000;    // a new run drops a pending request
    end
  end

  always @(posedge clk) bcres <= #1 (cyc % ORB == ORB - 1);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic start(input int n);
    @(posedge clk); #2 rate = 16'(n); new_run = 1; run = 1;
    @(posedge clk); #2 new_run = 0;
  endtask

  initial begin
    run = 0; new_run = 0; rate = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    repeat (5 * ORB) @(posedge clk);       // no run
    start(0);
    repeat (5 * ORB) @(posedge clk);       // rate 0
    foreach (RATES[i]) begin
      start(RATES[i]);
      repeat (12 * ORB + $urandom % ORB) @(posedge clk);
    end
    #2 run = 0;
    repeat (4 * ORB) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
