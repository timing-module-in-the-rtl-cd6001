// Testbench for tim_bc_counter (orbit of 200 bx, ORBIT_LENGTH = 198 as used
// for simulation in the register description): the count is compared every
// clock with a reference counter; the periodic BCRES must come every 200 bx
// once started; a BCRES at the wrong count sets BAD_MAX_BC; a change of the
// local-to-TTC BC difference sets BAD_LOCAL_BC; clr clears both.
module tb_tim_bc_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bcres, en_check, clr, l1a, ttc_bcnr_vld, bcres_per, bad_max_bc, bad_local_bc;
  logic [15:0] orbit_length, bc_diff, max_bcnr;
  logic [11:0] ttc_bcnr, bc;
  logic loop;        // feed the periodic BCRES back as the BCRES
  logic ext_bcres;
  int checks = 0, failures = 0;
  int ref_bc, last_per, n_per;

  assign bcres = ext_bcres | (loop & bcres_per);

  tim_bc_counter dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t bc=%0d ref=%0d", what, $time, bc, ref_bc); end
  endtask

  // reference counter and periodic-BCRES spacing
  always @(posedge clk) begin
    if (rst_n) begin
      chk(bc == 12'(ref_bc), "count");
      if (bcres_per) begin
        if (last_per >= 0) chk(n_per - last_per == 200, "periodic BCRES spacing");
        last_per = n_per;
      end
      n_per++;
      if (bcres || ref_bc >= 199) ref_bc = 0; else ref_bc++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_bc = 0; last_per = -1; n_per = 0;
    ext_bcres = 0; loop = 0; en_check = 1; clr = 0; l1a = 0; ttc_bcnr_vld = 0; ttc_bcnr = 0;
    orbit_length = 16'd198;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (450) @(posedge clk);        // free running: wraps by itself
    #1 chk(bcres_per == 0, "no periodic BCRES before start");
    ext_bcres = 1; @(posedge clk); #1 ext_bcres = 0;   // first BCRES, at a wrong count
    chk(bad_max_bc == 0, "first BCRES is not checked");
    loop = 1;
    repeat (700) @(posedge clk);
    #1 chk(bad_max_bc == 0 && max_bcnr == 16'd199, "periodic BCRES at 199");
    loop = 0;
    wait (bc == 12'd50); #1;
    ext_bcres = 1; @(posedge clk); #1 ext_bcres = 0;
    @(posedge clk); #1 chk(bad_max_bc == 1 && max_bcnr == 16'd50, "BAD_MAX_BC on early BCRES");
    clr = 1; @(posedge clk); #1 clr = 0;
    chk(bad_max_bc == 0, "clr");
    // BAD_LOCAL_BC
    for (int k = 0; k < 4; k++) begin
      int at, off;
      off = (k < 3) ? 7 : 9;
      repeat (13 + k * 17) @(posedge clk);
      #1 l1a = 1; at = int'(bc);
      @(posedge clk); #1 l1a = 0;
      repeat (3) @(posedge clk);
      #1 ttc_bcnr = 12'(at + off); ttc_bcnr_vld = 1;
      @(posedge clk); #1 ttc_bcnr_vld = 0;
      chk(bc_diff == 16'(off), "BC_DIFF");
      chk(bad_local_bc == (k == 3), "BAD_LOCAL_BC");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
