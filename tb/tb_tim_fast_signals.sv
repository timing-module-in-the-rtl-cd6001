// Testbench for tim_fast_signals: random flag and enable patterns are
// compared one clock later with the Fast Signal equations.
module tb_tim_fast_signals;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic setup_done, ttc_ready, ttc_rdy_vme, en_bc_check, en_queue_check;
  logic bad_max_bc, bad_local_bc, dberr, robuf_syncerr, robuf_ovf, robuf_warn;
  logic l1a_too_old, too_many_l1a, l1a_old_warn;
  logic tim_err, tim_out_of_sync, tim_warning, tim_ready, tim_busy;
  int checks = 0, failures = 0;

  tim_fast_signals dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] e;
    {setup_done, ttc_ready, ttc_rdy_vme, en_bc_check, en_queue_check, bad_max_bc,
     bad_local_bc, dberr, robuf_syncerr, robuf_ovf, robuf_warn, l1a_too_old,
     too_many_l1a, l1a_old_warn} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      // sparse flags so that each term matters on its own
      {setup_done, ttc_ready, ttc_rdy_vme, en_bc_check, en_queue_check} = 5'($urandom);
      {bad_max_bc, bad_local_bc, dberr, robuf_syncerr, robuf_ovf, robuf_warn,
       l1a_too_old, too_many_l1a, l1a_old_warn} = 9'(1 << ($urandom % 10));
      e[4] = (en_bc_check & (bad_max_bc | bad_local_bc)) | dberr;
      e[3] = robuf_syncerr | robuf_ovf | (en_queue_check & (l1a_too_old | too_many_l1a));
      e[2] = (en_queue_check & l1a_old_warn) | robuf_warn;
      e[1] = setup_done & (ttc_ready | ttc_rdy_vme);
      e[0] = ~setup_done;
      @(posedge clk); #1;
      checks++;
      if ({tim_err, tim_out_of_sync, tim_warning, tim_ready, tim_busy} != e) begin
        failures++;
        $display("FAIL i=%0d got %b expected %b", i,
                 {tim_err, tim_out_of_sync, tim_warning, tim_ready, tim_busy}, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
