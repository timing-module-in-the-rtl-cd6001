// Testbench for tim_bgo_decoder: all 16 codes with and without strobe are
// compared with the BGO code table.
module tb_tim_bgo_decoder;
  import tim_pkg::*;
  logic strb;
  logic [3:0] code;
  bgo_cmd_t cmd, exp_cmd;
  int checks = 0, failures = 0;

  tim_bgo_decoder dut (.strb, .code, .cmd);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int c = 0; c < 16; c++) begin
        strb = 1'(s); code = 4'(c);
        exp_cmd = '0;
        if (s == 1) begin
          case (c)
            1:  exp_cmd.bc0        = 1;
            2:  exp_cmd.test_en    = 1;
            3:  exp_cmd.priv_gap   = 1;
            4:  exp_cmd.priv_orbit = 1;
            5:  exp_cmd.l1_reset   = 1;
            6:  exp_cmd.hard_reset = 1;
            7:  exp_cmd.evcnt_res  = 1;
            8:  exp_cmd.res_orbit  = 1;
            9:  exp_cmd.start_run  = 1;
            10: exp_cmd.stop_run   = 1;
            default: ;
          endcase
        end
        #5;
        checks++;
        if (cmd != exp_cmd) begin
          failures++;
          $display("FAIL strb=%0d code=%0d cmd=%b", s, c, cmd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
