// Testbench for tim_source_select: each source is driven with a unique
// random pattern and every selection code is checked against the COMMAND
// register tables, including the inhibit codes.
module tb_tim_source_select;
  import tim_pkg::*;
  logic [9:0] sel;
  logic l1a_vme, l1a_ttc, l1a_lemo, l1a_per, l1a_tcs;
  logic bcres_vme, bcres_ttc, bcres_orbit, bcres_per;
  bgo_cmd_t bgo_vme, bgo_ttc, bgo_per, bgo_tcs, bgo;
  usr_msg_t msg_ttc, msg_per, msg;
  logic evres_vme, evres_ttc, l1a, bcres, evcnt_res;
  int checks = 0, failures = 0;

  tim_source_select dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s sel=%b", what, sel); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      logic [4:0] l1s; logic [4:0] bcs;
      logic e_l1a, e_bc, e_ev;
      bgo_cmd_t e_bgo; usr_msg_t e_msg;
      {l1a_vme, l1a_ttc, l1a_lemo, l1a_per, l1a_tcs} = 5'($urandom);
      {bcres_vme, bcres_ttc, bcres_orbit, bcres_per} = 4'($urandom);
      bgo_vme = bgo_cmd_t'($urandom); bgo_ttc = bgo_cmd_t'($urandom);
      bgo_per = bgo_cmd_t'($urandom); bgo_tcs = bgo_cmd_t'($urandom);
      msg_ttc = usr_msg_t'($urandom); msg_per = usr_msg_t'($urandom);
      {evres_vme, evres_ttc} = 2'($urandom);
      sel = 10'($urandom);
      l1s = {l1a_tcs, l1a_per, l1a_lemo, l1a_ttc, l1a_vme};
      case (sel[7:6])
        2'b00: begin e_bgo = bgo_vme; e_msg = '0; end
        2'b01: begin e_bgo = bgo_ttc; e_msg = msg_ttc; end
        2'b10: begin e_bgo = bgo_per; e_msg = msg_per; end
        default: begin e_bgo = bgo_tcs; e_msg = '0; end
      endcase
      // the periodic BCRES is started (and re-aligned) by the TTCrx or VME BCRES
      bcs = {e_bgo.bc0, bcres_per | bcres_ttc | bcres_vme, bcres_orbit, bcres_ttc, bcres_vme};
      e_l1a = (sel[2:0] < 3'd5) ? l1s[sel[2:0]] : 1'b0;
      e_bc  = (sel[5:3] < 3'd5) ? bcs[sel[5:3]] : 1'b0;
      case (sel[9:8])
        2'b00: e_ev = evres_vme;
        2'b01: e_ev = evres_ttc;
        2'b10: e_ev = e_bgo.evcnt_res;
        default: e_ev = 1'b0;
      endcase
      #5;
      chk(l1a == e_l1a, "l1a");
      chk(bcres == e_bc, "bcres");
      chk(bgo == e_bgo, "bgo");
      chk(msg == e_msg, "msg");
      chk(evcnt_res == e_ev, "evcnt_res");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
