// Testbench for tim_rop: model readout buffers are filled with the words of
// several events (RO_LENGTH = 3) at random times while GTFE_READY toggles
// randomly. The stream of valid words must be exactly the expected records:
// IDENTIFIER, event number high/low (1, 2, ...), BC word and data word per
// bx, word count 3+2*3 = 9, EOR; nothing may be sent while GTFE_READY is low.
module tb_tim_rop;
  import tim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr, evcnt_res, gtfe_ready, robuf_empty, robuf_rd, word_vld, in_record;
  logic [7:0] ro_length;
  logic [15:0] identifier, eof_value;
  ro_word_t robuf_a, robuf_bx, word;
  logic [23:0] evnr;
  int checks = 0, failures = 0;
  ro_word_t qa[$], qbx[$], exp_w[$];
  int n_words, n_stall;
  localparam int NEV = 12;

  tim_rop dut (.*);

  task automatic upd();
    robuf_empty = (qa.size() == 0);
    robuf_a  = robuf_empty ? '0 : qa[0];
    robuf_bx = robuf_empty ? '0 : qbx[0];
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (!gtfe_ready) chk(!word_vld, "silent while GTFE not ready");
      if (in_record && !gtfe_ready) n_stall++;
      if (word_vld) begin
        ro_word_t e;
        e = exp_w.pop_front();
        chk(word == e, $sformatf("word %0d: got %h expected %h", n_words, word, e));
        n_words++;
      end
      if (robuf_rd) begin
        void'(qa.pop_front()); void'(qbx.pop_front());
      end
    end
  end
  always @(posedge clk) begin
    #1 upd();
    gtfe_ready = ($urandom % 4) != 0;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; evcnt_res = 0; gtfe_ready = 1; ro_length = 8'd3;
    identifier = 16'hC0DE; eof_value = 16'hE0F0; n_words = 0; n_stall = 0;
    upd();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int ev = 1; ev <= NEV; ev++) begin
      exp_w.push_back('{ID_HEADER, identifier});
      exp_w.push_back('{ID_HEADER, 16'(ev >> 16)});
      exp_w.push_back('{ID_HEADER, 16'(ev)});
      repeat ($urandom % 15) @(posedge clk);
      #2;
      for (int b = 0; b < 3; b++) begin
        ro_word_t a, x;
        a = '{(ev % 4 == 0) ? ID_CALIB : ID_EVENT, 16'($urandom)};
        x = '{ID_BCNR, 16'(ev * 10 + b)};
        qa.push_back(a); qbx.push_back(x);
        exp_w.push_back(x); exp_w.push_back(a);
      end
      upd();
      exp_w.push_back('{ID_HEADER, 16'd9});
      exp_w.push_back('{ID_HEADER, eof_value});
    end
    repeat (500) @(posedge clk);
    #1 chk(exp_w.size() == 0 && n_words == NEV * 11, "all records sent");
    chk(n_stall > 0, "GTFE_READY low inside a record was exercised");
    chk(evnr == 24'(NEV), "event number");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
