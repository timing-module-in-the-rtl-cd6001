// Testbench for tim_rop_mux: random event and monitoring words (valid or
// not) are sent; each clock later phase A and phase B must hold the
// formatted words (type, per-stream incrementing number, 00, identifier,
// data, IDLE_VALUE when nothing is valid), swapped when INVERT_ROPMUX is set.
module tb_tim_rop_mux;
  import tim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic link_on, invert, ev_vld, mon_vld, link_en;
  logic [15:0] idle_value;
  ro_word_t ev_word, mon_word;
  logic [27:0] phase_a, phase_b, exp_a, exp_b;
  int checks = 0, failures = 0;
  int num;

  tim_rop_mux dut (.*);

  function automatic logic [27:0] f(input logic vld, input logic [1:0] t, input int n,
                                    input ro_word_t w, input logic [15:0] idle);
    if (vld) return {t, 6'(n), 2'b00, w.id, w.data};
    return {2'b00, 6'(n), 2'b00, 2'b00, idle};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    link_on = 0; invert = 0; ev_vld = 0; mon_vld = 0; ev_word = '0; mon_word = '0;
    idle_value = 16'hBC50; num = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      logic [27:0] fe, fm;
      ev_vld = 1'($urandom); mon_vld = 1'($urandom);
      ev_word = ro_word_t'($urandom); mon_word = ro_word_t'($urandom);
      invert = (i >= 150); link_on = (i >= 20);
      fe = f(ev_vld, 2'b01, num, ev_word, idle_value);
      fm = f(mon_vld, 2'b10, num, mon_word, idle_value);
      exp_a = invert ? fm : fe;
      exp_b = invert ? fe : fm;
      @(posedge clk); #1;
      checks++;
      if (phase_a != exp_a || phase_b != exp_b || link_en != (i >= 20)) begin
        failures++;
        $display("FAIL i=%0d a=%h/%h b=%h/%h", i, phase_a, exp_a, phase_b, exp_b);
      end
      num++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
