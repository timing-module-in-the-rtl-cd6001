// Testbench for tim_vme_regs: reset values, write/read-back of every
// writable register, read-only registers and memory windows through the
// input ports, one-clock command pulses and the RESET_TTCRX flip-flop.
// The bus model issues one access per clock and waits for rvld.
module tb_tim_vme_regs;
  import tim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic vme_we, vme_re, vme_rvld, reset_ttcrx, bct_we;
  logic [17:0] vme_addr;
  logic [15:0] vme_wdata, vme_rdata;
  logic [15:0] dly_slot [N_SLOTS];
  logic [15:0] dly_tim, dly_pan, dis_boards, dly_crate_ttc, dly_crate_ecl, trig_period,
               bgo_period, orbit_length, command, rocmd, robuf_par, identifier,
               idle_value, eof_value, testdata, mon_rqst_id, cmd_pulse;
  logic [7:0]  ttc_subaddr, dly_l1a_tcs, last_msg, dump_data;
  logic [15:0] status, robuf_bx_head, robuf_a_head, bad_l1a_ttc, bc_diff, max_bcnr;
  logic [11:0] ttc_bcnr, bct_addr, bct_wdata, bct_rdata;
  logic [23:0] loc_evnr, ttc_evnr;
  logic [3:0]  dump_addr;
  logic [9:0]  ribuf_addr;
  logic [15:0] ribuf_rdata;
  int checks = 0, failures = 0;
  int pulses = 0;

  tim_vme_regs #(.CARD_NR(4'd5)) dut (.*);

  // memory models behind the windows
  logic [11:0] bct_mem [4096];
  always_ff @(posedge clk) if (bct_we) bct_mem[bct_addr] <= bct_wdata;
  always_ff @(posedge clk) bct_rdata <= bct_mem[bct_addr];
  always_ff @(posedge clk) ribuf_rdata <= {6'h2A, ribuf_addr};
  always_ff @(posedge clk) dump_data <= {4'hD, dump_addr};

  always @(posedge clk) if (cmd_pulse != 0) pulses++;

  task automatic wr(input logic [17:0] a, input logic [15:0] d);
    @(posedge clk); #1 vme_we = 1; vme_addr = a; vme_wdata = d;
    @(posedge clk); #1 vme_we = 0;
  endtask

  task automatic rd(input logic [17:0] a, output logic [15:0] d);
    @(posedge clk); #1 vme_re = 1; vme_addr = a;
    @(posedge clk); #1 vme_re = 0;
    @(posedge clk); #1;
    if (!vme_rvld) begin failures++; $display("FAIL no rvld at %h", a); end
    d = vme_rdata;
  endtask

  task automatic expect_rd(input logic [17:0] a, input logic [15:0] e);
    logic [15:0] d;
    rd(a, d);
    checks++;
    if (d !== e) begin failures++; $display("FAIL read %h = %h expected %h", a, d, e); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [17:0] RW [19] = '{A_DIS_BOARDS, A_DLY_TIM, A_DLY_PAN, A_DLY_CRATE_TTC,
    A_DLY_CRATE_ECL, A_TRIG_PERIOD, A_BGO_PERIOD, A_ORBIT_LENGTH, A_COMMAND, A_ROCMD,
    A_ROBUF_PAR, A_IDENTIFIER, A_IDLE_VALUE, A_EOF_VALUE, A_TESTDATA, A_MON_RQST_ID,
    A_DLY_BASE, A_DLY_BASE + 18'h20, A_DLY_BASE + 18'h0E};

  initial begin
    logic [15:0] v, d;
    vme_we = 0; vme_re = 0; vme_addr = '0; vme_wdata = '0;
    last_msg = 8'hA5; status = 16'h1234; robuf_bx_head = 16'hB00B; robuf_a_head = 16'hA00A;
    bad_l1a_ttc = 16'd77; bc_diff = 16'd3; max_bcnr = 16'd3563; ttc_bcnr = 12'd100;
    loc_evnr = 24'hABCDEF; ttc_evnr = 24'h123456;
    for (int i = 0; i < 4096; i++) bct_mem[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // reset values
    expect_rd(A_COMMAND, 16'h0001);
    expect_rd(A_ORBIT_LENGTH, ORBIT_LENGTH_DEFAULT);
    expect_rd(A_DLY_BASE, 16'hFFFF);
    expect_rd(A_DLY_TIM, 16'hFFFF);
    expect_rd(A_DLY_L1A_TCS, 16'h00FF);
    expect_rd(A_ROCMD, 16'h0000);
    // read/write registers
    for (int k = 0; k < 3; k++)
      foreach (RW[i]) begin
        v = 16'($urandom);
        wr(RW[i], v);
        expect_rd(RW[i], v);
      end
    wr(A_TTC_SUBADDR, 16'h0042);
    expect_rd(A_TTC_SUBADDR, 16'hA542);
    wr(A_DLY_L1A_TCS, 16'h1234);
    expect_rd(A_DLY_L1A_TCS, 16'h0034);
    // outputs follow the registers
    wr(A_DLY_BASE + 18'h06, 16'h00E1);
    checks++; if (dly_slot[3] != 16'h00E1) begin failures++; $display("FAIL dly_slot[3]"); end
    // read-only registers
    expect_rd(A_CMD_STATUS, 16'h1234);
    expect_rd(A_ROBUF_BX, 16'hB00B);
    expect_rd(A_ROBUF_A, 16'hA00A);
    expect_rd(A_BAD_L1A_TTC, 16'd77);
    expect_rd(A_MAX_BCNR, 16'd3563);
    expect_rd(A_TTC_BCNR, 16'd100);
    expect_rd(A_LOC_EVNR_H, 16'h00AB);
    expect_rd(A_LOC_EVNR_L, 16'hCDEF);
    expect_rd(A_TTC_EVNR_H, 16'h0012);
    expect_rd(A_TTC_EVNR_L, 16'h3456);
    expect_rd(A_CHIP_ID_H, 16'h0001);
    expect_rd(A_CHIP_ID_L, 16'h4251);
    expect_rd(18'h1_00FE, 16'h0000);
    // memory windows
    for (int i = 0; i < 20; i++) begin
      int a = $urandom % 4096;
      v = 16'($urandom % 4096);
      wr(A_BC_TABLE + 18'(2*a), v);
      expect_rd(A_BC_TABLE + 18'(2*a), v);
    end
    for (int i = 0; i < 10; i++) begin
      int a = $urandom % 1024;
      expect_rd(A_RING_BUFFER + 18'(2*a), {6'h2A, 10'(a)});
    end
    for (int i = 0; i < 16; i++) expect_rd(A_TTC_DUMP + 18'(2*i), {8'h00, 4'hD, 4'(i)});
    // command pulses last one clock and do not change COMMAND
    pulses = 0;
    wr(A_CMD_STATUS, 16'h0802);
    repeat (3) @(posedge clk);
    checks++; if (pulses != 1) begin failures++; $display("FAIL pulses=%0d", pulses); end
    checks++; if (reset_ttcrx) begin failures++; $display("FAIL reset_ttcrx set"); end
    wr(A_CMD_STATUS, 16'h8000);
    checks++; if (!reset_ttcrx) begin failures++; $display("FAIL reset_ttcrx not set"); end
    wr(A_CMD_STATUS, 16'h4000);
    checks++; if (reset_ttcrx) begin failures++; $display("FAIL reset_ttcrx not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
