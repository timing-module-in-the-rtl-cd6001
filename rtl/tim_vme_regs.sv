// tim_vme_regs: VME register file of the TIM chip.
// The VME chip presents a byte address (A17..A0, A0 ignored), a 16-bit
// write word with a write strobe, or a read strobe. Writable registers keep
// their value; a write to COMMAND PULSE (1_0038) yields a one-clock pulse on
// every cmd_pulse bit written as 1 (the same address reads STATUS). Bits 15
// and 14 of COMMAND PULSE set and clear the RESET_TTCRX flip-flop.
// Read-only registers, the TTC dump (1_0080..1_009E), the BC-Table
// (0_2000..0_3FFE) and the ring buffer (0_4000..0_47FE) are read through the
// input ports; the module drives the memory addresses from the VME address
// and writes the BC-Table. Unused addresses read 0.
// Map, reset values and pulse behaviour follow the register description;
// COMMAND resets to 0x0001 (TTCrx L1A, TIM_SETUPDONE = 0), see the manual
// note on its default. Timing: read data are valid (rvld) two clocks after
// the read strobe, with the address held for the first of them; writes take
// effect at the next clock.
module tim_vme_regs
  import tim_pkg::*;
#(
  parameter logic [3:0]  CARD_NR = 4'd0,           // card number in CHIP_ID_L
  parameter logic [31:0] VERSION = 32'h0000_1001   // CHIP_VERSION
) (
  input  logic        clk,            // clock
  input  logic        rst_n,          // active-low synchronous reset
  // VME chip bus
  input  logic        vme_we,         // write strobe
  input  logic        vme_re,         // read strobe
  input  logic [17:0] vme_addr,       // byte address A17..A0
  input  logic [15:0] vme_wdata,      // write data
  output logic [15:0] vme_rdata,      // read data
  output logic        vme_rvld,       // read data valid
  // writable registers
  output logic [15:0] dly_slot [N_SLOTS], // DLY_L1,R1,...,L8,R8,L9
  output logic [15:0] dly_tim,        // DLY_TIM
  output logic [15:0] dly_pan,        // DLY_PAN
  output logic [15:0] dis_boards,     // DIS_boards
  output logic [15:0] dly_crate_ttc,  // DLY_CRATE_TTC
  output logic [15:0] dly_crate_ecl,  // DLY_CRATE_ECL
  output logic [15:0] trig_period,    // TRIG_PERIOD
  output logic [15:0] bgo_period,     // BGO_PERIOD
  output logic [15:0] orbit_length,   // ORBIT_LENGTH
  output logic [7:0]  ttc_subaddr,    // TTC subaddress
  output logic [15:0] command,        // COMMAND register
  output logic [15:0] rocmd,          // ROCMD register
  output logic [7:0]  dly_l1a_tcs,    // DLY_L1A_TCS
  output logic [15:0] robuf_par,      // ROBUF_PAR: NR_ROBUF, RO_LENGTH
  output logic [15:0] identifier,     // IDENTIFIER
  output logic [15:0] idle_value,     // IDLE_VALUE
  output logic [15:0] eof_value,      // EOF_VALUE
  output logic [15:0] testdata,       // TESTDATA
  output logic [15:0] mon_rqst_id,    // MON_RQST ID
  output logic [15:0] cmd_pulse,      // command pulses
  output logic        reset_ttcrx,    // RESET_TTCRX flip-flop
  // read-only values
  input  logic [15:0] status,         // STATUS register
  input  logic [7:0]  last_msg,       // last TTC message
  input  logic [15:0] robuf_bx_head,  // head of ROBUF_BX
  input  logic [15:0] robuf_a_head,   // head of ROBUF_A
  input  logic [15:0] bad_l1a_ttc,    // BAD_L1A_TTC counter
  input  logic [15:0] bc_diff,        // BC_DIFF
  input  logic [15:0] max_bcnr,       // MAX_BCNR
  input  logic [11:0] ttc_bcnr,       // TTC_BCNR
  input  logic [23:0] loc_evnr,       // local event number
  input  logic [23:0] ttc_evnr,       // TTCrx event number
  // memories
  output logic [3:0]  dump_addr,      // TTC dump read address
  input  logic [7:0]  dump_data,      // TTC dump read data
  output logic        bct_we,         // BC-Table write
  output logic [11:0] bct_addr,       // BC-Table address
  output logic [11:0] bct_wdata,      // BC-Table write data
  input  logic [11:0] bct_rdata,      // BC-Table read data
  output logic [9:0]  ribuf_addr,     // ring-buffer read address
  input  logic [15:0] ribuf_rdata     // ring-buffer read data
);

  logic [17:0] addr_q;
  logic        re_q;
  logic [15:0] rmux;
  logic        in_bct, in_ribuf, in_dump;

  assign dump_addr  = vme_addr[4:1];
  assign bct_addr   = vme_addr[12:1];
  assign bct_wdata  = vme_wdata[11:0];
  assign ribuf_addr = vme_addr[10:1];
  assign bct_we     = vme_we && (vme_addr[17:13] == A_BC_TABLE[17:13]);

  assign in_bct   = (addr_q[17:13] == A_BC_TABLE[17:13]);
  assign in_ribuf = (addr_q[17:11] == A_RING_BUFFER[17:11]);
  assign in_dump  = (addr_q[17:5]  == A_TTC_DUMP[17:5]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_SLOTS; i++) dly_slot[i] <= 16'hFFFF;
      dly_tim       <= 16'hFFFF;
      dly_pan       <= 16'hFFFF;
      dis_boards    <= '0;
      dly_crate_ttc <= '0;
      dly_crate_ecl <= '0;
      trig_period   <= '0;
      bgo_period    <= '0;
      orbit_length  <= ORBIT_LENGTH_DEFAULT;
      ttc_subaddr   <= '0;
      command       <= 16'h0001;
      rocmd         <= '0;
      dly_l1a_tcs   <= 8'hFF;
      robuf_par     <= '0;
      identifier    <= '0;
      idle_value    <= '0;
      eof_value     <= '0;
      testdata      <= '0;
      mon_rqst_id   <= '0;
      cmd_pulse     <= '0;
      reset_ttcrx   <= 1'b0;
    end else begin
      cmd_pulse <= '0;
      if (vme_we) begin
        for (int i = 0; i < N_SLOTS; i++)
          if (vme_addr == A_DLY_BASE + 18'(2*i)) dly_slot[i] <= vme_wdata;
        unique case (vme_addr)
          A_DLY_TIM:       dly_tim       <= vme_wdata;
          A_DLY_PAN:       dly_pan       <= vme_wdata;
          A_DIS_BOARDS:    dis_boards    <= vme_wdata;
          A_DLY_CRATE_TTC: dly_crate_ttc <= vme_wdata;
          A_DLY_CRATE_ECL: dly_crate_ecl <= vme_wdata;
          A_TRIG_PERIOD:   trig_period   <= vme_wdata;
          A_BGO_PERIOD:    bgo_period    <= vme_wdata;
          A_ORBIT_LENGTH:  orbit_length  <= vme_wdata;
          A_TTC_SUBADDR:   ttc_subaddr   <= vme_wdata[7:0];
          A_CMD_STATUS: begin
            cmd_pulse <= vme_wdata;
            if (vme_wdata[15])      reset_ttcrx <= 1'b1;
            else if (vme_wdata[14]) reset_ttcrx <= 1'b0;
          end
          A_COMMAND:       command       <= vme_wdata;
          A_ROCMD:         rocmd         <= vme_wdata;
          A_DLY_L1A_TCS:   dly_l1a_tcs   <= vme_wdata[7:0];
          A_ROBUF_PAR:     robuf_par     <= vme_wdata;
          A_IDENTIFIER:    identifier    <= vme_wdata;
          A_IDLE_VALUE:    idle_value    <= vme_wdata;
          A_EOF_VALUE:     eof_value     <= vme_wdata;
          A_TESTDATA:      testdata      <= vme_wdata;
          A_MON_RQST_ID:   mon_rqst_id   <= vme_wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rmux = 16'h0000;
    for (int i = 0; i < N_SLOTS; i++)
      if (addr_q == A_DLY_BASE + 18'(2*i)) rmux = dly_slot[i];
    if (in_bct)        rmux = {4'h0, bct_rdata};
    else if (in_ribuf) rmux = ribuf_rdata;
    else if (in_dump)  rmux = {8'h00, dump_data};
    else begin
      case (addr_q)
        A_DLY_TIM:       rmux = dly_tim;
        A_DLY_PAN:       rmux = dly_pan;
        A_DIS_BOARDS:    rmux = dis_boards;
        A_DLY_CRATE_TTC: rmux = dly_crate_ttc;
        A_DLY_CRATE_ECL: rmux = dly_crate_ecl;
        A_TRIG_PERIOD:   rmux = trig_period;
        A_BGO_PERIOD:    rmux = bgo_period;
        A_ORBIT_LENGTH:  rmux = orbit_length;
        A_TTC_SUBADDR:   rmux = {last_msg, ttc_subaddr};
        A_CMD_STATUS:    rmux = status;
        A_COMMAND:       rmux = command;
        A_ROCMD:         rmux = rocmd;
        A_DLY_L1A_TCS:   rmux = {8'h00, dly_l1a_tcs};
        A_ROBUF_PAR:     rmux = robuf_par;
        A_IDENTIFIER:    rmux = identifier;
        A_IDLE_VALUE:    rmux = idle_value;
        A_EOF_VALUE:     rmux = eof_value;
        A_TESTDATA:      rmux = testdata;
        A_MON_RQST_ID:   rmux = mon_rqst_id;
        A_ROBUF_BX:      rmux = robuf_bx_head;
        A_ROBUF_A:       rmux = robuf_a_head;
        A_BAD_L1A_TTC:   rmux = bad_l1a_ttc;
        A_BC_DIFF:       rmux = bc_diff;
        A_MAX_BCNR:      rmux = max_bcnr;
        A_TTC_BCNR:      rmux = {4'h0, ttc_bcnr};
        A_LOC_EVNR_H:    rmux = {8'h00, loc_evnr[23:16]};
        A_LOC_EVNR_L:    rmux = loc_evnr[15:0];
        A_TTC_EVNR_H:    rmux = {8'h00, ttc_evnr[23:16]};
        A_TTC_EVNR_L:    rmux = ttc_evnr[15:0];
        A_CHIP_ID_H:     rmux = 16'h0001;
        A_CHIP_ID_L:     rmux = {4'h4, 4'h2, CARD_NR, 4'h1};
        A_VERSION_H:     rmux = VERSION[31:16];
        A_VERSION_L:     rmux = VERSION[15:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr_q    <= '0;
      re_q      <= 1'b0;
      vme_rdata <= '0;
      vme_rvld  <= 1'b0;
    end else begin
      addr_q    <= vme_addr;
      re_q      <= vme_re;
      vme_rdata <= rmux;
      vme_rvld  <= re_q;
    end
  end

endmodule
