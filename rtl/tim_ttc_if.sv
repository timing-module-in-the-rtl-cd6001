// tim_ttc_if: the TIM chip side of the TTCrx receiver interface.
// Broadcasts: BrcstStr1 qualifies the system bits Brcst[5:2], taken as a
// BGO command code; BrcstStr2 qualifies the user-message bits Brcst[7:6].
// The last received message bits are kept for the TTC SUBADDRESS register
// (bits 7..2 = Brcst[7:2]).
// BCnt bus: after an L1A the TTCrx puts the BC number and the low and high
// halves of its 24-bit event counter on BCnt[11:0], each with its own strobe
// (which of them appear depends on the TTCrx control register). Each value is
// captured on its strobe; ttc_bcnr_vld pulses with the BC number and
// ttc_evnr_vld with the high half, which comes last.
// Dump memory: 16 bytes. Each DoutStr writes Dout into entry SubAddr[3:0];
// a byte whose SubAddr equals the programmed TTC subaddress (an individually
// addressed command) goes to entry F.
// The signal list follows the TTCrx description; the strobe pairing and the
// dump-memory filling are this design's reading of it.
// Timing: outputs are registered, one clock after the strobes.
module tim_ttc_if (
  input  logic        clk,           // bunch-crossing clock
  input  logic        rst_n,         // active-low synchronous reset
  input  logic [7:2]  brcst,         // TTCrx Brcst[7:2]
  input  logic        brcst_str1,    // strobe for system bits 5..2
  input  logic        brcst_str2,    // strobe for user bits 7..6
  input  logic [11:0] bcnt,          // TTCrx BCnt bus
  input  logic        bcnt_str,      // BC number on BCnt
  input  logic        evcnt_l_str,   // event counter low on BCnt
  input  logic        evcnt_h_str,   // event counter high on BCnt
  input  logic [7:0]  dout,          // TTCrx Dout
  input  logic [7:0]  subaddr,       // TTCrx SubAddr
  input  logic        dout_str,      // TTCrx DoutStr
  input  logic [7:0]  subaddr_reg,   // TTC SUBADDRESS register
  input  logic [3:0]  dump_addr,     // dump memory read address
  output logic [7:0]  dump_data,     // dump memory read data (next clock)
  output logic        bgo_strb,      // BGO strobe
  output logic [3:0]  bgo_code,      // BGO code
  output logic        msg_strb,      // user-message strobe
  output logic [1:0]  msg_bits,      // user-message bits 7..6
  output logic [7:0]  last_msg,      // last message bits {Brcst[7:2],2'b00}
  output logic [11:0] ttc_bcnr,      // captured TTCrx BC number
  output logic        ttc_bcnr_vld,  // pulse: new BC number
  output logic [23:0] ttc_evnr,      // captured TTCrx event number
  output logic        ttc_evnr_vld   // pulse: new event number
);

  logic [7:0] dump [16];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bgo_strb     <= 1'b0;
      bgo_code     <= '0;
      msg_strb     <= 1'b0;
      msg_bits     <= '0;
      last_msg     <= '0;
      ttc_bcnr     <= '0;
      ttc_bcnr_vld <= 1'b0;
      ttc_evnr     <= '0;
      ttc_evnr_vld <= 1'b0;
      for (int i = 0; i < 16; i++) dump[i] <= '0;
    end else begin
      bgo_strb     <= brcst_str1;
      msg_strb     <= brcst_str2;
      ttc_bcnr_vld <= bcnt_str;
      ttc_evnr_vld <= evcnt_h_str;
      if (brcst_str1) begin
        bgo_code      <= brcst[5:2];
        last_msg[5:2] <= brcst[5:2];
      end
      if (brcst_str2) begin
        msg_bits      <= brcst[7:6];
        last_msg[7:6] <= brcst[7:6];
      end
      if (bcnt_str)    ttc_bcnr        <= bcnt;
      if (evcnt_l_str) ttc_evnr[11:0]  <= bcnt;
      if (evcnt_h_str) ttc_evnr[23:12] <= bcnt;
      if (dout_str) begin
        if (subaddr == subaddr_reg) dump[15] <= dout;
        else                        dump[subaddr[3:0]] <= dout;
      end
    end
  end

  always_ff @(posedge clk) dump_data <= dump[dump_addr];

endmodule
