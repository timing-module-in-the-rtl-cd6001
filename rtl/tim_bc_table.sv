// tim_bc_table: BC-Table signal generator for stand-alone operation.
// A 4k x 12 memory is addressed by the BC number; a 1 in a bit at address a
// produces a pulse at bunch crossing a of an active orbit. Bits: 9 PER_MONRQST,
// 8 PER_L1A, 7..6 simulated user-message bits, 5 user-message strobe,
// 4 BGO strobe, 3..0 BGO code; 11..10 are stored but unused.
// Trigger bits (9,8) are active every TRIG_PERIOD+1 orbits and BGO/message
// bits (7..0) every BGO_PERIOD+1 orbits (PERIOD = 0: every orbit). Orbits
// are counted with bcres; the first orbit after enabling is active.
// Generation is enabled (EN_BCTABLE) by the first bcres and stopped by
// HARD_RES_VME. The VME port reads and writes the table. The table starts
// cleared (the block-RAM power-up value), so unwritten entries stay silent.
// Layout, periods and HARD_RES_VME follow the document; the enable rule and
// the p+1 period reading are this design's.
// Timing: outputs for BC number a appear in the clock after bc = a (one
// synchronous read); VME read data are valid the clock after vme_addr.
module tim_bc_table #(
  parameter int unsigned DEPTH = 4096,   // table entries (one per BC number)
  parameter int unsigned WIDTH = 12      // implemented bits per entry
) (
  input  logic                     clk,          // bunch-crossing clock
  input  logic                     rst_n,        // active-low synchronous reset
  input  logic [$clog2(DEPTH)-1:0] bc,           // local BC number
  input  logic                     bcres,        // orbit start
  input  logic                     hard_res_vme, // stops generation
  input  logic [15:0]              trig_period,  // TRIG_PERIOD register
  input  logic [15:0]              bgo_period,   // BGO_PERIOD register
  input  logic                     vme_we,       // VME write strobe
  input  logic [$clog2(DEPTH)-1:0] vme_addr,     // VME word address
  input  logic [WIDTH-1:0]         vme_wdata,    // VME write data
  output logic [WIDTH-1:0]         vme_rdata,    // VME read data
  output logic                     enabled,      // EN_BCTABLE
  output logic                     per_monrqst,  // periodic monitoring request
  output logic                     per_l1a,      // periodic L1A
  output logic [1:0]               msg_bits,     // simulated user-message bits 7..6
  output logic                     msg_strb,     // simulated user-message strobe
  output logic                     bgo_strb,     // simulated BGO strobe
  output logic [3:0]               bgo_code      // simulated BGO code
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] rd;

  initial for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  logic [15:0]      trig_orbit, bgo_orbit;
  logic             trig_act, bgo_act;
  logic             trig_act_q, bgo_act_q, en_q;

  always_ff @(posedge clk) begin
    if (vme_we) mem[vme_addr] <= vme_wdata;
    vme_rdata <= mem[vme_addr];
    rd        <= mem[bc];
  end

  assign trig_act = (trig_orbit == '0);
  assign bgo_act  = (bgo_orbit  == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      enabled    <= 1'b0;
      trig_orbit <= '0;
      bgo_orbit  <= '0;
      trig_act_q <= 1'b0;
      bgo_act_q  <= 1'b0;
      en_q       <= 1'b0;
    end else begin
      if (hard_res_vme) enabled <= 1'b0;
      else if (bcres)   enabled <= 1'b1;
      if (bcres) begin
        if (!enabled || trig_orbit >= trig_period) trig_orbit <= '0; else trig_orbit <= trig_orbit + 16'd1;
        if (!enabled || bgo_orbit >= bgo_period)  bgo_orbit  <= '0; else bgo_orbit  <= bgo_orbit  + 16'd1;
      end
      trig_act_q <= trig_act;
      bgo_act_q  <= bgo_act;
      en_q       <= enabled && !hard_res_vme;
    end
  end

  assign per_monrqst = en_q & trig_act_q & rd[9];
  assign per_l1a     = en_q & trig_act_q & rd[8];
  assign msg_bits    = (en_q & bgo_act_q) ? rd[7:6] : 2'b00;
  assign msg_strb    = en_q & bgo_act_q & rd[5];
  assign bgo_strb    = en_q & bgo_act_q & rd[4];
  assign bgo_code    = (en_q & bgo_act_q) ? rd[3:0] : 4'h0;

endmodule
