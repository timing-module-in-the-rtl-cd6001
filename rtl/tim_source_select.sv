// tim_source_select: the source multiplexers set by the COMMAND register.
//  SEL_L1A   (bits 2..0): 000 VME, 001 TTCrx, 010 front-panel L1A_X,
//                         011 periodic (BC-Table), 100 TCS; others none.
//  SEL_BCRES (bits 5..3): 000 VME, 001 TTCrx BCNTRES, 010 ORBIT_X,
//                         011 periodic (BC counter), 100 BGO decoder (BC0);
//                         others none. With 011 a TTCrx or VME BCRES still
//                         passes, because it starts the periodic generator.
//  SEL_BGO   (bits 7..6): 00 VME, 01 TTCrx, 10 periodic, 11 TCS. The user
//                         messages follow the same choice (TTCrx or periodic).
//  SEL_EVRES (bits 9..8): 00 VME, 01 TTCrx EvCntRes, 10 selected BGO
//                         source, 11 none.
// The codes are those of the register description, as is starting the
// periodic BCRES by an infrequent TTCrx BCNTRES or a VME BCRES; that VME and
// TCS carry no user messages is this design's choice. Purely combinational.
module tim_source_select
  import tim_pkg::*;
(
  input  logic [9:0] sel,          // COMMAND register bits 9..0
  // L1A sources
  input  logic       l1a_vme,      // L1A_VME command pulse
  input  logic       l1a_ttc,      // L1Accept from TTCrx
  input  logic       l1a_lemo,     // L1A_X from front panel
  input  logic       l1a_per,      // periodic L1A from BC-Table
  input  logic       l1a_tcs,      // L1A from TCS via backplane
  // BCRES sources
  input  logic       bcres_vme,    // BCRES_VME command pulse
  input  logic       bcres_ttc,    // BCNTRES from TTCrx (after crate delay)
  input  logic       bcres_orbit,  // ORBIT_X (after crate delay)
  input  logic       bcres_per,    // periodic BCRES from BC counter
  // BGO sources
  input  bgo_cmd_t   bgo_vme,      // commands from VME pulses
  input  bgo_cmd_t   bgo_ttc,      // decoded TTCrx BGO
  input  bgo_cmd_t   bgo_per,      // decoded BC-Table BGO
  input  bgo_cmd_t   bgo_tcs,      // decoded TCS BGO
  input  usr_msg_t   msg_ttc,      // user message from TTCrx
  input  usr_msg_t   msg_per,      // user message from BC-Table
  // Event-counter reset sources
  input  logic       evres_vme,    // EVCNT_RES_VME command pulse
  input  logic       evres_ttc,    // EvCntRes from TTCrx
  // Selected signals
  output logic       l1a,          // selected L1A
  output logic       bcres,        // selected BCRES
  output bgo_cmd_t   bgo,          // selected BGO commands
  output usr_msg_t   msg,          // selected user message
  output logic       evcnt_res     // selected event-counter reset
);

  sel_l1a_e   sel_l1a;
  sel_bcres_e sel_bcres;
  sel_bgo_e   sel_bgo;
  sel_evres_e sel_evres;

  assign sel_l1a   = sel_l1a_e'(sel[2:0]);
  assign sel_bcres = sel_bcres_e'(sel[5:3]);
  assign sel_bgo   = sel_bgo_e'(sel[7:6]);
  assign sel_evres = sel_evres_e'(sel[9:8]);

  always_comb begin
    unique case (sel_bgo)
      SEL_BGO_VME: begin bgo = bgo_vme; msg = '0;      end
      SEL_BGO_TTC: begin bgo = bgo_ttc; msg = msg_ttc; end
      SEL_BGO_PER: begin bgo = bgo_per; msg = msg_per; end
      default:     begin bgo = bgo_tcs; msg = '0;      end
    endcase
  end

  always_comb begin
    case (sel_l1a)
      SEL_L1A_VME:  l1a = l1a_vme;
      SEL_L1A_TTC:  l1a = l1a_ttc;
      SEL_L1A_LEMO: l1a = l1a_lemo;
      SEL_L1A_PER:  l1a = l1a_per;
      SEL_L1A_TCS:  l1a = l1a_tcs;
      default:      l1a = 1'b0;
    endcase
  end

  always_comb begin
    case (sel_bcres)
      SEL_BCRES_VME:   bcres = bcres_vme;
      SEL_BCRES_TTC:   bcres = bcres_ttc;
      SEL_BCRES_ORBIT: bcres = bcres_orbit;
      SEL_BCRES_PER:   bcres = bcres_per | bcres_ttc | bcres_vme;
      SEL_BCRES_BGO:   bcres = bgo.bc0;
      default:         bcres = 1'b0;
    endcase
  end

  always_comb begin
    unique case (sel_evres)
      SEL_EVRES_VME: evcnt_res = evres_vme;
      SEL_EVRES_TTC: evcnt_res = evres_ttc;
      SEL_EVRES_BGO: evcnt_res = bgo.evcnt_res;
      default:       evcnt_res = 1'b0;
    endcase
  end

endmodule
