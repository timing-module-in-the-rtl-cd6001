// tim_rop_mux: formats the two readout streams for the Channel Link to the
// GTFE board. Each bunch crossing the link carries two 28-bit words, phase A
// and phase B of the 80 MHz link: by default event-record words in phase A
// and monitoring words in phase B; INVERT_ROPMUX swaps the phases.
// Word format:
//   27..26 type: 00 IDLE, 01 event, 10 monitoring
//   25..20 incrementing number (one 6-bit counter per stream, +1 per word)
//   19..18 00
//   17..16 data identifier, 15..0 data
// When a stream has nothing to send its word is IDLE with the IDLE_VALUE
// register as data. RO_LINK_ON enables the transmitter (link_en).
// The word format follows the revised data-format description; the
// per-stream numbering is this design's reading.
// Timing: outputs are registered, one clock after the input words.
module tim_rop_mux
  import tim_pkg::*;
(
  input  logic        clk,         // bunch-crossing clock
  input  logic        rst_n,       // active-low synchronous reset
  input  logic        link_on,     // RO_LINK_ON
  input  logic        invert,      // INVERT_ROPMUX
  input  logic [15:0] idle_value,  // IDLE_VALUE register
  input  ro_word_t    ev_word,     // event-record word
  input  logic        ev_vld,      // event word valid
  input  ro_word_t    mon_word,    // monitoring word
  input  logic        mon_vld,     // monitoring word valid
  output logic [27:0] phase_a,     // first word of the bx
  output logic [27:0] phase_b,     // second word of the bx
  output logic        link_en      // Channel Link transmitter enable
);

  logic [5:0]  ev_num, mon_num;
  logic [27:0] ev_fmt, mon_fmt;

  function automatic logic [27:0] fmt(input link_type_e t, input logic [5:0] n,
                                      input ro_word_t w);
    return {t, n, 2'b00, w};
  endfunction

  assign ev_fmt  = ev_vld  ? fmt(LINK_EVENT, ev_num, ev_word)
                           : fmt(LINK_IDLE,  ev_num, '{id: ID_HEADER, data: idle_value});
  assign mon_fmt = mon_vld ? fmt(LINK_MON,   mon_num, mon_word)
                           : fmt(LINK_IDLE,  mon_num, '{id: ID_HEADER, data: idle_value});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ev_num  <= '0;
      mon_num <= '0;
      phase_a <= '0;
      phase_b <= '0;
      link_en <= 1'b0;
    end else begin
      ev_num  <= ev_num + 6'd1;
      mon_num <= mon_num + 6'd1;
      phase_a <= invert ? mon_fmt : ev_fmt;
      phase_b <= invert ? ev_fmt  : mon_fmt;
      link_en <= link_on;
    end
  end

endmodule
