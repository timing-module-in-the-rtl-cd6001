// tim_rop: readout processor (ROP) of the TIM chip.
// A state machine that turns the contents of the readout buffers into event
// records for the GTFE readout board. A record is
//   IDENTIFIER, event number bits 23..16, event number bits 15..0,
//   then per bunch crossing: its BC number word and its data word,
//   word count, EOR (the EOF_VALUE register).
// Before each bunch crossing the ROP reads both buffers at once into its
// registers. A record starts only when the buffers hold data and
// GTFE_READY is high; inside a record the ROP waits (sends nothing) while
// GTFE_READY is low or the next bunch crossing is not yet in the buffers.
// Between records nothing is sent and the link multiplexer inserts IDLE.
// The word count is the number of words before it (3 + 2*RO_LENGTH). The
// event number counts records from 1 (like the event counters, which count
// L1As) and is cleared by event-counter reset.
// Record layout and the read-then-send order follow the document; the word
// count definition and the event-number source are this design's.
// Timing: one word per clock while sending.
module tim_rop
  import tim_pkg::*;
(
  input  logic        clk,          // bunch-crossing clock
  input  logic        rst_n,        // active-low synchronous reset
  input  logic        clr,          // CLR_ALL: abort and clear
  input  logic        evcnt_res,    // event-counter reset
  input  logic        gtfe_ready,   // GTFE_READY
  input  logic [7:0]  ro_length,    // RO_LENGTH: bx per event
  input  logic [15:0] identifier,   // IDENTIFIER register
  input  logic [15:0] eof_value,    // EOF_VALUE register
  input  logic        robuf_empty,  // readout buffers empty
  input  ro_word_t    robuf_a,      // head of ROBUF_A
  input  ro_word_t    robuf_bx,     // head of ROBUF_BX
  output logic        robuf_rd,     // read both buffers
  output ro_word_t    word,         // record word
  output logic        word_vld,     // word is sent this clock
  output logic [23:0] evnr,         // number of the current record
  output logic        in_record     // a record is being sent
);

  typedef enum logic [3:0] {
    S_IDLE, S_ID, S_EVH, S_EVL, S_BX, S_DATA, S_FETCH, S_WC, S_EOR
  } state_e;

  state_e      state;
  ro_word_t    reg_a, reg_bx;
  logic [7:0]  bx_left;
  logic [15:0] wcount;

  assign in_record = (state != S_IDLE);
  assign robuf_rd  = gtfe_ready && !robuf_empty &&
                     ((state == S_IDLE && ro_length != 8'd0) || state == S_FETCH);

  always_comb begin
    word     = '{id: ID_HEADER, data: 16'h0000};
    word_vld = 1'b0;
    if (gtfe_ready) begin
      unique case (state)
        S_ID:   begin word.data = identifier;         word_vld = 1'b1; end
        S_EVH:  begin word.data = {8'h00, evnr[23:16]}; word_vld = 1'b1; end
        S_EVL:  begin word.data = evnr[15:0];         word_vld = 1'b1; end
        S_BX:   begin word = reg_bx;                  word_vld = 1'b1; end
        S_DATA: begin word = reg_a;                   word_vld = 1'b1; end
        S_WC:   begin word.data = wcount;             word_vld = 1'b1; end
        S_EOR:  begin word.data = eof_value;          word_vld = 1'b1; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      state   <= S_IDLE;
      reg_a   <= '0;
      reg_bx  <= '0;
      bx_left <= '0;
      wcount  <= '0;
      evnr    <= '0;
    end else begin
      if (evcnt_res) evnr <= '0;
      if (robuf_rd) begin
        reg_a  <= robuf_a;
        reg_bx <= robuf_bx;
      end
      if (word_vld) wcount <= wcount + 16'd1;
      if (gtfe_ready) begin
        unique case (state)
          S_IDLE:  if (robuf_rd) begin
                     state   <= S_ID;
                     bx_left <= ro_length - 8'd1;
                     wcount  <= '0;
                     if (!evcnt_res) evnr <= evnr + 24'd1;
                   end
          S_ID:    state <= S_EVH;
          S_EVH:   state <= S_EVL;
          S_EVL:   state <= S_BX;
          S_BX:    state <= S_DATA;
          S_DATA:  state <= (bx_left == 8'd0) ? S_WC : S_FETCH;
          S_FETCH: if (robuf_rd) begin
                     state   <= S_BX;
                     bx_left <= bx_left - 8'd1;
                   end
          S_WC:    state <= S_EOR;
          S_EOR:   state <= S_IDLE;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
