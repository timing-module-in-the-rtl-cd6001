// tim_robuf: the derandomizing readout buffers (ROBUF).
// ROBUF_A holds the extracted trigger data words, ROBUF_BX the matching BC
// numbers; both are written together and read together by the readout
// processor (a common read strobe), so they must empty at the same time.
//  ROBUF_OVF         a write while ROBUF_A is full (the word is lost)
//  WARNING_ROBUF_OVF ROBUF_A holds 75 % of DEPTH or more
//  ROBUF_SYNCERR     the two empty flags disagree
// OVF and WARNING are produced only with EN_ROBUF_CHECK; all flags are
// sticky until clr (CLR_ALL), which also empties the buffers.
// Depth and flags follow the document; FIFO style and stickiness are this
// design's. Timing: a word written at clock n can be read from clock n+1.
module tim_robuf
  import tim_pkg::*;
#(
  parameter int unsigned DEPTH = 1024   // words per buffer
) (
  input  logic     clk,           // bunch-crossing clock
  input  logic     rst_n,         // active-low synchronous reset
  input  logic     clr,           // CLR_ALL
  input  logic     en_check,      // EN_ROBUF_CHECK
  input  logic     we,            // write both buffers
  input  ro_word_t wdata_a,       // data word
  input  ro_word_t wdata_bx,      // BC-number word
  input  logic     rd,            // read both buffers
  output ro_word_t rdata_a,       // head of ROBUF_A
  output ro_word_t rdata_bx,      // head of ROBUF_BX
  output logic     empty,         // ROBUF_A empty
  output logic [$clog2(DEPTH):0] level, // words in ROBUF_A
  output logic     ovf,           // sticky ROBUF_OVF
  output logic     warn,          // sticky WARNING_ROBUF_OVF
  output logic     syncerr        // sticky ROBUF_SYNCERR
);

  logic full_a, full_bx, empty_bx;
  logic [$clog2(DEPTH):0] level_bx;

  tim_fifo #(.WIDTH(18), .DEPTH(DEPTH)) u_a (
    .clk(clk), .rst_n(rst_n), .clr(clr), .wr(we), .wdata(wdata_a),
    .rd(rd), .rdata(rdata_a), .empty(empty), .full(full_a), .level(level));

  tim_fifo #(.WIDTH(18), .DEPTH(DEPTH)) u_bx (
    .clk(clk), .rst_n(rst_n), .clr(clr), .wr(we), .wdata(wdata_bx),
    .rd(rd), .rdata(rdata_bx), .empty(empty_bx), .full(full_bx), .level(level_bx));

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      ovf     <= 1'b0;
      warn    <= 1'b0;
      syncerr <= 1'b0;
    end else begin
      if (en_check && we && (full_a || full_bx)) ovf <= 1'b1;
      if (en_check && 32'(level) * 4 >= DEPTH * 3) warn <= 1'b1;
      if (empty != empty_bx) syncerr <= 1'b1;
    end
  end

endmodule
