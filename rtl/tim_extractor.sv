// tim_extractor: extraction logic between the L1A queue, the ring buffer and
// the readout buffers.
// When the queue holds an L1A, its start BC number is taken (queue popped),
// loaded into the ring-buffer read-address counter, and the readout-length
// counter is loaded from RO_LENGTH. Then one address per clock is applied to
// the ring buffer until the length counter reaches zero; each word read is
// written into ROBUF_A tagged as event (01) or calibration (10) data, and
// its BC number, tagged 11, into ROBUF_BX. Then the next pending L1A is
// taken. RO_LENGTH = 0 extracts nothing.
// The procedure follows the document; the pipelining is this design's.
// Timing: the first word is written two clocks after the queue shows a
// pending L1A; one word per clock after that.
module tim_extractor
  import tim_pkg::*;
(
  input  logic        clk,         // bunch-crossing clock
  input  logic        rst_n,       // active-low synchronous reset
  input  logic        clr,         // CLR_ALL
  input  logic [7:0]  ro_length,   // RO_LENGTH: bx per L1A
  input  logic        q_empty,     // L1A queue empty
  input  logic [11:0] q_bc,        // start BC number of the head L1A
  input  logic        q_calib,     // head L1A is calibration
  output logic        q_pop,       // take the head L1A
  output logic [9:0]  rb_addr,     // ring-buffer read address
  input  logic [15:0] rb_data,     // ring-buffer data (one clock later)
  output logic        robuf_we,    // write both readout buffers
  output ro_word_t    robuf_a,     // data word for ROBUF_A
  output ro_word_t    robuf_bx,    // BC-number word for ROBUF_BX
  output logic        busy         // extraction running
);

  logic [11:0] bc_cnt;
  logic [7:0]  len_cnt;
  logic        calib;
  logic        rd_pend;
  logic [11:0] rd_bc;

  assign rb_addr = bc_cnt[9:0];
  assign q_pop   = !busy && !q_empty;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      busy    <= 1'b0;
      bc_cnt  <= '0;
      len_cnt <= '0;
      calib   <= 1'b0;
      rd_pend <= 1'b0;
      rd_bc   <= '0;
    end else begin
      rd_pend <= 1'b0;
      if (!busy) begin
        if (!q_empty) begin
          bc_cnt  <= q_bc;
          len_cnt <= ro_length;
          calib   <= q_calib;
          busy    <= (ro_length != 8'd0);
        end
      end else begin
        rd_pend <= 1'b1;
        rd_bc   <= bc_cnt;
        bc_cnt  <= bc_cnt + 12'd1;
        len_cnt <= len_cnt - 8'd1;
        if (len_cnt == 8'd1) busy <= 1'b0;
      end
    end
  end

  assign robuf_we      = rd_pend;
  assign robuf_a.id    = calib ? ID_CALIB : ID_EVENT;
  assign robuf_a.data  = rb_data;
  assign robuf_bx.id   = ID_BCNR;
  assign robuf_bx.data = {4'd0, rd_bc};

endmodule
