// tim_fifo: synchronous first-word-fall-through FIFO used by the L1A queue
// and the readout buffers. The head word is visible on rdata whenever empty
// is low; rd removes it. A write when full is ignored and a read when empty
// is ignored; simultaneous read and write are allowed. level is the number
// of stored words. clr empties the FIFO.
module tim_fifo #(
  parameter int unsigned WIDTH = 18,    // word width
  parameter int unsigned DEPTH = 1024   // words, a power of two
) (
  input  logic                   clk,    // clock
  input  logic                   rst_n,  // active-low synchronous reset
  input  logic                   clr,    // synchronous clear
  input  logic                   wr,     // write strobe
  input  logic [WIDTH-1:0]       wdata,  // write data
  input  logic                   rd,     // read (pop) strobe
  output logic [WIDTH-1:0]       rdata,  // head word
  output logic                   empty,  // no word stored
  output logic                   full,   // DEPTH words stored
  output logic [$clog2(DEPTH):0] level   // words stored
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty = (level == '0);
  assign full  = (level == (AW+1)'(DEPTH));
  assign do_wr = wr & ~full;
  assign do_rd = rd & ~empty;
  assign rdata = mem[rptr];

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
    end else begin
      if (do_wr) wptr <= wptr + AW'(1);
      if (do_rd) rptr <= rptr + AW'(1);
      level <= level + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
  end

endmodule
