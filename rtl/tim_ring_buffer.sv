// tim_ring_buffer: the 1k-word ring buffer (RIBUF) that records the TIM
// chip's own signals every bunch crossing.
// A write counter, cleared by the (latency-delayed) BCRES, counts bunch
// crossings; data of bunch crossing NN are written at address NN mod 1024,
// so each entry is overwritten after 1024 bx. Writing stops while freeze is
// high (VME FREEZE_RIBUF, or an error when FREEZE_RIBUF_IF_ERROR is set).
// The second port is a synchronous read port used by the extraction logic
// or, with the buffer frozen, by VME.
// Depth, addressing and freeze follow the document; the one-clock read
// latency is this design's (block-RAM) choice.
module tim_ring_buffer #(
  parameter int unsigned DEPTH = 1024,  // words
  parameter int unsigned WIDTH = 16     // bits per word
) (
  input  logic                     clk,     // bunch-crossing clock
  input  logic                     rst_n,   // active-low synchronous reset
  input  logic                     bcres,   // delayed BCRES: clears the write counter
  input  logic                     freeze,  // 1 = no writes
  input  logic [WIDTH-1:0]         wdata,   // monitored signals of this bx
  output logic [11:0]              wr_bc,   // BC number being written
  input  logic [$clog2(DEPTH)-1:0] rd_addr, // read address
  output logic [WIDTH-1:0]         rd_data  // read data (next clock)
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n || bcres) wr_bc <= '0;
    else                 wr_bc <= wr_bc + 12'd1;
  end

  always_ff @(posedge clk) begin
    if (!freeze) mem[wr_bc[AW-1:0]] <= wdata;
    rd_data <= mem[rd_addr];
  end

endmodule
