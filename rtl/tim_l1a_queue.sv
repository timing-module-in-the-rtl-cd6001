// tim_l1a_queue: the L1A queue of the TIM readout logic.
// Every L1A writes the BC number of its data (the start address in the ring
// buffer) into a FIFO. The BC number comes from a counter of its own that is
// cleared by a BCRES delayed for the L1A latency. A calibration L1A also
// writes a calibration bit. The extraction logic pops the entries in order.
// Age monitor: if no check is running, an L1A also writes a check bit and
// starts a waiting-time counter, which stops when that entry leaves the
// FIFO. A wait of more than WARN_AGE bx (3/4 of the ring buffer) sets
// L1A_OLD_WARN, more than OLD_AGE bx (15/16) sets L1A_TOO_OLD: the ring
// buffer may have been overwritten. More than MAX_PENDING waiting entries
// set TOO_MANY_L1A. Flags are sticky until clr (CLR_ALL), which also
// empties the queue.
// Thresholds and the check-bit method follow the document; the FIFO depth
// is this design's. Timing: an L1A at clock n is visible at the head from
// clock n+1.
module tim_l1a_queue #(
  parameter int unsigned DEPTH       = 128,  // FIFO entries
  parameter int unsigned WARN_AGE    = 768,  // 75 % of 1024 bx
  parameter int unsigned OLD_AGE     = 960,  // 15/16 of 1024 bx
  parameter int unsigned MAX_PENDING = 63    // TOO_MANY_L1A above this
) (
  input  logic        clk,           // bunch-crossing clock
  input  logic        rst_n,         // active-low synchronous reset
  input  logic        clr,           // CLR_ALL
  input  logic        bcres,         // latency-delayed BCRES
  input  logic        l1a,           // L1A for the TIM readout
  input  logic        calib,         // the L1A is a calibration event
  input  logic        pop,           // extraction logic takes the head
  output logic        empty,         // no L1A pending
  output logic [11:0] head_bc,       // start BC number of the head L1A
  output logic        head_calib,    // head L1A is a calibration event
  output logic [$clog2(DEPTH):0] pending, // L1As waiting
  output logic        too_many_l1a,  // sticky TOO_MANY_L1A
  output logic        l1a_old_warn,  // sticky L1A_OLD_WARN
  output logic        l1a_too_old    // sticky L1A_TOO_OLD
);

  logic [11:0] bc;
  logic        checking;
  logic [15:0] age;
  logic        head_check;
  logic        full;

  always_ff @(posedge clk) begin
    if (!rst_n || bcres) bc <= '0;
    else                 bc <= bc + 12'd1;
  end

  tim_fifo #(.WIDTH(14), .DEPTH(DEPTH)) u_fifo (
    .clk(clk), .rst_n(rst_n), .clr(clr),
    .wr(l1a), .wdata({~checking, calib, bc}),
    .rd(pop), .rdata({head_check, head_calib, head_bc}),
    .empty(empty), .full(full), .level(pending));

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      checking     <= 1'b0;
      age          <= '0;
      too_many_l1a <= 1'b0;
      l1a_old_warn <= 1'b0;
      l1a_too_old  <= 1'b0;
    end else begin
      if (checking) begin
        age <= age + 16'd1;
        if (32'(age) > WARN_AGE) l1a_old_warn <= 1'b1;
        if (32'(age) > OLD_AGE)  l1a_too_old  <= 1'b1;
        if (pop && !empty && head_check) checking <= 1'b0;
      end else if (l1a && !full) begin
        checking <= 1'b1;
        age      <= '0;
      end
      if (32'(pending) > MAX_PENDING) too_many_l1a <= 1'b1;
    end
  end

endmodule
