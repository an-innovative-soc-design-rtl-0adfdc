// port_fifo: the FIFO between a network interface and the DMA.
//
// Every interface of the chip has a receive and a transmit FIFO, and the
// DMA watches a threshold on each. This FIFO raises 'hi_thresh' when it
// holds at least cfg_hi words (a receive FIFO about to overflow) and
// 'lo_thresh' when it holds at most cfg_lo words (a transmit FIFO about to
// run dry); the DMA then serves the port ahead of its normal turn.
// Push and pop may happen in the same cycle (a push into a full FIFO is
// dropped even when a pop frees a slot); dout shows the oldest word
// (first-word fall-through). Writes to a full FIFO and reads from an empty
// one are ignored and counted in 'overflow' / 'underflow' pulses.
// The thresholds follow the document; the depth (64 words of 32 bits) and
// the fall-through read are this design's choices.
module port_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [W-1:0]             din,
  input  logic                     pop,
  output logic [W-1:0]             dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count,
  input  logic [$clog2(DEPTH):0]   cfg_hi,
  input  logic [$clog2(DEPTH):0]   cfg_lo,
  output logic                     hi_thresh,
  output logic                     lo_thresh,
  output logic                     overflow,
  output logic                     underflow
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_push, do_pop;

  assign empty     = count == '0;
  assign full      = count == (AW+1)'(DEPTH);
  assign do_push   = push && !full;
  assign do_pop    = pop && !empty;
  assign dout      = mem[rptr];
  assign hi_thresh = count >= cfg_hi;
  assign lo_thresh = count <= cfg_lo;

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      count     <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
      count     <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
      overflow  <= push && full;
      underflow <= pop && empty;
    end
  end

endmodule
