// dma_scheduler: traffic handling of the DMA controller.
//
// The DMA moves 32-bit words between system memory and up to 32 end points
// (channels), each receive (towards memory) or transmit (from memory). This
// block decides, cycle by cycle, whether the DMA asks for the on-chip bus
// and which channel it serves; each served cycle moves one word.
//
// A traffic descriptor in three levels sets the share of bus time:
//   1. bus time is cut into frames of cfg_dma_cycles, the DMA's cycle
//      budget (the DMA timeslot), followed by cfg_off_cycles during which
//      the DMA stays off the bus (guaranteed to the CPU);
//   2. the DMA timeslot is split into a receive segment (its first
//      cfg_rx_cycles cycles) and a transmit segment (the rest);
//   3. within a segment the channels of that direction are served in
//      weighted round robin: a channel keeps the bus for cfg_ch_weight words
//      (its interface timeslot), then the next channel with a request takes
//      over. The position and the unused credit carry over between frames,
//      so an interface timeslot may span several DMA timeslots.
// A channel whose FIFO threshold is raised (almost full on receive, almost
// empty on transmit) is served first, whatever the segment, lowest channel
// number first (the prioritised part of the round robin). Channels without
// a request are skipped, and the DMA does not request the bus when it has
// nothing to move.
//
// The classifier's Flow_ID of each received packet is also judged here:
// Flow_ID 0 rejects the packet (pkt_reject), any other value passes it on
// to the CPU (pkt_accept); both pulse one cycle after flow_valid.
//
// bus_gnt comes from the bus arbiter; xfer_* is combinational from the
// current state and inputs. The three-level descriptor, the threshold
// override, the 32 channels and the Flow_ID rule follow the document; the
// order of the segments, the word-per-cycle granularity and the lowest-
// number priority among raised thresholds are this design's choices.
module dma_scheduler #(
  parameter int NCH      = 32,
  parameter int WEIGHT_W = 8,
  parameter int CNT_W    = 16,
  parameter int FLOW_W   = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // traffic descriptor (CPU registers)
  input  logic [CNT_W-1:0]       cfg_dma_cycles,
  input  logic [CNT_W-1:0]       cfg_off_cycles,
  input  logic [CNT_W-1:0]       cfg_rx_cycles,
  input  logic [NCH-1:0]         cfg_ch_en,
  input  logic [NCH-1:0]         cfg_ch_tx,       // 1: transmit, 0: receive
  input  logic [WEIGHT_W-1:0]    cfg_ch_weight [NCH],
  // channel status
  input  logic [NCH-1:0]         ch_req,          // a word can be moved
  input  logic [NCH-1:0]         ch_thresh,       // FIFO threshold raised
  // bus
  output logic                   bus_req,
  input  logic                   bus_gnt,
  // transfer of this cycle
  output logic                   xfer_valid,
  output logic [$clog2(NCH)-1:0] xfer_ch,
  output logic                   xfer_tx,
  output logic                   xfer_urgent,
  output logic                   dma_window,
  // Flow_ID decision
  input  logic                   flow_valid,
  input  logic [FLOW_W-1:0]      flow_id,
  output logic                   pkt_accept,
  output logic                   pkt_reject
);
  localparam int CHW = $clog2(NCH);

  logic [CNT_W:0]    cnt;           // position in the frame
  logic              seg_tx;
  logic [CHW-1:0]    cur [2];       // round-robin position per direction
  logic [WEIGHT_W-1:0] rem [2];     // words left in the interface timeslot

  logic [NCH-1:0] elig, urgent;
  logic           frame_end;

  assign dma_window = cnt < {1'b0, cfg_dma_cycles};
  assign seg_tx     = cnt >= {1'b0, cfg_rx_cycles};
  assign frame_end  = cnt + 1'b1 >= {1'b0, cfg_dma_cycles} + {1'b0, cfg_off_cycles};

  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      elig[c]   = cfg_ch_en[c] && ch_req[c] && (cfg_ch_tx[c] == seg_tx) && cfg_ch_weight[c] != '0;
      urgent[c] = cfg_ch_en[c] && ch_req[c] && ch_thresh[c];
    end
  end

  // Choice of channel.
  logic           pick_cur;         // stay on the current channel
  logic [CHW-1:0] nxt;              // next eligible after the current one
  logic           nxt_found;
  logic [CHW-1:0] urg_ch;
  always_comb begin
    logic [CHW-1:0] idx;
    nxt       = '0;
    nxt_found = 1'b0;
    for (int i = 1; i <= NCH; i++) begin
      idx = CHW'((int'(cur[seg_tx]) + i) % NCH);
      if (!nxt_found && elig[idx]) begin
        nxt       = idx;
        nxt_found = 1'b1;
      end
    end
    urg_ch = '0;
    for (int c = NCH - 1; c >= 0; c--) if (urgent[c]) urg_ch = CHW'(c);
    pick_cur = elig[cur[seg_tx]] && rem[seg_tx] != '0;
  end

  assign bus_req     = dma_window && (|urgent || |elig);
  assign xfer_valid  = bus_req && bus_gnt;
  assign xfer_urgent = xfer_valid && |urgent;
  assign xfer_ch     = |urgent ? urg_ch : (pick_cur ? cur[seg_tx] : nxt);
  assign xfer_tx     = cfg_ch_tx[xfer_ch];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      cur        <= '{default: '0};
      rem        <= '{default: '0};
      pkt_accept <= 1'b0;
      pkt_reject <= 1'b0;
    end else begin
      cnt <= frame_end ? '0 : cnt + 1'b1;
      if (xfer_valid && !(|urgent)) begin
        if (pick_cur) begin
          rem[seg_tx] <= rem[seg_tx] - 1'b1;
        end else begin
          cur[seg_tx] <= nxt;
          rem[seg_tx] <= cfg_ch_weight[nxt] - 1'b1;
        end
      end
      pkt_accept <= flow_valid && flow_id != '0;
      pkt_reject <= flow_valid && flow_id == '0;
    end
  end

  a_xfer_needs_request: assert property (@(posedge clk) xfer_valid |-> ch_req[xfer_ch] && cfg_ch_en[xfer_ch]);
  a_xfer_in_window:     assert property (@(posedge clk) xfer_valid |-> dma_window && bus_gnt);

endmodule
