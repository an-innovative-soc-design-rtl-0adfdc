// tb_dma_scheduler: the three-level traffic descriptor and the threshold
// override of the DMA scheduler.
//
// Descriptor: frames of 20 DMA cycles and 10 off cycles; the first 12 DMA
// cycles receive, the other 8 transmit. Receive channels 0 and 1 have
// weights 3 and 1, transmit channels 2 and 3 weights 2 and 4. Over three
// frames with every channel requesting, the words per channel must follow
// the weights exactly (36 receive cycles: 27 and 9; 24 transmit cycles: 8
// and 16), no word may move in the off interval or in the wrong segment,
// and a channel's turn must be contiguous. Then: an idle channel is skipped,
// a raised threshold wins at once (urgent), no grant means no transfer, no
// request means no bus request, and Flow_ID 0 / non-zero reject / accept.
module tb_dma_scheduler;
  localparam int NCH = 32;
  logic clk = 0, rst_n = 0;
  logic [15:0] cfg_dma_cycles, cfg_off_cycles, cfg_rx_cycles;
  logic [NCH-1:0] cfg_ch_en, cfg_ch_tx, ch_req, ch_thresh;
  logic [7:0] cfg_ch_weight [NCH];
  logic bus_req, bus_gnt, xfer_valid, xfer_tx, xfer_urgent, dma_window;
  logic [4:0] xfer_ch;
  logic flow_valid = 0;
  logic [7:0] flow_id;
  logic pkt_accept, pkt_reject;
  int checks = 0, failures = 0;

  dma_scheduler dut (.*);

  always #5 clk = ~clk;

  int served [NCH];
  int bad_window = 0, bad_dir = 0, urgent_seen = 0, win_cycles = 0, total = 0;
  int run_ch = -1, run_len = 0, max_run0 = 0;
  always @(posedge clk) if (rst_n) begin
    total++;
    if (dma_window) win_cycles++;
    if (xfer_valid) begin
      served[xfer_ch]++;
      if (!dma_window) bad_window++;
      if (xfer_urgent) urgent_seen++;
      else if (xfer_tx != (int'(dut.cnt) >= int'(cfg_rx_cycles))) bad_dir++;
      if (int'(xfer_ch) == run_ch) run_len++;
      else begin run_ch = int'(xfer_ch); run_len = 1; end
      if (run_ch == 0 && run_len > max_run0) max_run0 = run_len;
    end
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic restart();
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    foreach (served[c]) served[c] = 0;
    bad_window = 0; bad_dir = 0; urgent_seen = 0; win_cycles = 0; total = 0; max_run0 = 0;
    run_ch = -1;
  endtask

  initial begin
    cfg_dma_cycles = 20; cfg_off_cycles = 10; cfg_rx_cycles = 12;
    cfg_ch_en = '0; cfg_ch_tx = '0; ch_req = '0; ch_thresh = '0; bus_gnt = 1;
    foreach (cfg_ch_weight[c]) cfg_ch_weight[c] = 8'd1;
    cfg_ch_en[3:0] = 4'hF;
    cfg_ch_tx[3:0] = 4'b1100;
    cfg_ch_weight[0] = 3; cfg_ch_weight[1] = 1; cfg_ch_weight[2] = 2; cfg_ch_weight[3] = 4;
    ch_req[3:0] = 4'hF;
    restart();
    repeat (90) @(negedge clk);
    chk("rx ch0 words", served[0], 27);
    chk("rx ch1 words", served[1], 9);
    chk("tx ch2 words", served[2], 8);
    chk("tx ch3 words", served[3], 16);
    chk("DMA window cycles", win_cycles, 60);
    chk("words outside DMA window", bad_window, 0);
    chk("words in wrong segment", bad_dir, 0);
    chk("ch0 interface timeslot", max_run0, 3);
    // idle channel 1 is skipped: ch0 takes the whole receive segment
    ch_req[1] = 0;
    restart();
    repeat (30) @(negedge clk);
    chk("ch0 alone", served[0], 12);
    chk("ch1 idle", served[1], 0);
    // threshold on transmit channel 5 during the receive segment
    ch_req[1] = 1;
    cfg_ch_en[5] = 1; cfg_ch_tx[5] = 1; ch_req[5] = 1;
    restart();
    @(negedge clk); ch_thresh[5] = 1;
    @(negedge clk); ch_thresh[5] = 0;
    repeat (5) @(negedge clk);
    chk("urgent served", served[5], 1);
    chk("urgent flagged", urgent_seen, 1);
    // no grant, no transfer
    restart();
    bus_gnt = 0;
    repeat (10) @(negedge clk);
    chk("bus requested", int'(bus_req), 1);
    chk("no grant no words", served[0] + served[1], 0);
    bus_gnt = 1;
    ch_req = '0;
    @(negedge clk);
    chk("no request", int'(bus_req), 0);
    // Flow_ID decision
    flow_valid = 1; flow_id = 0;
    @(negedge clk); flow_valid = 0;
    chk("reject", int'(pkt_reject), 1);
    chk("no accept", int'(pkt_accept), 0);
    flow_valid = 1; flow_id = 8'h21;
    @(negedge clk); flow_valid = 0;
    chk("accept", int'(pkt_accept), 1);
    chk("no reject", int'(pkt_reject), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
