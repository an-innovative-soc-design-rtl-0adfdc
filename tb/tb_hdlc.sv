// tb_hdlc: HDLC port framing, stuffing, FCS and abort.
//
// First the receiver is fed a line signal built here from a known frame:
// "123456789" with the FCS 0x906E published for this 16-bit CRC (sent as
// 6E 90), zero-stuffed by this testbench; the bytes and a good FCS must
// come out. Then the transmitter is looped back to the receiver and
// frames are sent: the same string, a stuffing-heavy frame of FF and 7E
// bytes, and a one-byte frame; each must arrive intact with a good FCS, and
// the line bits of the first (stuffed data and FCS) must match the
// hand-built stream. Then one line
// bit is inverted inside a frame (bad FCS or error expected), and a frame
// whose source stops after its first byte must be aborted (tx_abort, rx_err).
module tb_hdlc;
  logic clk = 0, rst_n = 0;
  logic [7:0] cfg_div = 4;
  logic tx_valid = 0, tx_sop = 0, tx_eop = 0;
  logic [7:0] tx_data;
  logic tx_ready, tx_abort, rx_valid, rx_sop, rx_eop, rx_fcs_ok, rx_err, ser_txd, ser_rxd;
  logic [7:0] rx_data;
  int checks = 0, failures = 0;

  // line source: 0 loopback, 1 generated stream, 2 loopback with one bit flipped
  int   line_mode = 1;
  logic gen_bit = 1, flip = 0;
  assign ser_rxd = (line_mode == 1) ? gen_bit : (ser_txd ^ flip);

  hdlc dut (.*);

  always #5 clk = ~clk;

  logic [7:0] got [$];
  int n_eop = 0, n_ok = 0, n_err = 0, n_abort = 0, n_sop = 0;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid) begin
      got.push_back(rx_data);
      if (rx_sop) n_sop++;
      if (rx_eop) begin n_eop++; if (rx_fcs_ok) n_ok++; end
    end
    if (rx_err) n_err++;
    if (tx_abort) n_abort++;
  end

  // hand-built line stream
  bit line [$];
  task automatic build(logic [7:0] bytes [$]);
    int ones = 0;
    line.delete();
    for (int i = 0; i < 8; i++) line.push_back(8'h7E >> i);
    foreach (bytes[k]) for (int i = 0; i < 8; i++) begin
      bit b;
      b = bytes[k][i];
      line.push_back(b);
      ones = b ? ones + 1 : 0;
      if (ones == 5) begin line.push_back(0); ones = 0; end
    end
    for (int i = 0; i < 8; i++) line.push_back(8'h7E >> i);
    for (int i = 0; i < 8; i++) line.push_back(8'h7E >> i);
  endtask

  // transmit-side capture of the line (bits on bit_en)
  bit txcap [$];
  bit cap_on = 0;
  always @(posedge clk) if (cap_on && dut.bit_en) txcap.push_back(ser_txd);

  task automatic send(logic [7:0] bytes [$], int stop_after = -1);
    foreach (bytes[k]) begin
      if (k == stop_after) break;
      @(negedge clk);
      tx_valid = 1; tx_data = bytes[k]; tx_sop = (k == 0); tx_eop = (k == bytes.size() - 1);
      @(posedge clk);
      while (!tx_ready) @(posedge clk);
      @(negedge clk); tx_valid = 0;
      while (!tx_ready) @(negedge clk);
    end
    @(negedge clk); tx_valid = 0;
  endtask

  task automatic expect_frame(string what, logic [7:0] bytes [$]);
    int guard = 0;
    while (n_eop == 0 && guard < 20000) begin @(negedge clk); guard++; end
    checks += 3;
    if (got.size() != bytes.size()) begin failures++; $display("FAIL %s: %0d bytes", what, got.size()); end
    else foreach (bytes[k]) if (got[k] != bytes[k]) begin failures++; $display("FAIL %s byte %0d %h", what, k, got[k]); break; end
    if (n_ok != 1) begin failures++; $display("FAIL %s: FCS not good", what); end
    if (n_sop != 1) begin failures++; $display("FAIL %s: sop count %0d", what, n_sop); end
    got.delete(); n_eop = 0; n_ok = 0; n_sop = 0;
  endtask

  logic [7:0] s123 [$] = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};

  initial begin
    logic [7:0] fr [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- receiver against a hand-built stream with the published FCS
    fr = s123; fr.push_back(8'h6E); fr.push_back(8'h90);
    build(fr);
    foreach (line[i]) begin
      @(negedge clk);
      while (!dut.bit_en) @(negedge clk);
      gen_bit = line[i];
    end
    repeat (20) @(negedge clk);
    expect_frame("generated 123456789", s123);
    // ---- loopback
    line_mode = 0;
    repeat (100) @(negedge clk);
    cap_on = 1;
    send(s123);
    expect_frame("loopback 123456789", s123);
    cap_on = 0;
    // the transmitted line must contain the hand-built frame (flag, data, FCS, flag)
    begin
      int pos;
      pos = -1;
      // data and FCS (the capture starts and stops inside flags)
      for (int s = 0; s + line.size() - 24 <= txcap.size(); s++) begin
        bit same;
        same = 1;
        for (int i = 8; i < line.size() - 16; i++) if (txcap[s + i - 8] != line[i]) begin same = 0; break; end
        if (same) begin pos = s; break; end
      end
      checks++;
      if (pos < 0) begin
        failures++; $display("FAIL transmitted bits differ from the reference frame");
        foreach (line[i]) $write("%0d", line[i]); $display("");
        foreach (txcap[i]) $write("%0d", txcap[i]); $display("");
      end
    end
    fr = '{8'hFF, 8'hFF, 8'h7E, 8'h7E, 8'h00, 8'hFF, 8'h3E, 8'h1F};
    send(fr);
    expect_frame("stuffing", fr);
    fr = '{8'h42};
    send(fr);
    expect_frame("one byte", fr);
    // ---- corrupted bit
    line_mode = 2;
    fork
      send('{8'h10, 8'h20, 8'h30, 8'h40, 8'h50, 8'h60});
      begin
        repeat (30) @(posedge dut.bit_en);
        @(negedge clk); flip = 1;
        @(posedge dut.bit_en); @(negedge clk); flip = 0;
      end
    join
    repeat (600) @(negedge clk);
    checks++;
    if (n_ok != 0 || (n_eop == 0 && n_err == 0)) begin
      failures++; $display("FAIL corrupted frame: ok=%0d eop=%0d err=%0d", n_ok, n_eop, n_err);
    end
    got.delete(); n_eop = 0; n_ok = 0; n_err = 0; n_sop = 0;
    // ---- source underrun: abort
    line_mode = 0;
    send('{8'h55, 8'h66, 8'h77, 8'h88, 8'h99}, 2);
    repeat (600) @(negedge clk);
    checks += 2;
    if (n_abort == 0) begin failures++; $display("FAIL no tx_abort"); end
    if (n_err == 0)   begin failures++; $display("FAIL no rx_err on abort"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
