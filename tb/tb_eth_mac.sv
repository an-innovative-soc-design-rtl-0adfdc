// tb_eth_mac: 802.3 MAC framing, padding, FCS, gap, underrun and errors.
//
// The MII transmit side is looped back to the receive side, at 4 clock
// cycles per nibble (100 Mbit/s at 100 MHz). The testbench has its own
// bitwise CRC-32, checked first against the published check value of
// "123456789" (CBF43926). Then:
//   * a 64-byte frame: the line must carry 15 preamble nibbles 5, the
//     delimiter nibble D, the bytes low nibble first and the FCS worked out
//     here, for exactly (16 + 128 + 8) x 4 cycles; it must be received whole
//     with a good FCS;
//   * "123456789", sent back to back: the gap before it must be at least 96
//     bit times, and it must arrive padded with zeros to 60 bytes, good;
//   * a frame whose second byte comes too late: tx_er, tx_abort and a
//     receive error; its remaining bytes are dropped and the next frame is
//     good again;
//   * a frame with one line nibble inverted must end without out_good.
module tb_eth_mac;
  logic clk = 0, rst_n = 0;
  logic [7:0] cfg_div = 4;
  logic tx_valid = 0, tx_sop = 0, tx_eop = 0, tx_ready, tx_abort;
  logic [7:0] tx_data, rx_data;
  logic rx_valid, rx_sop, rx_eop, rx_good, rx_err;
  logic mii_tx_en, mii_tx_er, mii_rx_dv, mii_rx_er;
  logic [3:0] mii_txd, mii_rxd;
  logic flip = 0;
  int checks = 0, failures = 0;

  assign mii_rx_dv = mii_tx_en;
  assign mii_rxd   = mii_txd ^ {4{flip}};
  assign mii_rx_er = mii_tx_er;

  eth_mac dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  function automatic logic [31:0] ref_crc(logic [7:0] d [$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (d[k])
      for (int i = 0; i < 8; i++)
        c = (c[0] ^ d[k][i]) ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    return ~c;
  endfunction

  // receive side
  logic [7:0] got [$];
  int n_eop = 0, n_good = 0, n_err = 0, n_sop = 0, n_abort = 0, n_txer = 0;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid) begin
      got.push_back(rx_data);
      if (rx_sop) n_sop++;
      if (rx_eop) begin n_eop++; if (rx_good) n_good++; end
    end
    if (rx_err) n_err++;
    if (tx_abort) n_abort++;
    if (mii_tx_er) n_txer++;
  end

  // line capture: nibbles on each nib_en while tx_en, length of each burst
  logic [3:0] line [$];
  int en_cycles = 0, gap_cycles = 0, last_gap = 0;
  always @(posedge clk) if (rst_n) begin
    if (mii_tx_en && dut.nib_en) line.push_back(mii_txd);
    if (mii_tx_en) begin
      en_cycles++;
      if (gap_cycles != 0) last_gap = gap_cycles;
      gap_cycles = 0;
    end else if (en_cycles != 0) gap_cycles++;
  end

  task automatic send(logic [7:0] d [$], int stall_after = -1);
    foreach (d[k]) begin
      @(negedge clk);
      tx_valid = 1; tx_data = d[k]; tx_sop = k == 0; tx_eop = k == d.size() - 1;
      @(posedge clk); while (!tx_ready) @(posedge clk);
      if (k == stall_after) begin
        @(negedge clk); tx_valid = 0;
        repeat (200) @(negedge clk);
      end
    end
    @(negedge clk); tx_valid = 0; tx_sop = 0; tx_eop = 0;
  endtask

  task automatic wait_eop(int n);
    int guard = 0;
    while ((n_eop + n_err) < n && guard < 20000) begin @(negedge clk); guard++; end
  endtask

  initial begin
    logic [7:0] a [$], b [$], pb [$], c [$], e [$];
    for (int k = 0; k < 9; k++) b.push_back(8'h31 + 8'(k));
    chk("reference CRC of 123456789", ref_crc(b), 32'hCBF4_3926);
    for (int k = 0; k < 64; k++) a.push_back(8'(k * 7 + 3));
    pb = b;
    while (pb.size() < 60) pb.push_back(8'h00);
    for (int k = 0; k < 20; k++) c.push_back(8'hC0 + 8'(k));
    for (int k = 0; k < 70; k++) e.push_back(8'(k ^ 8'h5A));
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // ---- 64-byte frame, then the short one back to back
    fork
      begin send(a); send(b); end
    join_none
    wait_eop(1);
    begin
      logic [31:0] fcs;
      int n;
      fcs = ref_crc(a);
      n = 16 + 128 + 8;
      chk("line nibbles of frame 1", line.size(), n);
      chk("frame 1 tx_en cycles", en_cycles, n * 4);
      if (line.size() == n) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < 15; i++) if (line[i] != 4'h5) ok = 0;
        if (line[15] != 4'hD) ok = 0;
        for (int k = 0; k < 64; k++)
          if (line[16 + 2*k] != a[k][3:0] || line[17 + 2*k] != a[k][7:4]) ok = 0;
        for (int i = 0; i < 8; i++) if (line[144 + i] != fcs[4*i +: 4]) ok = 0;
        chk("line content of frame 1", int'(ok), 1);
      end
    end
    chk("frame 1 bytes", got.size(), 64);
    for (int k = 0; k < 64 && k < got.size(); k++) chk($sformatf("frame 1 byte %0d", k), got[k], a[k]);
    chk("frame 1 good", n_good, 1);
    line.delete(); got.delete();
    wait_eop(2);
    chk("gap before frame 2 >= 96 bit times", int'(last_gap >= 24 * 4), 1);
    chk("frame 2 line nibbles (padded)", line.size(), 16 + 120 + 8);
    if (line.size() == 144) begin
      logic [31:0] fcs;
      bit ok;
      fcs = ref_crc(pb);
      ok = 1;
      for (int i = 0; i < 8; i++) if (line[136 + i] != fcs[4*i +: 4]) ok = 0;
      chk("frame 2 FCS over padding", int'(ok), 1);
    end
    chk("frame 2 bytes", got.size(), 60);
    for (int k = 0; k < 60 && k < got.size(); k++) chk($sformatf("frame 2 byte %0d", k), got[k], pb[k]);
    chk("frame 2 good", n_good, 2);
    repeat (200) @(negedge clk);

    // ---- underrun after the first byte, then a good frame
    got.delete();
    send(c, 0);
    send(e);
    wait_eop(4);
    repeat (100) @(negedge clk);
    chk("underrun tx_er", int'(n_txer > 0), 1);
    chk("underrun tx_abort", n_abort, 1);
    chk("underrun receive error", n_err, 1);
    chk("frame after underrun bytes", got.size(), 70);
    chk("frame after underrun good", n_good, 3);
    chk("sops", n_sop, 3);

    // ---- corrupted nibble
    fork send(a); join_none
    repeat (60 * 4) @(negedge clk);
    flip = 1; repeat (4) @(negedge clk); flip = 0;
    wait_eop(5);
    chk("corrupted frame ends", n_eop, 4);
    chk("corrupted frame not good", n_good, 3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
