// tb_cp_top: end-to-end run of the Convergence Processor core at its
// default sizes (32 DMA channels, 256 rules, 2K-instruction FEX memory,
// 64-word FIFOs).
//
// Set-up over the CPU ports: the 5-tuple FEX firmware, three masks and
// three rules (one per-flow rule, one deny rule, one generic accept), a DES
// context with the published test key, and a traffic descriptor of 40 DMA
// cycles and 10 off cycles per frame, 20 of them for receive. Then, at the
// same time:
//   * a 48-word packet arrives in bursts on the receive port; the DMA must
//     write exactly these words, in order, to memory (channel 0);
//   * headers of five packets go through the header processor; their
//     Flow_IDs (and accept/reject) are checked;
//   * a 4-word packet is read from memory into the security engine
//     (channel 2) and must come back encrypted (channel 3);
//   * 24 words are read from memory into the transmit FIFO (channel 1) and
//     must leave the transmit port in order;
//   * channel 14 stands for another interface and requests now and then;
//   * the CPU requests the bus at random, sometimes locked;
//   * UART 0 and UART 1 (cross-connected, 16 cycles per bit) exchange four
//     bytes each way;
//   * a six-byte frame with flag and escape bytes is read from memory
//     (channel 5), sent round the looped-back HDLC port at 50 cycles per
//     bit (2 Mbit/s at 100 MHz) and must be written back to memory
//     (channel 4) with a good FCS;
//   * the two Ethernet ports are cross-connected on their MIIs (4 cycles
//     per nibble, 100 Mbit/s): a 64-byte frame read from memory for port 0
//     (channel 7) must be written back from port 1 (channel 8), and a
//     20-byte frame for port 1 (channel 9) must come back from port 0
//     (channel 6) padded to 60 bytes, both with a good FCS;
//   * the ATM cell interface is looped back: a 100-byte frame on circuit 5
//     (VPI 3, VCI 77) is read from memory (channel 11), cut into three
//     cells and reassembled, and must be written back (channel 10) with
//     its circuit number, followed by a frame-end word with the good flag;
//     a 30-byte frame on AAL0 circuit 6 (channel 13) must come back as one
//     raw cell of 48 bytes (zero-padded) and an end word (channel 12);
// Each mechanism must happen at least once: FEX stall, reject, accept,
// threshold (urgent) service, the DMA off interval with work pending, a
// locked CPU transfer holding the DMA off, bus handover, weighted round
// robin over several receive channels, UART reception in both directions,
// an HDLC frame and an Ethernet frame each way with a good FCS, and an
// AAL5 frame reassembled with a good CRC and an AAL0 cell received.
module tb_cp_top;
  import cp_pkg::*;
  import tb_fex_prog::*;
  logic clk = 0, rst_n = 0;

  logic imem_we = 0, mask_we = 0, rule_we = 0, hdr_we = 0, hdr_start = 0, ctx_we = 0;
  logic [FEX_PC_W-1:0] imem_waddr;
  fex_instr_t imem_wdata;
  logic [2:0] mask_idx;
  logic [CLS_KEY_W-1:0] mask_wdata;
  logic [7:0] rule_idx;
  cls_rule_t rule_wdata;
  logic [5:0] hdr_addr;
  logic [31:0] hdr_data;
  logic hdr_busy, fex_stall, flow_valid, flow_hit, pkt_accept, pkt_reject;
  logic [7:0] flow_id;
  logic [3:0] ctx_idx;
  sec_ctx_t ctx_wdata;
  logic [15:0] cfg_dma_cycles = 40, cfg_off_cycles = 10, cfg_rx_cycles = 20;
  logic [31:0] cfg_ch_en = 32'h7FFF, cfg_ch_tx = 32'h2AA6;
  logic [7:0] cfg_ch_weight [32];
  logic [6:0] cfg_fifo_hi = 16, cfg_fifo_lo = 4;
  logic rx_push = 0, rx_full, rx_overflow, tx_pop = 0, tx_empty, tx_underflow;
  logic [31:0] rx_data, tx_data;
  logic [31:0] ext_ch_req = 0, ext_ch_thresh = 0;
  logic cpu_req = 0, cpu_lock = 0, cpu_gnt, bus_handover;
  logic xfer_valid, xfer_tx, xfer_urgent, dma_window;
  logic [4:0] xfer_ch;
  logic mem_wvalid, mem_wsop, mem_weop;
  logic [31:0] mem_wdata, mem_rdata;
  logic mem_rsop, mem_reop, mem_rop_valid;
  logic [3:0] mem_rctx;
  sec_op_t mem_rop;
  // serial interfaces: UART 0 and 1 cross-connected, HDLC looped back
  logic [15:0] uart_cfg_div [2] = '{16'd16, 16'd16};
  logic [1:0] uart_tx_valid = 0, uart_tx_ready, uart_txd, uart_rxd, uart_rx_valid, uart_rx_read = 0;
  logic [1:0] uart_rx_frame_err, uart_rx_overrun;
  logic [7:0] uart_tx_data [2], uart_rx_data [2];
  logic [7:0] hdlc_cfg_div = 8'd50;
  logic hdlc_tx_abort, hdlc_rx_err, hdlc_txd, hdlc_rxd;
  // Ethernet ports 0 and 1 cross-connected on their MIIs
  logic [7:0] eth_cfg_div = 8'd4;
  logic [1:0] eth_tx_abort, eth_rx_err, mii_tx_en, mii_tx_er, mii_rx_dv, mii_rx_er;
  logic [3:0] mii_txd [2], mii_rxd [2];
  assign mii_rx_dv = {mii_tx_en[0], mii_tx_en[1]};
  assign mii_rx_er = {mii_tx_er[0], mii_tx_er[1]};
  assign mii_rxd   = '{mii_txd[1], mii_txd[0]};
  assign uart_rxd = {uart_txd[0], uart_txd[1]};
  assign hdlc_rxd = hdlc_txd;

  // ATM cell interface looped back
  logic atm_cfg_we = 0, atm_cfg_en = 0, atm_cfg_aal0 = 0, atm_hec_err, atm_unknown;
  logic [4:0] atm_cfg_vc = 0;
  logic [7:0] atm_cfg_vpi = 0;
  logic [15:0] atm_cfg_vci = 0;
  logic utp_tx_valid, utp_tx_ready, utp_tx_soc, utp_rx_valid, utp_rx_ready, utp_rx_soc;
  logic [7:0] utp_tx_data, utp_rx_data;
  assign utp_tx_ready = utp_rx_ready;
  assign utp_rx_valid = utp_tx_valid;
  assign utp_rx_data  = utp_tx_data;
  assign utp_rx_soc   = utp_tx_soc;

  cp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  // ------------------------------------------------------- memory model
  logic [31:0] tx_src [$], sec_src [$], hdlc_src [$], atm_src [$], aal0_src [$];
  int tx_rd = 0, sec_rd = 0, hdlc_rd = 0, atm_rd = 0, aal0_rd = 0;
  logic [31:0] eth_src [2][$];
  int eth_rd [2] = '{0, 0};
  always_comb begin
    mem_rdata = 32'h0; mem_rsop = 0; mem_reop = 0; mem_rctx = 4'd3; mem_rop_valid = 0; mem_rop = '0;
    if (xfer_valid && xfer_ch == 5'd1 && tx_rd < tx_src.size()) mem_rdata = tx_src[tx_rd];
    if (xfer_valid && xfer_ch == 5'd5 && hdlc_rd < hdlc_src.size()) mem_rdata = hdlc_src[hdlc_rd];
    if (xfer_valid && xfer_ch == 5'd11 && atm_rd < atm_src.size()) mem_rdata = atm_src[atm_rd];
    if (xfer_valid && xfer_ch == 5'd13 && aal0_rd < aal0_src.size()) mem_rdata = aal0_src[aal0_rd];
    for (int p = 0; p < 2; p++)
      if (xfer_valid && xfer_ch == 5'(7 + 2 * p) && eth_rd[p] < eth_src[p].size()) mem_rdata = eth_src[p][eth_rd[p]];
    if (xfer_valid && xfer_ch == 5'd2 && sec_rd < sec_src.size()) begin
      mem_rdata = sec_src[sec_rd];
      mem_rsop  = sec_rd == 0;
      mem_reop  = sec_rd == sec_src.size() - 1;
    end
  end
  always @(posedge clk) begin
    if (xfer_valid && xfer_ch == 5'd1) tx_rd <= tx_rd + 1;
    if (xfer_valid && xfer_ch == 5'd2) sec_rd <= sec_rd + 1;
    if (xfer_valid && xfer_ch == 5'd5) hdlc_rd <= hdlc_rd + 1;
    if (xfer_valid && xfer_ch == 5'd11) atm_rd <= atm_rd + 1;
    if (xfer_valid && xfer_ch == 5'd13) aal0_rd <= aal0_rd + 1;
    if (xfer_valid && xfer_ch == 5'd7) eth_rd[0] <= eth_rd[0] + 1;
    if (xfer_valid && xfer_ch == 5'd9) eth_rd[1] <= eth_rd[1] + 1;
  end
  always_comb begin
    ext_ch_req[1] = tx_rd < tx_src.size();
    ext_ch_req[2] = sec_rd < sec_src.size();
    ext_ch_req[5] = hdlc_rd < hdlc_src.size();
    ext_ch_req[7] = eth_rd[0] < eth_src[0].size();
    ext_ch_req[9] = eth_rd[1] < eth_src[1].size();
    ext_ch_req[11] = atm_rd < atm_src.size();
    ext_ch_req[13] = aal0_rd < aal0_src.size();
  end

  // memory writes
  logic [31:0] rx_mem [$], sec_mem [$], hdlc_mem [$], eth_mem [2][$], atm_mem [$], aal0_mem [$];
  logic        sec_sop [$], sec_eop [$];
  int served [32];
  int n_urgent = 0, n_stall = 0, n_accept = 0, n_reject = 0, n_handover = 0, n_off_pending = 0;
  int n_lock_hold = 0, n_cpu_cycles = 0;
  int n_hdlc_ok = 0, n_eth_ok = 0, n_atm_ok = 0, n_atm_drop = 0;
  always @(posedge clk) if (rst_n) begin
    if (mem_wvalid && xfer_ch == 5'd4 && mem_wdata[9] && mem_wdata[10]) n_hdlc_ok++;
    if (mem_wvalid && (xfer_ch == 5'd6 || xfer_ch == 5'd8) && mem_wdata[9] && mem_wdata[10]) n_eth_ok++;
    if (mem_wvalid && xfer_ch == 5'd0) rx_mem.push_back(mem_wdata);
    if (mem_wvalid && xfer_ch == 5'd4) hdlc_mem.push_back(mem_wdata);
    if (mem_wvalid && xfer_ch == 5'd10) atm_mem.push_back(mem_wdata);
    if (mem_wvalid && xfer_ch == 5'd12) aal0_mem.push_back(mem_wdata);
    if (mem_wvalid && xfer_ch == 5'd10 && mem_wdata[9] && mem_wdata[10]) n_atm_ok++;
    if (atm_hec_err || atm_unknown) n_atm_drop++;
    if (mem_wvalid && xfer_ch == 5'd6) eth_mem[0].push_back(mem_wdata);
    if (mem_wvalid && xfer_ch == 5'd8) eth_mem[1].push_back(mem_wdata);
    if (mem_wvalid && xfer_ch == 5'd3) begin
      sec_mem.push_back(mem_wdata); sec_sop.push_back(mem_wsop); sec_eop.push_back(mem_weop);
    end
    if (xfer_valid) served[xfer_ch]++;
    if (xfer_urgent) n_urgent++;
    if (fex_stall) n_stall++;
    if (pkt_accept) n_accept++;
    if (pkt_reject) n_reject++;
    if (bus_handover) n_handover++;
    if (!dma_window && dut.ch_req[0]) n_off_pending++;
    if (dut.dma_bus_req && cpu_gnt && cpu_req && cpu_lock) n_lock_hold++;
    if (cpu_gnt && cpu_req) n_cpu_cycles++;
  end

  // transmit port
  logic [31:0] tx_out [$];
  always @(negedge clk) tx_pop = !tx_empty && ($urandom % 3 == 0);
  always @(posedge clk) if (rst_n && tx_pop && !tx_empty) tx_out.push_back(tx_data);

  // CPU
  always @(negedge clk) begin
    cpu_req  = ($urandom % 4) != 0;
    cpu_lock = ($urandom % 3) == 0;
    ext_ch_req[14] = ($urandom % 5) == 0;
  end

  // serial receivers
  logic [7:0] uart_got [2][$];
  int n_serial_err = 0;
  always @(negedge clk) uart_rx_read = uart_rx_valid;
  always @(posedge clk) if (rst_n) begin
    for (int u = 0; u < 2; u++) if (uart_rx_valid[u] && uart_rx_read[u]) uart_got[u].push_back(uart_rx_data[u]);
    if (|eth_rx_err || |eth_tx_abort || hdlc_rx_err || hdlc_tx_abort || |uart_rx_frame_err || |uart_rx_overrun) n_serial_err++;
  end
  logic [7:0] uart_msg [2][4] = '{'{8'h43, 8'h50, 8'h0D, 8'h0A}, '{8'hA5, 8'h5A, 8'h00, 8'hFF}};
  logic [7:0] hdlc_msg [6] = '{8'hFF, 8'h03, 8'h7E, 8'h7D, 8'h3F, 8'h00};

  task automatic uart_send(int u);
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); uart_tx_valid[u] = 1; uart_tx_data[u] = uart_msg[u][k];
      @(posedge clk); while (!uart_tx_ready[u]) @(posedge clk);
      @(negedge clk); uart_tx_valid[u] = 0;
    end
  endtask

  // flow results
  int flows [$];
  always @(posedge clk) if (rst_n && flow_valid) flows.push_back(int'(flow_id));

  task automatic header(logic [7:0] p, logic [31:0] s, d, logic [15:0] sp, dp);
    while (hdr_busy) @(negedge clk);
    for (int w = 0; w < 6; w++) begin
      @(negedge clk); hdr_we = 1; hdr_addr = 6'(w); hdr_data = ipv4_word(w, p, s, d, sp, dp);
    end
    @(negedge clk); hdr_we = 0; hdr_start = 1;
    @(negedge clk); hdr_start = 0;
    while (hdr_busy) @(negedge clk);
  endtask

  logic [31:0] rx_pkt [$];

  initial begin
    foreach (cfg_ch_weight[c]) cfg_ch_weight[c] = 8'd1;
    cfg_ch_weight[0] = 4; cfg_ch_weight[1] = 2; cfg_ch_weight[2] = 2; cfg_ch_weight[3] = 2;
    for (int i = 0; i < 48; i++) rx_pkt.push_back(32'hA000_0000 + i * 32'h0101);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- configuration over the CPU ports
    for (int a = 0; a < PROG_LEN; a++) begin
      @(negedge clk); imem_we = 1; imem_waddr = FEX_PC_W'(a); imem_wdata = five_tuple(a);
    end
    @(negedge clk); imem_we = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); rule_we = 1; rule_idx = 8'(i); rule_wdata = '0;
    end
    @(negedge clk); rule_idx = 0;
    rule_wdata = '{valid: 1'b1, set: CLS_DENY, mask_idx: 3'd2,
                   value: five_tuple_key(0, 32'h0A00_0042, 0, 0, 0), flow_id: 8'd0};
    @(negedge clk); rule_idx = 9;
    rule_wdata = '{valid: 1'b1, set: CLS_FLOW, mask_idx: 3'd0,
                   value: five_tuple_key(17, 32'hC0A8_0A01, 32'h0A00_0005, 16'h1F90, 16'h0035), flow_id: 8'h21};
    @(negedge clk); rule_idx = 30;
    rule_wdata = '{valid: 1'b1, set: CLS_ACCEPT, mask_idx: 3'd1,
                   value: five_tuple_key(17, 0, 0, 0, 0), flow_id: 8'h05};
    @(negedge clk); rule_we = 0;
    mask_we = 1; mask_idx = 0; mask_wdata = (CLS_KEY_W'(1) << 104) - 1;
    @(negedge clk); mask_idx = 1; mask_wdata = CLS_KEY_W'(8'hFF) << 96;
    @(negedge clk); mask_idx = 2; mask_wdata = CLS_KEY_W'(32'hFFFF_FFFF) << 64;
    @(negedge clk); mask_we = 0;
    ctx_we = 1; ctx_idx = 3;
    ctx_wdata = '{op: '{tdes: 1'b0, decrypt: 1'b0}, k1: 64'h133457799BBCDFF1, k2: '0, k3: '0};
    @(negedge clk); ctx_we = 0;
    atm_cfg_we = 1; atm_cfg_vc = 5; atm_cfg_en = 1; atm_cfg_vpi = 3; atm_cfg_vci = 77;
    @(negedge clk); atm_cfg_vc = 6; atm_cfg_aal0 = 1; atm_cfg_vci = 78;
    @(negedge clk); atm_cfg_we = 0; atm_cfg_aal0 = 0;
    // ---- traffic
    sec_src = '{32'h01234567, 32'h89ABCDEF, 32'h01234567, 32'h89ABCDEF};
    for (int i = 0; i < 24; i++) tx_src.push_back(32'h7700_0000 + i);
    // HDLC frame words: byte, bit 8 first, bit 9 last
    for (int k = 0; k < 6; k++) hdlc_src.push_back({22'd0, k == 5, k == 0, hdlc_msg[k]});
    // Ethernet frames: 64 bytes out of port 0, 20 bytes (padded) out of port 1
    for (int k = 0; k < 64; k++) eth_src[0].push_back({22'd0, k == 63, k == 0, 8'(k * 5 + 1)});
    for (int k = 0; k < 20; k++) eth_src[1].push_back({22'd0, k == 19, k == 0, 8'(8'hE0 + k)});
    // ATM frame words: byte, bit 8 first, bit 9 last, circuit in bits 20:16
    for (int k = 0; k < 100; k++) atm_src.push_back({11'd0, 5'd5, 6'd0, k == 99, k == 0, 8'(k * 3 + 7)});
    for (int k = 0; k < 30; k++) aal0_src.push_back({11'd0, 5'd6, 6'd0, k == 29, k == 0, 8'(8'h90 + k)});
    fork
      begin : rx_port
        int i;
        i = 0;
        while (i < rx_pkt.size()) begin
          @(negedge clk);
          // bursts of 24 back-to-back words, then a pause
          rx_push = !rx_full && ((i % 24) != 0 || ($urandom % 40) == 0);
          rx_data = rx_pkt[i];
          @(posedge clk);
          if (rx_push) i++;
        end
        @(negedge clk); rx_push = 0;
      end
      begin : headers
        header(17, 32'hC0A8_0A01, 32'h0A00_0005, 16'h1F90, 16'h0035);
        header(6, 32'h0101_0101, 32'h0202_0202, 16'd80, 16'd8080);
        header(17, 32'h0A00_0042, 32'h0A00_0005, 16'h1F90, 16'h0035);
        header(17, 32'h0303_0303, 32'h0404_0404, 16'd1, 16'd2);
        header(6, 32'h0505_0505, 32'h0606_0606, 16'd3, 16'd4);
      end
      uart_send(0);
      uart_send(1);
    join
    repeat (4000) @(negedge clk);
    // ---- results
    chk("rx words", rx_mem.size(), 48);
    for (int i = 0; i < 48 && i < rx_mem.size(); i++) chk($sformatf("rx word %0d", i), rx_mem[i], rx_pkt[i]);
    chk("tx words", tx_out.size(), 24);
    for (int i = 0; i < 24 && i < tx_out.size(); i++) chk($sformatf("tx word %0d", i), tx_out[i], tx_src[i]);
    chk("sec words", sec_mem.size(), 4);
    if (sec_mem.size() == 4) begin
      chk("sec w0", sec_mem[0], 32'h85E81354); chk("sec w1", sec_mem[1], 32'h0F0AB405);
      chk("sec w2", sec_mem[2], 32'h85E81354); chk("sec w3", sec_mem[3], 32'h0F0AB405);
      chk("sec sop", sec_sop[0], 1); chk("sec eop", sec_eop[3], 1);
    end
    chk("flows", flows.size(), 5);
    if (flows.size() == 5) begin
      chk("flow 0", flows[0], 8'h21); chk("flow 1", flows[1], 0); chk("flow 2", flows[2], 0);
      chk("flow 3", flows[3], 8'h05); chk("flow 4", flows[4], 0);
    end
    chk("accepted", n_accept, 2);
    chk("rejected", n_reject, 3);
    chk("rx overflow", int'(rx_overflow), 0);
    for (int u = 0; u < 2; u++) begin
      chk($sformatf("uart %0d bytes", u), uart_got[1-u].size(), 4);
      for (int k = 0; k < 4 && k < uart_got[1-u].size(); k++)
        chk($sformatf("uart %0d byte %0d", u, k), uart_got[1-u][k], uart_msg[u][k]);
    end
    chk("hdlc words", hdlc_mem.size(), 6);
    for (int k = 0; k < 6 && k < hdlc_mem.size(); k++)
      chk($sformatf("hdlc word %0d", k), hdlc_mem[k], {20'd0, 1'b0, k == 5, k == 5, k == 0, hdlc_msg[k]});
    chk("serial errors", n_serial_err, 0);
    // port 0 sends to port 1 (channel 8), port 1 to port 0 (channel 6)
    chk("eth 0->1 words", eth_mem[1].size(), 64);
    for (int k = 0; k < 64 && k < eth_mem[1].size(); k++)
      chk($sformatf("eth 0->1 word %0d", k), eth_mem[1][k], {20'd0, 1'b0, k == 63, k == 63, k == 0, 8'(k * 5 + 1)});
    chk("eth 1->0 words (padded)", eth_mem[0].size(), 60);
    for (int k = 0; k < 60 && k < eth_mem[0].size(); k++)
      chk($sformatf("eth 1->0 word %0d", k), eth_mem[0][k],
          {20'd0, 1'b0, k == 59, k == 59, k == 0, k < 20 ? 8'(8'hE0 + k) : 8'h00});
    chk("atm words", atm_mem.size(), 101);
    for (int k = 0; k < 100 && k < atm_mem.size(); k++)
      chk($sformatf("atm word %0d", k), atm_mem[k], {11'd0, 5'd5, 7'd0, k == 0, 8'(k * 3 + 7)});
    if (atm_mem.size() == 101) chk("atm frame end", atm_mem[100], {11'd0, 5'd5, 5'd0, 1'b1, 1'b1, 1'b0, 8'd0});
    chk("atm dropped cells", n_atm_drop, 0);
    chk("aal0 words", aal0_mem.size(), 49);
    for (int k = 0; k < 48 && k < aal0_mem.size(); k++)
      chk($sformatf("aal0 word %0d", k), aal0_mem[k], {11'd0, 5'd6, 7'd0, k == 0, k < 30 ? 8'(8'h90 + k) : 8'h00});
    if (aal0_mem.size() == 49) chk("aal0 end", aal0_mem[48], {11'd0, 5'd6, 5'd0, 1'b1, 1'b1, 1'b0, 8'd0});
    // ---- every mechanism at least once
    $display("mechanisms: stall=%0d reject=%0d accept=%0d urgent=%0d off_pending=%0d lock_hold=%0d handover=%0d cpu_cycles=%0d ch0=%0d ch3=%0d ch4=%0d ch5=%0d ch6=%0d ch7=%0d ch8=%0d ch9=%0d ch10=%0d ch11=%0d ch12=%0d ch13=%0d ch14=%0d uart=%0d/%0d hdlc_ok=%0d eth_ok=%0d atm_ok=%0d",
             n_stall, n_reject, n_accept, n_urgent, n_off_pending, n_lock_hold, n_handover, n_cpu_cycles,
             served[0], served[3], served[4], served[5], served[6],
             served[7], served[8], served[9], served[10], served[11], served[12], served[13], served[14],
             uart_got[0].size(), uart_got[1].size(), n_hdlc_ok, n_eth_ok, n_atm_ok);
    checks += 14;
    if (n_stall == 0)       begin failures++; $display("FAIL no FEX stall"); end
    if (n_reject == 0)      begin failures++; $display("FAIL no reject"); end
    if (n_accept == 0)      begin failures++; $display("FAIL no accept"); end
    if (n_urgent == 0)      begin failures++; $display("FAIL no threshold service"); end
    if (n_off_pending == 0) begin failures++; $display("FAIL off interval never delayed work"); end
    if (n_lock_hold == 0)   begin failures++; $display("FAIL no locked CPU transfer held the DMA"); end
    if (n_handover == 0)    begin failures++; $display("FAIL no bus handover"); end
    if (n_cpu_cycles == 0)  begin failures++; $display("FAIL CPU never used the bus"); end
    if (served[14] == 0 || served[3] == 0) begin failures++; $display("FAIL round robin did not reach channels 3/14"); end
    if (uart_got[0].size() == 0 || uart_got[1].size() == 0) begin failures++; $display("FAIL a UART never received"); end
    if (n_hdlc_ok == 0)     begin failures++; $display("FAIL no HDLC frame with a good FCS"); end
    if (n_eth_ok < 2)       begin failures++; $display("FAIL an Ethernet direction had no good frame"); end
    if (n_atm_ok == 0)      begin failures++; $display("FAIL no AAL5 frame reassembled with a good CRC"); end
    if (served[12] == 0)    begin failures++; $display("FAIL no AAL0 cell received"); end
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
