// tb_atm_aal5: self-checking testbench of the ATM/AAL5 port.
//
// Reference: its own bitwise HEC and AAL5 CRC-32, checked first against the
// published check values (CRC-32/BZIP2 of "123456789" is 0xFC891918; the
// HEC of the idle-cell header 00 00 00 01 is 0x52).
// Part 1 loops the cell output back to the cell input through a line model
// that stalls at random. Frames of 1, 40, 41, 48, 100 and 200 bytes on two
// circuits are sent; each cell's header, HEC and count, the trailer of the
// last cell, and the reassembled bytes and frame-end word are checked.
// Part 2 drives the cell input directly: two frames interleaved cell by
// cell on two circuits, a cell with a bad HEC, a cell for an unknown
// circuit and a frame with a corrupted byte (must end without the good
// flag). Also in part 1, a circuit in AAL0 mode sends a 70-byte frame as
// two raw cells, checked on the line and received back as two 48-byte
// frames. The mode flag is checked on every output word. Ends with the
// TB_RESULT line; a watchdog stops a hung run.
module tb_atm_aal5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------- reference
  function automatic logic [7:0] ref_hec(input logic [7:0] b [4]);
    logic [7:0] c = 8'h00;
    for (int k = 0; k < 4; k++)
      for (int i = 7; i >= 0; i--) begin
        logic msb = c[7] ^ b[k][i];
        c = c << 1;
        c[0] ^= msb; c[1] ^= msb; c[2] ^= msb;
      end
    return c ^ 8'h55;
  endfunction

  function automatic logic [31:0] ref_crc(input logic [7:0] d [$]);
    logic [31:0] c = '1;
    foreach (d[k])
      for (int i = 7; i >= 0; i--) begin
        logic msb = c[31] ^ d[k][i];
        c = c << 1;
        if (msb) c ^= 32'h04C1_1DB7;
      end
    return ~c;
  endfunction

  // cells of an AAL5 frame, as the standard defines them
  typedef logic [7:0] cell_t [53];
  function automatic void make_cells(input logic [7:0] vpi, input logic [15:0] vci,
                                     input logic [7:0] d [$], ref cell_t cells [$]);
    logic [7:0] pdu [$];
    logic [31:0] c;
    int n;
    pdu = d;
    n = (d.size() + 8 + 47) / 48 * 48;
    while (pdu.size() < n - 8) pdu.push_back(8'h00);
    pdu.push_back(8'h00); pdu.push_back(8'h00);
    pdu.push_back(8'(d.size() >> 8)); pdu.push_back(8'(d.size()));
    c = ref_crc(pdu);
    for (int i = 3; i >= 0; i--) pdu.push_back(c[8 * i +: 8]);
    cells = {};
    for (int k = 0; k < n / 48; k++) begin
      cell_t cl;
      logic [7:0] h [4];
      logic last = k == n / 48 - 1;
      h[0] = {4'h0, vpi[7:4]};
      h[1] = {vpi[3:0], vci[15:12]};
      h[2] = vci[11:4];
      h[3] = {vci[3:0], 2'b00, last, 1'b0};
      for (int i = 0; i < 4; i++) cl[i] = h[i];
      cl[4] = ref_hec(h);
      for (int i = 0; i < 48; i++) cl[5 + i] = pdu[48 * k + i];
      cells.push_back(cl);
    end
  endfunction

  // -------------------------------------------------------------------- DUT
  logic        cfg_we = 1'b0, cfg_en = 1'b0, cfg_aal0 = 1'b0;
  logic [4:0]  cfg_vc = '0;
  logic [7:0]  cfg_vpi = '0;
  logic [15:0] cfg_vci = '0;
  logic        tx_valid = 1'b0, tx_ready, tx_sop = 1'b0, tx_eop = 1'b0;
  logic [7:0]  tx_data = '0;
  logic [4:0]  tx_vc = '0;
  logic        rx_valid, rx_sop, rx_end, rx_good, rx_hec_err, rx_unknown;
  logic [7:0]  rx_data;
  logic [15:0] rx_len;
  logic [4:0]  rx_vc;
  logic        rx_aal0;
  logic        utp_tx_valid, utp_tx_ready, utp_tx_soc;
  logic [7:0]  utp_tx_data;
  logic        utp_rx_valid, utp_rx_ready, utp_rx_soc;
  logic [7:0]  utp_rx_data;

  atm_aal5 dut (.*);

  // line model: part 1 loops back with random stalls, part 2 drives cells
  bit         loop = 1'b1;
  logic       stall;
  logic       drv_valid = 1'b0, drv_soc = 1'b0;
  logic [7:0] drv_data = '0;
  always_ff @(posedge clk) stall <= ($urandom % 4) == 0;
  assign utp_tx_ready = loop && !stall && utp_rx_ready;
  assign utp_rx_valid = loop ? utp_tx_valid && utp_tx_ready : drv_valid;
  assign utp_rx_data  = loop ? utp_tx_data : drv_data;
  assign utp_rx_soc   = loop ? utp_tx_soc : drv_soc;

  // capture of cells on the line and of the reassembled output
  logic [7:0] line_q [$];
  int         socs = 0, nline = 0;
  typedef struct { logic [7:0] b; logic sop; logic [4:0] vc; } rxb_t;
  rxb_t       rxb [$];
  typedef struct { logic good; logic [15:0] len; logic [4:0] vc; } end_t;
  end_t       ends [$];
  int         hec_errs = 0, unknowns = 0;

  always_ff @(posedge clk) if (rst_n) begin
    if (utp_tx_valid && utp_tx_ready) begin
      line_q.push_back(utp_tx_data);
      if (utp_tx_soc) begin
        socs++;
        if (nline % 53 != 0) begin
          checks++; failures++;
          $display("FAIL start of cell at byte %0d", nline);
        end
      end
      nline++;
    end
    if (rx_valid && rx_end)  ends.push_back('{rx_good, rx_len, rx_vc});
    if (rx_valid && !rx_end) rxb.push_back('{rx_data, rx_sop, rx_vc});
    if (rx_valid && rx_aal0 != (rx_vc == 5'd9)) begin
      checks++; failures++;
      $display("FAIL mode flag %0b on circuit %0d", rx_aal0, rx_vc);
    end
    if (rx_hec_err) hec_errs++;
    if (rx_unknown) unknowns++;
  end

  task automatic set_vc(input int vc, input logic [7:0] vpi, input logic [15:0] vci,
                        input bit aal0 = 1'b0);
    @(negedge clk);
    cfg_we = 1'b1; cfg_vc = 5'(vc); cfg_en = 1'b1; cfg_vpi = vpi; cfg_vci = vci;
    cfg_aal0 = aal0;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic send_frame(input int vc, input logic [7:0] d [$]);
    foreach (d[i]) begin
      @(negedge clk);
      tx_valid = 1'b1; tx_data = d[i]; tx_sop = i == 0; tx_eop = i == d.size() - 1;
      tx_vc = 5'(vc);
      do @(posedge clk); while (!tx_ready);
    end
    @(negedge clk);
    tx_valid = 1'b0;
  endtask

  task automatic drive_cell(input cell_t c);
    for (int i = 0; i < 53; i++) begin
      @(negedge clk);
      drv_valid = 1'b1; drv_data = c[i]; drv_soc = i == 0;
      do @(posedge clk); while (!utp_rx_ready);
    end
    @(negedge clk);
    drv_valid = 1'b0;
  endtask

  // check the reassembled frame at the head of the queues
  task automatic check_rx(input int vc, input logic [7:0] d [$], input bit good, input string tag);
    int n = 0;
    bit ok = 1'b1;
    foreach (d[i]) begin
      int k = -1;
      foreach (rxb[j]) if (rxb[j].vc == 5'(vc)) begin k = j; break; end
      if (k < 0) begin ok = 1'b0; break; end
      if (rxb[k].b != d[i] || rxb[k].sop != (i == 0)) ok = 1'b0;
      rxb.delete(k);
      n++;
    end
    check(ok && n == d.size(), $sformatf("%s bytes", tag));
    begin
      int k = -1;
      foreach (ends[j]) if (ends[j].vc == 5'(vc)) begin k = j; break; end
      check(k >= 0, $sformatf("%s frame end seen", tag));
      if (k >= 0) begin
        check(ends[k].good == good, $sformatf("%s good flag %0b", tag, ends[k].good));
        if (good) check(ends[k].len == 16'(d.size()), $sformatf("%s length %0d", tag, ends[k].len));
        ends.delete(k);
      end
    end
  endtask

  function automatic void rand_bytes(int n, ref logic [7:0] d [$]);
    d = {};
    repeat (n) d.push_back(8'($urandom));
  endfunction

  initial begin
    #20ms;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [7:0] s [$];
    logic [7:0] h [4];
    int lens [6] = '{1, 40, 41, 48, 100, 200};

    // reference self-check
    s = {};
    for (int i = 0; i < 9; i++) s.push_back(8'(8'h31 + i));
    check(~ref_crc(s) == ~32'hFC89_1918, "reference CRC-32 check value");
    h = '{8'h00, 8'h00, 8'h00, 8'h01};
    check(ref_hec(h) == 8'h52, "reference HEC of the idle cell");

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    set_vc(3, 8'd1, 16'd100);
    set_vc(17, 8'd2, 16'h1234);
    set_vc(9, 8'd4, 16'd200, 1'b1);          // AAL0: raw cells

    // part 1: loopback
    foreach (lens[f]) begin
      logic [7:0] d [$];
      cell_t exp [$];
      int vc = f % 2 ? 17 : 3;
      int first;
      rand_bytes(lens[f], d);
      make_cells(vc == 3 ? 8'd1 : 8'd2, vc == 3 ? 16'd100 : 16'h1234, d, exp);
      first = line_q.size();
      send_frame(vc, d);
      wait (line_q.size() == first + 53 * exp.size());
      repeat (60) @(posedge clk);
      check(line_q.size() == first + 53 * exp.size(),
            $sformatf("frame %0d bytes: %0d cells", lens[f], exp.size()));
      begin
        bit ok = 1'b1;
        foreach (exp[k]) for (int i = 0; i < 53; i++)
          if (line_q[first + 53 * k + i] !== exp[k][i]) ok = 1'b0;
        check(ok, $sformatf("frame %0d bytes: cells match the standard format", lens[f]));
      end
      check_rx(vc, d, 1'b1, $sformatf("loopback %0d bytes", lens[f]));
    end
    // AAL0: 70 bytes become two raw cells (the second zero-padded), PTI 0,
    // and come back as two 48-byte frames
    begin
      logic [7:0] d [$], p0 [$], p1 [$];
      logic [7:0] h [4];
      int first;
      bit ok = 1'b1;
      rand_bytes(70, d);
      h = '{8'h00, 8'h40, 8'h0C, 8'h80};     // VPI 4, VCI 200, PTI 0
      first = line_q.size();
      send_frame(9, d);
      wait (line_q.size() == first + 106);
      repeat (60) @(posedge clk);
      check(line_q.size() == first + 106, "AAL0 70 bytes: 2 cells");
      for (int k = 0; k < 2; k++) begin
        for (int i = 0; i < 4; i++) if (line_q[first + 53 * k + i] !== h[i]) ok = 1'b0;
        if (line_q[first + 53 * k + 4] !== ref_hec(h)) ok = 1'b0;
        for (int i = 0; i < 48; i++)
          if (line_q[first + 53 * k + 5 + i] !== (48 * k + i < 70 ? d[48 * k + i] : 8'h00)) ok = 1'b0;
      end
      check(ok, "AAL0 cells: header, HEC and raw payload");
      for (int i = 0; i < 96; i++) if (i < 48) p0.push_back(d[i]); else p1.push_back(i < 70 ? d[i] : 8'h00);
      check_rx(9, p0, 1'b1, "AAL0 cell 1");
      check_rx(9, p1, 1'b1, "AAL0 cell 2");
    end
    check(socs == line_q.size() / 53, "one start of cell per cell");

    // part 2: cells driven directly
    loop = 1'b0;
    begin
      logic [7:0] a [$], b [$], c [$];
      cell_t ca [$], cb [$], cc [$], bad [$];
      rand_bytes(130, a);                      // three cells
      rand_bytes(80, b);                       // two cells
      make_cells(8'd1, 16'd100, a, ca);
      make_cells(8'd2, 16'h1234, b, cb);
      for (int k = 0; k < 3; k++) begin
        drive_cell(ca[k]);
        if (k == 1) begin
          cell_t x = cb[0];
          x[4] ^= 8'h01;                     // bad HEC: dropped
          drive_cell(x);
          make_cells(8'd9, 16'd9, b, bad);   // unknown circuit: dropped
          drive_cell(bad[0]);
        end
        if (k < 2) drive_cell(cb[k]);
      end
      repeat (60) @(posedge clk);
      check(hec_errs == 1, $sformatf("bad HEC cell reported (%0d)", hec_errs));
      check(unknowns == 1, $sformatf("unknown circuit reported (%0d)", unknowns));
      check_rx(3, a, 1'b1, "interleaved frame on circuit 3");
      // the copy of a circuit 17 cell with a bad HEC was dropped, so that
      // frame is intact
      check_rx(17, b, 1'b1, "interleaved frame on circuit 17");

      rand_bytes(60, c);
      make_cells(8'd2, 16'h1234, c, cc);
      cc[0][20] ^= 8'h40;                    // corrupted payload byte
      foreach (cc[k]) drive_cell(cc[k]);
      repeat (60) @(posedge clk);
      c[15] ^= 8'h40;
      check_rx(17, c, 1'b0, "corrupted frame");
    end
    check(rxb.size() == 0 && ends.size() == 0, "no stray output");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
