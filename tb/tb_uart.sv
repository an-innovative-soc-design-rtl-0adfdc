// tb_uart: 8N1 serial port, bit timing, loopback, framing error, overrun.
//
// With a divider of 16 the testbench watches txd and checks the frame
// itself: start bit low, eight data bits least significant first, stop bit
// high, each exactly 16 cycles. txd is looped back to rxd and every byte
// must be received. A frame driven by the testbench with a low stop bit
// must give a framing error, and two bytes received without a read must
// flag an overrun.
module tb_uart;
  logic clk = 0, rst_n = 0;
  logic [15:0] cfg_div = 16;
  logic tx_valid = 0, tx_ready, txd, rxd, rx_valid, rx_read = 0, rx_frame_err, rx_overrun;
  logic [7:0] tx_data, rx_data;
  logic loop = 1, drv = 1;
  int checks = 0, failures = 0, n_ferr = 0, n_ovr = 0;

  assign rxd = loop ? txd : drv;

  uart dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (rx_frame_err) n_ferr++;
    if (rx_overrun) n_ovr++;
  end

  // line monitor: decode txd by sampling in the middle of each bit
  logic [7:0] mon [$];
  int bad_timing = 0;
  initial begin
    forever begin
      @(negedge txd);
      if (rst_n) begin
        logic [7:0] b;
        repeat (8) @(posedge clk);
        if (txd != 0) bad_timing++;
        for (int i = 0; i < 8; i++) begin
          repeat (16) @(posedge clk);
          b[i] = txd;
        end
        repeat (16) @(posedge clk);
        if (txd != 1) bad_timing++;
        mon.push_back(b);
      end
    end
  end

  task automatic send(logic [7:0] d);
    @(negedge clk); tx_valid = 1; tx_data = d;
    @(posedge clk); while (!tx_ready) @(posedge clk);
    @(negedge clk); tx_valid = 0;
  endtask

  task automatic receive(output logic [7:0] d);
    int guard = 0;
    while (!rx_valid && guard < 1000) begin @(negedge clk); guard++; end
    d = rx_data;
    rx_read = 1; @(negedge clk); rx_read = 0;
  endtask

  initial begin
    logic [7:0] bytes [5] = '{8'h55, 8'hA3, 8'h00, 8'hFF, 8'h81};
    logic [7:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    foreach (bytes[k]) begin
      send(bytes[k]);
      receive(d);
      checks++;
      if (d != bytes[k]) begin failures++; $display("FAIL loopback %h got %h", bytes[k], d); end
    end
    repeat (40) @(negedge clk);
    checks += 2;
    if (mon.size() != 5) begin failures++; $display("FAIL monitor saw %0d frames", mon.size()); end
    else foreach (bytes[k]) if (mon[k] != bytes[k]) begin failures++; $display("FAIL line byte %0d %h", k, mon[k]); end
    if (bad_timing != 0) begin failures++; $display("FAIL start/stop bits %0d", bad_timing); end
    // framing error: stop bit low
    loop = 0;
    @(negedge clk); drv = 0;
    repeat (16 * 10) @(negedge clk);
    drv = 1;
    repeat (40) @(negedge clk);
    checks++;
    if (n_ferr != 1) begin failures++; $display("FAIL framing errors %0d", n_ferr); end
    // overrun: two bytes, no read in between
    loop = 1;
    send(8'h11);
    send(8'h22);
    repeat (16 * 12) @(negedge clk);
    checks += 2;
    if (n_ovr != 1) begin failures++; $display("FAIL overruns %0d", n_ovr); end
    if (rx_data != 8'h22) begin failures++; $display("FAIL last byte %h", rx_data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
