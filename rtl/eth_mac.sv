// eth_mac: one 10/100 Ethernet port, IEEE 802.3 MAC on an MII.
//
// A transmitter and a receiver (see eth_mac_tx and eth_mac_rx: preamble and
// delimiter, padding to the minimum frame, 32-bit FCS, interframe gap)
// sharing one nibble-rate divider: nib_en is raised every cfg_div clock
// cycles, 4 for 100 Mbit/s or 40 for 10 Mbit/s at the chip's 100 MHz, and
// both directions move one nibble on it. The MII is taken as synchronous to
// the core clock (the PHY's nibble clocks are replaced by nib_en). In the
// top the byte streams face a receive and a transmit port FIFO served by
// the DMA. That the chip has two 10/100 ports with the MAC in hardware is
// the document's; the frame format is the standard's; the interfaces and
// the single clock are this design's own.
module eth_mac #(
  parameter int DIV_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] cfg_div,    // clock cycles per nibble, >= 1
  // transmit bytes
  input  logic             tx_valid,
  output logic             tx_ready,
  input  logic [7:0]       tx_data,
  input  logic             tx_sop,
  input  logic             tx_eop,
  output logic             tx_abort,
  // received bytes
  output logic             rx_valid,
  output logic [7:0]       rx_data,
  output logic             rx_sop,
  output logic             rx_eop,
  output logic             rx_good,
  output logic             rx_err,
  // MII
  output logic             mii_tx_en,
  output logic [3:0]       mii_txd,
  output logic             mii_tx_er,
  input  logic             mii_rx_dv,
  input  logic [3:0]       mii_rxd,
  input  logic             mii_rx_er
);
  logic [DIV_W-1:0] cnt;
  logic             nib_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      cnt <= '0;
    else if (cnt >= cfg_div - 1'b1)  cnt <= '0;
    else                             cnt <= cnt + 1'b1;
  end
  assign nib_en = cnt >= cfg_div - 1'b1;

  eth_mac_tx u_tx (
    .clk, .rst_n, .nib_en,
    .in_valid(tx_valid), .in_ready(tx_ready), .in_data(tx_data),
    .in_sop(tx_sop), .in_eop(tx_eop),
    .tx_en(mii_tx_en), .txd(mii_txd), .tx_er(mii_tx_er), .tx_abort
  );

  eth_mac_rx u_rx (
    .clk, .rst_n, .nib_en,
    .rx_dv(mii_rx_dv), .rxd(mii_rxd), .rx_er(mii_rx_er),
    .out_valid(rx_valid), .out_data(rx_data), .out_sop(rx_sop), .out_eop(rx_eop),
    .out_good(rx_good), .out_err(rx_err)
  );

endmodule
