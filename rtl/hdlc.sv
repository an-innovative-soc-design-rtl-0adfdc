// hdlc: the 2 Mbit/s HDLC port (high speed serial interface).
//
// A transmitter and a receiver sharing one bit-rate divider: bit_en is
// raised every cfg_div clock cycles (50 for 2 Mbit/s at 100 MHz) and both
// directions move one bit on it. See hdlc_tx and hdlc_rx for the framing:
// flags, zero-bit stuffing, 16-bit FCS, abort. In the top the byte streams
// face a receive and a transmit port FIFO served by the DMA. The rate
// comes from the document; the framing is standard HDLC and the interfaces
// are this design's own.
module hdlc #(
  parameter int DIV_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] cfg_div,    // clock cycles per bit, >= 1
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
  output logic             rx_fcs_ok,
  output logic             rx_err,
  // serial line
  output logic             ser_txd,
  input  logic             ser_rxd
);
  logic [DIV_W-1:0] cnt;
  logic             bit_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      cnt <= '0;
    else if (cnt >= cfg_div - 1'b1)  cnt <= '0;
    else                             cnt <= cnt + 1'b1;
  end
  assign bit_en = cnt >= cfg_div - 1'b1;

  hdlc_tx u_tx (
    .clk, .rst_n, .bit_en,
    .in_valid(tx_valid), .in_ready(tx_ready), .in_data(tx_data),
    .in_sop(tx_sop), .in_eop(tx_eop), .tx_bit(ser_txd), .tx_abort
  );

  hdlc_rx u_rx (
    .clk, .rst_n, .bit_en, .rx_bit(ser_rxd),
    .out_valid(rx_valid), .out_data(rx_data), .out_sop(rx_sop), .out_eop(rx_eop),
    .out_fcs_ok(rx_fcs_ok), .out_err(rx_err)
  );

endmodule
