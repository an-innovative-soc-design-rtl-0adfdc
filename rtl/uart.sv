// uart: RS-232 serial port (the chip has two of them, next to the CPU).
//
// An 8N1 asynchronous serial port: one start bit, eight data bits (least
// significant first), no parity, one stop bit, at a bit time of cfg_div
// clock cycles (for example 868 for 115200 baud at 100 MHz). The receiver
// samples its input through a two-flop synchroniser, finds the middle of the
// start bit and then samples each bit in its middle; a low stop bit is a
// framing error. A byte not read before the next one arrives is lost and
// flagged (rx_overrun).
//
// Interface: tx_valid/tx_ready accept one byte to send; rx_valid stays high
// with rx_data until rx_read. Only the port's existence is taken from the
// document; the frame format, the one-byte buffers and the divider are this
// design's choices.
module uart #(
  parameter int DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] cfg_div,     // clock cycles per bit, >= 4
  // transmit
  input  logic             tx_valid,
  output logic             tx_ready,
  input  logic [7:0]       tx_data,
  output logic             txd,
  // receive
  input  logic             rxd,
  output logic             rx_valid,
  output logic [7:0]       rx_data,
  input  logic             rx_read,
  output logic             rx_frame_err,
  output logic             rx_overrun
);
  // ------------------------------------------------------------ transmit
  logic [9:0]       tx_sh;       // stop, data, start (LSB sent first)
  logic [3:0]       tx_bits;     // bits left
  logic [DIV_W-1:0] tx_cnt;

  assign tx_ready = tx_bits == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sh   <= '1;
      tx_bits <= '0;
      tx_cnt  <= '0;
      txd     <= 1'b1;
    end else if (tx_bits == '0) begin
      txd <= 1'b1;
      if (tx_valid) begin
        tx_sh   <= {1'b1, tx_data, 1'b0};
        tx_bits <= 4'd10;
        tx_cnt  <= '0;
      end
    end else begin
      txd <= tx_sh[0];
      if (tx_cnt == cfg_div - 1'b1) begin
        tx_cnt  <= '0;
        tx_sh   <= {1'b1, tx_sh[9:1]};
        tx_bits <= tx_bits - 1'b1;
      end else begin
        tx_cnt <= tx_cnt + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------- receive
  logic [1:0]       sync;
  logic             rx_in;
  logic             rx_busy;
  logic [3:0]       rx_bits;     // bits sampled so far (start = 0)
  logic [DIV_W-1:0] rx_cnt;
  logic [8:0]       rx_sh;

  assign rx_in = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync         <= 2'b11;
      rx_busy      <= 1'b0;
      rx_bits      <= '0;
      rx_cnt       <= '0;
      rx_sh        <= '0;
      rx_valid     <= 1'b0;
      rx_data      <= '0;
      rx_frame_err <= 1'b0;
      rx_overrun   <= 1'b0;
    end else begin
      sync         <= {sync[0], rxd};
      rx_frame_err <= 1'b0;
      rx_overrun   <= 1'b0;
      if (rx_read) rx_valid <= 1'b0;
      if (!rx_busy) begin
        if (!rx_in) begin                 // falling edge: start bit
          rx_busy <= 1'b1;
          rx_bits <= '0;
          rx_cnt  <= cfg_div >> 1;        // to the middle of the start bit
        end
      end else if (rx_cnt == '0) begin
        rx_cnt <= cfg_div - 1'b1;
        if (rx_bits == 4'd0 && rx_in) begin
          rx_busy <= 1'b0;                // glitch, not a start bit
        end else if (rx_bits == 4'd9) begin
          rx_busy <= 1'b0;
          if (!rx_in) begin
            rx_frame_err <= 1'b1;
          end else begin
            rx_data  <= rx_sh[8:1];
            rx_valid <= 1'b1;
            if (rx_valid && !rx_read) rx_overrun <= 1'b1;
          end
        end else begin
          rx_sh   <= {rx_in, rx_sh[8:1]};
          rx_bits <= rx_bits + 1'b1;
        end
      end else begin
        rx_cnt <= rx_cnt - 1'b1;
      end
    end
  end

endmodule
