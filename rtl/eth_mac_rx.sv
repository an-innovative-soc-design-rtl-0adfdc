// eth_mac_rx: 802.3 MAC receiver on a 4-bit MII.
//
// While rx_dv is high the receiver skips preamble nibbles (0x5) until the
// start-of-frame nibble 0xD, then pairs nibbles into bytes (low nibble
// first) and runs the 32-bit CRC over every byte. A frame's last four bytes
// are its FCS, so the receiver holds five bytes back and releases the oldest
// when a new one completes; when rx_dv falls, the oldest held byte is the
// last data byte (out_eop) and out_good says that the CRC residue is the
// good-frame constant, the frame was at least 64 bytes long and rx_er was
// never raised in it. A frame that ends on half a byte, or has fewer than
// five bytes after its delimiter, ends with an out_err pulse instead.
//
// Interface: rx_dv, rxd and rx_er are sampled on cycles with nib_en high;
// the byte output (out_valid with out_data, out_sop, out_eop, out_good) is
// a one-cycle pulse, at most one per two nibble times, with no
// back-pressure. Frames longer than 1518 bytes are passed on; length and
// address filtering are left to software. The frame format is the 802.3
// standard; the byte interface and the error rules are this design's own.
module eth_mac_rx
  import eth_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       nib_en,
  input  logic       rx_dv,
  input  logic [3:0] rxd,
  input  logic       rx_er,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_sop,
  output logic       out_eop,
  output logic       out_good,
  output logic       out_err
);
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_DATA, S_WAIT} state_e;

  state_e      state;
  logic        hi;
  logic [3:0]  lo;
  logic [7:0]  held [5];
  logic [2:0]  nheld;
  logic        started, bad;
  logic [10:0] nbytes;
  logic [31:0] crc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      hi        <= 1'b0;
      lo        <= '0;
      held      <= '{default: '0};
      nheld     <= '0;
      started   <= 1'b0;
      bad       <= 1'b0;
      nbytes    <= '0;
      crc       <= CRC_INIT;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_good  <= 1'b0;
      out_err   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_eop   <= 1'b0;
      out_good  <= 1'b0;
      out_err   <= 1'b0;
      if (nib_en) begin
        unique case (state)
          S_IDLE:
            if (rx_dv) state <= (rxd == 4'h5) ? S_PRE : S_WAIT;
          S_PRE:
            if (!rx_dv)             state <= S_IDLE;
            else if (rxd == 4'hD) begin
              state   <= S_DATA;
              hi      <= 1'b0;
              nheld   <= '0;
              started <= 1'b0;
              bad     <= rx_er;
              nbytes  <= '0;
              crc     <= CRC_INIT;
            end else if (rxd != 4'h5) state <= S_WAIT;
          S_DATA:
            if (!rx_dv) begin
              state <= S_IDLE;
              if (!hi && nheld == 3'd5) begin
                out_valid <= 1'b1;
                out_data  <= held[0];
                out_sop   <= !started;
                out_eop   <= 1'b1;
                out_good  <= crc == CRC_GOOD && nbytes >= 11'd64 && !bad;
              end else if (started || nheld != 3'd0 || hi) begin
                out_err <= 1'b1;
              end
            end else begin
              if (rx_er) bad <= 1'b1;
              hi <= !hi;
              if (!hi) begin
                lo <= rxd;
              end else begin
                logic [7:0] b;
                b = {rxd, lo};
                crc <= crc32_byte(crc, b);
                if (nbytes != '1) nbytes <= nbytes + 1'b1;
                if (nheld == 3'd5) begin
                  out_valid <= 1'b1;
                  out_data  <= held[0];
                  out_sop   <= !started;
                  started   <= 1'b1;
                  held      <= '{held[1], held[2], held[3], held[4], b};
                end else begin
                  held[nheld] <= b;
                  nheld       <= nheld + 1'b1;
                end
              end
            end
          S_WAIT:
            if (!rx_dv) state <= S_IDLE;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
