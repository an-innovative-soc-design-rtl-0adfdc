// hdlc_rx: HDLC frame receiver (bit-synchronous, one bit per bit_en).
//
// The receiver counts consecutive 1s on the line: a 0 after five 1s is a
// stuffed bit and is removed, a 0 after six 1s ends a flag, and seven 1s are
// an abort. The other bits are gathered, least significant first, into
// bytes, and the CRC runs over every complete byte. Because a frame's last
// two bytes are its FCS, the receiver holds three bytes back and releases
// the oldest when a new one completes; when the closing flag arrives the
// oldest held byte is the last data byte (out_eop) and out_fcs_ok tells
// whether the CRC residue is the good-frame constant. A frame that ends off
// a byte boundary, is shorter than three bytes, or is aborted after some of
// its bytes were received ends with an out_err pulse instead. Flags between
// frames are ignored.
//
// Interface: rx_bit is sampled on cycles with bit_en high; the byte output
// (out_valid with out_data, out_sop, out_eop, out_fcs_ok) is a one-cycle
// pulse, at most one per eight bit times, with no back-pressure.
module hdlc_rx
  import hdlc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_en,
  input  logic       rx_bit,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_sop,
  output logic       out_eop,
  output logic       out_fcs_ok,
  output logic       out_err
);
  logic [2:0]  ones;          // saturates at 7
  logic        in_frame;
  logic [7:0]  sh;
  logic [3:0]  nbit;
  logic [15:0] crc;
  logic [7:0]  held [3];
  logic [1:0]  nheld;
  logic        started;       // a byte of this frame has been released

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ones       <= '0;
      in_frame   <= 1'b0;
      sh         <= '0;
      nbit       <= '0;
      crc        <= FCS_INIT;
      held       <= '{default: '0};
      nheld      <= '0;
      started    <= 1'b0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_sop    <= 1'b0;
      out_eop    <= 1'b0;
      out_fcs_ok <= 1'b0;
      out_err    <= 1'b0;
    end else begin
      out_valid  <= 1'b0;
      out_eop    <= 1'b0;
      out_fcs_ok <= 1'b0;
      out_err    <= 1'b0;
      if (bit_en) begin
        logic append;
        append = 1'b0;
        if (rx_bit) begin
          if (ones == 3'd6) begin             // abort
            ones     <= 3'd7;
            if (in_frame && (started || nheld != 2'd0)) out_err <= 1'b1;
            in_frame <= 1'b0;
          end else if (ones != 3'd7) begin
            ones   <= ones + 1'b1;
            append = ones < 3'd5;
          end
        end else begin
          ones <= '0;
          if (ones == 3'd5) begin
            // stuffed zero: dropped
          end else if (ones == 3'd6) begin    // flag
            if (in_frame && nbit == 4'd6 && nheld == 2'd3) begin
              out_valid  <= 1'b1;
              out_data   <= held[0];
              out_sop    <= !started;
              out_eop    <= 1'b1;
              out_fcs_ok <= crc == FCS_GOOD;
            end else if (in_frame && (started || nheld != 2'd0)) begin
              out_err <= 1'b1;
            end
            in_frame <= 1'b1;
            nbit     <= '0;
            nheld    <= '0;
            crc      <= FCS_INIT;
            started  <= 1'b0;
          end else begin
            append = 1'b1;
          end
        end
        if (append && in_frame) begin
          logic [7:0] byte_n;
          byte_n = {rx_bit, sh[7:1]};
          sh <= byte_n;
          if (nbit == 4'd7) begin
            nbit <= '0;
            crc  <= fcs_byte(crc, byte_n);
            if (nheld == 2'd3) begin
              out_valid <= 1'b1;
              out_data  <= held[0];
              out_sop   <= !started;
              started   <= 1'b1;
              held      <= '{held[1], held[2], byte_n};
            end else begin
              held[nheld] <= byte_n;
              nheld       <= nheld + 1'b1;
            end
          end else begin
            nbit <= nbit + 1'b1;
          end
        end
      end
    end
  end

endmodule
