// atm_sar_tx: AAL5 segmentation, frame bytes in, ATM cells out.
//
// The bytes of a frame (sop..eop, with the virtual circuit number in_vc on
// the first byte) are gathered into a 48-byte cell buffer while the AAL5
// CRC runs over them. Each full buffer is sent as a cell. After the last
// byte the buffer is padded with zeros so that the 8-byte trailer (UU = 0,
// CPI = 0, length, CRC) ends a cell; if fewer than 8 bytes are left, the
// padding fills this cell and the trailer goes into one more. The last cell
// has PTI bit 0 set. A circuit in AAL0 mode (in_aal0 at the first byte)
// carries raw cells instead: the frame is cut into 48-byte payloads, the
// last one zero-padded, with no trailer, no CRC and PTI 0.
//
// Interface: in_valid/in_ready take one byte per cycle while a cell is
// being filled; the cell goes out on out_valid/out_ready as 53 bytes with
// out_soc on the first, and takes the header fields hdr_vpi/hdr_vci of the
// frame's circuit (looked up by the wrapper from tx_vc). One cell at a time
// is buffered, so input stalls while a cell is sent. The cell format is the
// ATM standard; the interfaces are this design's own.
module atm_sar_tx
  import atm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_data,
  input  logic        in_sop,
  input  logic        in_eop,
  input  logic [4:0]  in_vc,
  input  logic        in_aal0,     // mode of circuit in_vc
  output logic [4:0]  tx_vc,       // circuit of the frame being sent
  input  logic [7:0]  hdr_vpi,
  input  logic [15:0] hdr_vci,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  output logic        out_soc
);
  typedef enum logic [2:0] {S_FILL, S_PAD, S_TRAILER, S_SEND} state_e;

  state_e      state, after_send;
  logic [7:0]  buf_q [PAYLOAD];
  logic [5:0]  pos;           // bytes in the cell buffer
  logic [5:0]  opos;          // byte of the cell being sent
  logic [31:0] crc;
  logic [15:0] len;
  logic        last_cell;
  logic [2:0]  tpos;
  logic [31:0] hdr;
  logic        in_frame;
  logic        raw, raw_now;

  assign in_ready = state == S_FILL && pos != 6'(PAYLOAD);
  assign hdr      = {4'h0, hdr_vpi, hdr_vci, 2'b00, last_cell, 1'b0};
  assign raw_now  = in_sop ? in_aal0 : raw;

  always_comb begin
    out_valid = state == S_SEND;
    out_soc   = state == S_SEND && opos == '0;
    if (opos < 6'd4)       out_data = hdr[31 - 8 * opos -: 8];
    else if (opos == 6'd4) out_data = hec(hdr);
    else                   out_data = buf_q[opos - 6'd5];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_FILL;
      after_send <= S_FILL;
      buf_q      <= '{default: '0};
      pos        <= '0;
      opos       <= '0;
      crc        <= CRC_INIT;
      len        <= '0;
      last_cell  <= 1'b0;
      tpos       <= '0;
      tx_vc      <= '0;
      in_frame   <= 1'b0;
      raw        <= 1'b0;
    end else begin
      unique case (state)
        S_FILL:
          if (in_valid && in_ready) begin
            if (in_sop || in_frame) begin
              logic [31:0] c;
              logic [15:0] l;
              c = in_sop ? crc32_byte(CRC_INIT, in_data) : crc32_byte(crc, in_data);
              l = in_sop ? 16'd1 : len + 1'b1;
              if (in_sop) begin
                tx_vc <= in_vc;
                raw   <= in_aal0;
              end
              buf_q[pos] <= in_data;
              crc        <= c;
              len        <= l;
              in_frame   <= !in_eop;
              if (in_eop) begin
                state <= (pos + 1'b1 == 6'd40 && !raw_now) ? S_TRAILER : S_PAD;
                tpos  <= '0;
                pos   <= pos + 1'b1;
              end else if (pos == 6'(PAYLOAD - 1)) begin
                state      <= S_SEND;
                after_send <= S_FILL;
                last_cell  <= 1'b0;
                opos       <= '0;
                pos        <= '0;
              end else begin
                pos <= pos + 1'b1;
              end
            end
          end
        S_PAD: begin
          if (pos == 6'(PAYLOAD)) begin          // no room for the trailer
            state      <= S_SEND;
            after_send <= raw ? S_FILL : S_PAD;
            last_cell  <= 1'b0;
            opos       <= '0;
            pos        <= '0;
          end else begin
            buf_q[pos] <= 8'h00;
            crc        <= crc32_byte(crc, 8'h00);
            pos        <= pos + 1'b1;
            if (pos == 6'd39 && !raw) state <= S_TRAILER;
          end
        end
        S_TRAILER: begin
          logic [7:0] b;
          unique case (tpos)
            3'd0, 3'd1: b = 8'h00;
            3'd2:       b = len[15:8];
            3'd3:       b = len[7:0];
            3'd4:       b = ~crc[31:24];
            3'd5:       b = ~crc[23:16];
            3'd6:       b = ~crc[15:8];
            default:    b = ~crc[7:0];
          endcase
          buf_q[pos] <= b;
          if (tpos < 3'd4) crc <= crc32_byte(crc, b);
          pos  <= pos + 1'b1;
          tpos <= tpos + 1'b1;
          if (tpos == 3'd7) begin
            state      <= S_SEND;
            after_send <= S_FILL;
            last_cell  <= 1'b1;
            opos       <= '0;
            pos        <= '0;
          end
        end
        S_SEND:
          if (out_ready) begin
            opos <= opos + 1'b1;
            if (opos == 6'(CELL_BYTES - 1)) state <= after_send;
          end
        default: state <= S_FILL;
      endcase
    end
  end

endmodule
