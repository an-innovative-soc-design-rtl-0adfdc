// atm_sar_rx: ATM cell reception and AAL5 reassembly for 32 circuits.
//
// Cells come in as 53 bytes, in_soc marking the first. After the four
// header bytes and the HEC the cell is checked: a wrong HEC or a VPI/VCI not
// in the circuit table drops the cell (hec_err / unknown pulse). Each
// circuit keeps its own running CRC and byte count, so frames on different
// circuits may be interleaved cell by cell. Padding may begin up to 7 bytes
// before the end of a cell that is not the last (when fewer than 8 bytes
// are left for the trailer), so the last 7 bytes of such a cell are held
// per circuit; the first 41 are passed on as they arrive, and the held
// bytes go out at the start of the next non-last cell of the circuit (the
// input stalls for those 7 cycles). The last cell (PTI bit 0) is kept until
// its trailer is in, because only the trailer's length tells how many of
// the held and new bytes are data; those go out, then a frame-end word
// with the length and a good flag (CRC residue right, length consistent).
// A circuit in AAL0 mode takes each cell as a frame of its own: the 48
// payload bytes go out as they arrive, then an end word with length 48 and
// the good flag set.
//
// Interface: in_valid/in_ready/in_data/in_soc, one byte per cycle; in_ready
// drops while held bytes or a last cell are being passed on. Output:
// out_valid with either a data byte (out_end = 0, out_sop on the frame's first byte) or a
// frame-end word (out_end = 1, out_good, out_len); out_vc gives the circuit.
// There is no back-pressure on the output; the port FIFO behind it is
// sized for bursts. The cell format and the AAL5 rules are the ATM
// standard; the interfaces are this design's own.
module atm_sar_rx
  import atm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [NVC-1:0]  vc_en,
  input  logic [7:0]      vc_vpi [NVC],
  input  logic [15:0]     vc_vci [NVC],
  input  logic [NVC-1:0]  vc_aal0,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_data,
  input  logic        in_soc,
  output logic        out_valid,
  output logic [7:0]  out_data,
  output logic        out_sop,
  output logic        out_end,
  output logic        out_good,
  output logic [15:0] out_len,
  output logic [4:0]  out_vc,
  output logic        hec_err,
  output logic        unknown
);
  typedef enum logic [2:0] {S_HDR, S_HELD, S_BODY, S_SKIP, S_FLUSH, S_RAWEND} state_e;
  localparam int HOLD = 7;

  state_e      state;
  logic [31:0] hdr;
  logic [5:0]  cnt;              // header bytes, then payload bytes
  logic [4:0]  vc;
  logic        last;
  logic        raw;
  logic [31:0] crc_q [NVC];
  logic [15:0] len_q [NVC];
  logic [7:0]  buf_q [PAYLOAD];
  logic [7:0]  hold_q [NVC][HOLD];
  logic [31:0] crc;
  logic [15:0] len;
  logic [5:0]  fpos;
  logic        hit;
  logic [4:0]  hit_vc;
  logic [15:0] tr_len;

  always_comb begin
    hit    = 1'b0;
    hit_vc = '0;
    for (int i = NVC - 1; i >= 0; i--)
      if (vc_en[i] && vc_vpi[i] == hdr[27:20] && vc_vci[i] == hdr[19:4]) begin
        hit    = 1'b1;
        hit_vc = 5'(i);
      end
  end

  assign in_ready = state != S_FLUSH && state != S_HELD && state != S_RAWEND;
  assign tr_len   = {buf_q[42], buf_q[43]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_HDR;
      hdr       <= '0;
      cnt       <= '0;
      vc        <= '0;
      last      <= 1'b0;
      raw       <= 1'b0;
      crc_q     <= '{default: CRC_INIT};
      len_q     <= '{default: '0};
      buf_q     <= '{default: '0};
      hold_q    <= '{default: '0};
      crc       <= CRC_INIT;
      len       <= '0;
      fpos      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sop   <= 1'b0;
      out_end   <= 1'b0;
      out_good  <= 1'b0;
      out_len   <= '0;
      out_vc    <= '0;
      hec_err   <= 1'b0;
      unknown   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_end   <= 1'b0;
      out_good  <= 1'b0;
      hec_err   <= 1'b0;
      unknown   <= 1'b0;
      if (in_valid && in_ready && in_soc && state != S_HDR) begin
        // a cell cut short: start over on the new one
        state <= S_HDR;
        hdr   <= {hdr[23:0], in_data};
        cnt   <= 6'd1;
      end else unique case (state)
        S_HDR:
          if (in_valid) begin
            if (in_soc) cnt <= 6'd1;
            else if (cnt != '0) cnt <= cnt + 1'b1;
            if (in_soc || (cnt != '0 && cnt < 6'd4)) hdr <= {hdr[23:0], in_data};
            if (cnt == 6'd4 && !in_soc) begin
              cnt <= '0;
              if (hec(hdr) != in_data) begin
                hec_err <= 1'b1;
                state   <= S_SKIP;
              end else if (!hit) begin
                unknown <= 1'b1;
                state   <= S_SKIP;
              end else begin
                vc    <= hit_vc;
                raw   <= vc_aal0[hit_vc];
                last  <= hdr[1] && !vc_aal0[hit_vc];
                crc   <= crc_q[hit_vc];
                len   <= len_q[hit_vc];
                fpos  <= '0;
                state <= (!hdr[1] && !vc_aal0[hit_vc] && len_q[hit_vc] != '0) ?
                         S_HELD : S_BODY;
              end
            end
          end
        S_HELD: begin
          out_valid <= 1'b1;
          out_data  <= hold_q[vc][fpos[2:0]];
          out_vc    <= vc;
          fpos      <= fpos + 1'b1;
          if (fpos == 6'(HOLD - 1)) state <= S_BODY;
        end
        S_BODY:
          if (in_valid && raw) begin
            out_valid <= 1'b1;
            out_data  <= in_data;
            out_sop   <= cnt == '0;
            out_vc    <= vc;
            cnt       <= cnt + 1'b1;
            if (cnt == 6'(PAYLOAD - 1)) begin
              cnt   <= '0;
              state <= S_RAWEND;
            end
          end else if (in_valid) begin
            logic [31:0] c;
            c = crc32_byte(crc, in_data);
            crc          <= c;
            buf_q[cnt]   <= in_data;
            cnt          <= cnt + 1'b1;
            if (!last && cnt >= 6'(PAYLOAD - HOLD))
              hold_q[vc][3'(cnt - 6'(PAYLOAD - HOLD))] <= in_data;
            if (!last && cnt < 6'(PAYLOAD - HOLD)) begin
              out_valid <= 1'b1;
              out_data  <= in_data;
              out_sop   <= len == '0 && cnt == '0;
              out_vc    <= vc;
            end
            if (cnt == 6'(PAYLOAD - 1)) begin
              cnt <= '0;
              if (!last) begin
                crc_q[vc] <= c;
                len_q[vc] <= len + 16'(PAYLOAD);
                state     <= S_HDR;
              end else begin
                crc_q[vc] <= CRC_INIT;
                len_q[vc] <= '0;
                crc       <= c;
                fpos      <= '0;
                state     <= S_FLUSH;
              end
            end
          end
        S_SKIP:
          if (in_valid) begin
            cnt <= cnt + 1'b1;
            if (cnt == 6'(PAYLOAD - 1)) begin
              cnt   <= '0;
              state <= S_HDR;
            end
          end
        S_FLUSH: begin
          // data left: the length minus what has gone out; the held bytes
          // of the previous cell come first, then this cell's
          logic        ok_len;
          logic [15:0] sent, here;
          logic [5:0]  held;
          held   = len == '0 ? 6'd0 : 6'(HOLD);
          sent   = len - 16'(held);
          here   = tr_len - sent;
          ok_len = tr_len >= sent && here <= 16'(held) + 16'd40;
          if (ok_len && 16'(fpos) < here) begin
            out_valid <= 1'b1;
            out_data  <= fpos < held ? hold_q[vc][fpos[2:0]] : buf_q[fpos - held];
            out_sop   <= len == '0 && fpos == '0;
            out_vc    <= vc;
            fpos      <= fpos + 1'b1;
          end else begin
            out_valid <= 1'b1;
            out_end   <= 1'b1;
            out_data  <= '0;
            out_good  <= ok_len && crc == CRC_GOOD && tr_len != '0;
            out_len   <= tr_len;
            out_vc    <= vc;
            state     <= S_HDR;
          end
        end
        S_RAWEND: begin
          out_valid <= 1'b1;
          out_end   <= 1'b1;
          out_data  <= '0;
          out_good  <= 1'b1;
          out_len   <= 16'(PAYLOAD);
          out_vc    <= vc;
          state     <= S_HDR;
        end
        default: state <= S_HDR;
      endcase
    end
  end

endmodule
