// eth_mac_tx: 802.3 MAC transmitter on a 4-bit MII.
//
// A frame given as bytes with sop..eop goes out as the preamble (seven
// 0x55 bytes) and the start-of-frame delimiter 0xD5, the bytes themselves
// (low nibble first), zero padding up to 60 bytes, the 32-bit FCS and an
// idle gap of 96 bit times before the next frame may start. If the next
// byte of a frame is late, the MAC raises tx_er for one nibble, drops
// tx_en (tx_abort pulses) and discards the rest of that frame.
//
// Interface: in_valid/in_ready hand over one byte into a one-byte holding
// register, so the source has a byte time to supply the next. tx_en, txd
// and tx_er change on cycles with nib_en high; nib_en sets the line rate
// (every 4 cycles at 100 MHz for 100 Mbit/s, every 40 for 10 Mbit/s).
// A byte offered without sop while idle is dropped. The frame format is
// the 802.3 standard; the byte interface and the underrun rule are this
// design's own.
module eth_mac_tx
  import eth_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       nib_en,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  input  logic       in_sop,
  input  logic       in_eop,
  output logic       tx_en,
  output logic [3:0] txd,
  output logic       tx_er,
  output logic       tx_abort
);
  typedef enum logic [2:0] {S_IDLE, S_PRE, S_DATA, S_PAD, S_FCS, S_IPG, S_DROP} state_e;

  state_e      state;
  logic [4:0]  cnt;          // nibbles within preamble, FCS or gap
  logic        hi;           // second nibble of the current byte
  logic [7:0]  cur;
  logic        cur_eop;
  logic [10:0] nbytes;
  logic [31:0] crc, fcs;
  logic        hold_valid, hold_sop, hold_eop;
  logic [7:0]  hold_data;

  assign in_ready = !hold_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      hi         <= 1'b0;
      cur        <= '0;
      cur_eop    <= 1'b0;
      nbytes     <= '0;
      crc        <= CRC_INIT;
      fcs        <= '0;
      hold_valid <= 1'b0;
      hold_sop   <= 1'b0;
      hold_eop   <= 1'b0;
      hold_data  <= '0;
      tx_en      <= 1'b0;
      txd        <= '0;
      tx_er      <= 1'b0;
      tx_abort   <= 1'b0;
    end else begin
      logic take;
      take     = 1'b0;
      tx_abort <= 1'b0;
      if (nib_en) begin
        tx_er <= 1'b0;
        unique case (state)
          S_IDLE: begin
            tx_en <= 1'b0;
            if (hold_valid && hold_sop) begin
              state  <= S_PRE;
              cnt    <= '0;
              nbytes <= '0;
              crc    <= CRC_INIT;
              hi     <= 1'b0;
            end else if (hold_valid) begin
              take = 1'b1;                    // stray byte
            end
          end
          S_PRE: begin
            tx_en <= 1'b1;
            txd   <= (cnt == 5'(PRE_NIBS - 1)) ? 4'hD : 4'h5;
            cnt   <= cnt + 1'b1;
            if (cnt == 5'(PRE_NIBS - 1)) state <= S_DATA;
          end
          S_DATA: begin
            if (!hi) begin
              if (hold_valid) begin
                take = 1'b1;
                cur     <= hold_data;
                cur_eop <= hold_eop;
                crc     <= crc32_byte(crc, hold_data);
                nbytes  <= nbytes + 1'b1;
                txd     <= hold_data[3:0];
                hi      <= 1'b1;
              end else begin              // underrun
                tx_er    <= 1'b1;
                tx_abort <= 1'b1;
                state    <= S_DROP;
              end
            end else begin
              txd <= cur[7:4];
              hi  <= 1'b0;
              if (cur_eop) begin
                if (nbytes < 11'(MIN_DATA)) state <= S_PAD;
                else begin
                  state <= S_FCS;
                  fcs   <= ~crc;
                  cnt   <= '0;
                end
              end
            end
          end
          S_PAD: begin
            txd <= 4'h0;
            hi  <= !hi;
            if (!hi) begin
              crc    <= crc32_byte(crc, 8'h00);
              nbytes <= nbytes + 1'b1;
            end else if (nbytes == 11'(MIN_DATA)) begin
              state <= S_FCS;
              fcs   <= ~crc;
              cnt   <= '0;
            end
          end
          S_FCS: begin
            txd <= fcs[3:0];
            fcs <= fcs >> 4;
            cnt <= cnt + 1'b1;
            if (cnt == 5'd7) begin
              state <= S_IPG;
              cnt   <= '0;
            end
          end
          S_IPG: begin
            tx_en <= 1'b0;
            cnt   <= cnt + 1'b1;
            if (cnt == 5'(IPG_NIBS - 1)) state <= S_IDLE;
          end
          S_DROP: begin
            tx_en <= 1'b0;
            if (hold_valid) begin
              take = 1'b1;
              if (hold_eop) begin
                state <= S_IPG;
                cnt   <= '0;
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
      if (take) hold_valid <= 1'b0;
      if (in_valid && !hold_valid) begin
        hold_valid <= 1'b1;
        hold_data  <= in_data;
        hold_sop   <= in_sop;
        hold_eop   <= in_eop;
      end
    end
  end

endmodule
