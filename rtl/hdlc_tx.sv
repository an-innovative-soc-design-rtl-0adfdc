// hdlc_tx: HDLC frame transmitter (bit-synchronous, one bit per bit_en).
//
// Between frames the line carries flags (01111110). A frame is the bytes
// given with sop..eop, least significant bit first, followed by the 16-bit
// FCS and a closing flag (which is also the first idle flag). Inside the
// frame a 0 is inserted after every five consecutive 1s so that no flag
// appears in the data. If the next byte of a frame is not there when it is
// needed, the frame is aborted (eight 1s, tx_abort pulse) and flags resume.
//
// Interface: in_valid/in_ready hand over one byte (a one-byte holding
// register, so the source has a whole byte time to supply the next);
// tx_bit changes on each cycle with bit_en high, which sets the line rate
// (2 Mbit/s in the chip: bit_en every 50 cycles at 100 MHz). A byte offered
// without sop while idle is dropped.
module hdlc_tx
  import hdlc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_en,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  input  logic       in_sop,
  input  logic       in_eop,
  output logic       tx_bit,
  output logic       tx_abort
);
  typedef enum logic [1:0] {S_IDLE, S_DATA, S_FCS, S_ABORT} state_e;

  state_e      state;
  logic [7:0]  sh;
  logic [2:0]  nbit;
  logic [2:0]  ones;
  logic [15:0] crc;
  logic        last, fcs2, pend_stuff;
  logic [7:0]  fcs_hi;
  logic        hold_valid, hold_sop, hold_eop;
  logic [7:0]  hold_data;

  assign in_ready = !hold_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      sh         <= '0;
      nbit       <= '0;
      ones       <= '0;
      crc        <= FCS_INIT;
      last       <= 1'b0;
      fcs2       <= 1'b0;
      fcs_hi     <= '0;
      pend_stuff <= 1'b0;
      hold_valid <= 1'b0;
      hold_sop   <= 1'b0;
      hold_eop   <= 1'b0;
      hold_data  <= '0;
      tx_bit     <= 1'b1;
      tx_abort   <= 1'b0;
    end else begin
      tx_abort <= 1'b0;
      if (in_valid && !hold_valid) begin
        hold_valid <= 1'b1;
        hold_data  <= in_data;
        hold_sop   <= in_sop;
        hold_eop   <= in_eop;
      end
      if (bit_en) begin
        unique case (state)
          S_IDLE: begin
            if (pend_stuff) begin
              tx_bit     <= 1'b0;             // stuffing after the last FCS bit
              pend_stuff <= 1'b0;
            end else begin
              tx_bit <= FLAG[nbit];
              nbit   <= nbit + 1'b1;
              ones   <= '0;
              if (hold_valid && !hold_sop) hold_valid <= 1'b0;   // stray byte
              if (nbit == 3'd7 && hold_valid && hold_sop) begin
                sh         <= hold_data;
                last       <= hold_eop;
                hold_valid <= 1'b0;
                crc        <= FCS_INIT;
                state      <= S_DATA;
              end
            end
          end
          S_DATA, S_FCS: begin
            if (ones == 3'd5) begin
              tx_bit <= 1'b0;
              ones   <= '0;
            end else begin
              logic        b;
              logic [15:0] crc_n;
              logic [2:0]  ones_n;
              b      = sh[nbit];
              crc_n  = (state == S_DATA) ? fcs_bit(crc, b) : crc;
              ones_n = b ? ones + 1'b1 : '0;
              tx_bit <= b;
              ones   <= ones_n;
              crc    <= crc_n;
              nbit   <= nbit + 1'b1;
              if (nbit == 3'd7) begin
                if (state == S_DATA) begin
                  if (last) begin
                    sh     <= ~crc_n[7:0];
                    fcs_hi <= ~crc_n[15:8];
                    fcs2   <= 1'b0;
                    state  <= S_FCS;
                  end else if (hold_valid && !hold_sop) begin
                    sh         <= hold_data;
                    last       <= hold_eop;
                    hold_valid <= 1'b0;
                  end else begin
                    state <= S_ABORT;
                  end
                end else if (!fcs2) begin
                  sh   <= fcs_hi;
                  fcs2 <= 1'b1;
                end else begin
                  state      <= S_IDLE;
                  pend_stuff <= ones_n == 3'd5;
                end
              end
            end
          end
          S_ABORT: begin
            tx_bit <= 1'b1;
            nbit   <= nbit + 1'b1;
            if (nbit == 3'd7) begin
              state    <= S_IDLE;
              tx_abort <= 1'b1;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
