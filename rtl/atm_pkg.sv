// atm_pkg: cell format and check codes of the ATM / AAL5 port.
//
// A cell is 53 bytes: a 5-byte header (GFC 4 bits, VPI 8, VCI 16, PTI 3,
// CLP 1, then the HEC) and 48 payload bytes. The HEC is the CRC-8 of the
// first four header bytes (polynomial x^8+x^2+x+1, most significant bit
// first) XORed with 0x55 (ITU-T I.432). An AAL5 frame is the data, zero
// padding and an 8-byte trailer (UU, CPI, 16-bit length, CRC-32) filling a
// whole number of cells; the last cell has PTI bit 0 set. The AAL5 CRC-32
// uses polynomial 0x04C11DB7 most significant bit first, preset to all
// ones, sent complemented, most significant byte first; run over a whole
// intact frame it leaves CRC_GOOD.
package atm_pkg;
  localparam int          CELL_BYTES  = 53;
  localparam int          PAYLOAD     = 48;
  localparam int          NVC         = 32;
  localparam logic [31:0] CRC_INIT    = 32'hFFFF_FFFF;
  localparam logic [31:0] CRC_GOOD    = 32'hC704_DD7B;

  function automatic logic [7:0] hec(input logic [31:0] h);
    logic [7:0] c;
    c = '0;
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[7] ^ h[i];
      c  = {c[6:0], 1'b0};
      if (fb) c = c ^ 8'h07;
    end
    return c ^ 8'h55;
  endfunction

  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] d);
    for (int i = 7; i >= 0; i--) begin
      logic fb;
      fb  = crc[31] ^ d[i];
      crc = {crc[30:0], 1'b0};
      if (fb) crc = crc ^ 32'h04C1_1DB7;
    end
    return crc;
  endfunction
endpackage
