// hdlc_pkg: constants and the frame check sequence of the HDLC port.
//
// The FCS is the 16-bit CRC of ISO/IEC 13239 (polynomial x^16+x^12+x^5+1,
// bit-reversed form 0x8408, preset to all ones, complemented, sent least
// significant byte first). Running the receiver's CRC over data and FCS
// leaves the constant FCS_GOOD when the frame is intact.
package hdlc_pkg;
  localparam logic [7:0]  FLAG     = 8'h7E;
  localparam logic [15:0] FCS_INIT = 16'hFFFF;
  localparam logic [15:0] FCS_GOOD = 16'hF0B8;

  function automatic logic [15:0] fcs_bit(input logic [15:0] crc, input logic b);
    logic fb;
    fb = crc[0] ^ b;
    crc = crc >> 1;
    if (fb) crc = crc ^ 16'h8408;
    return crc;
  endfunction

  function automatic logic [15:0] fcs_byte(input logic [15:0] crc, input logic [7:0] d);
    for (int i = 0; i < 8; i++) crc = fcs_bit(crc, d[i]);
    return crc;
  endfunction
endpackage
