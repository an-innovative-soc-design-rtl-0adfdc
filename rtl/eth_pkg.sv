// eth_pkg: constants and frame check sequence of the 802.3 MACs.
//
// The FCS is the 32-bit CRC of IEEE 802.3 (polynomial 0x04C11DB7, used here
// in its bit-reversed form 0xEDB88320 because bytes go out least significant
// bit first), preset to all ones and sent complemented, least significant
// byte first. Running the receiver's CRC over data and FCS leaves the
// constant CRC_GOOD when the frame is intact.
package eth_pkg;
  localparam logic [31:0] CRC_INIT   = 32'hFFFF_FFFF;
  localparam logic [31:0] CRC_GOOD   = 32'hDEBB_20E3;
  localparam int          MIN_DATA   = 60;   // bytes before the FCS
  localparam int          PRE_NIBS   = 16;   // 7 preamble bytes + SFD
  localparam int          IPG_NIBS   = 24;   // 96 bit times

  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] d);
    for (int i = 0; i < 8; i++) begin
      logic fb;
      fb  = crc[0] ^ d[i];
      crc = crc >> 1;
      if (fb) crc = crc ^ 32'hEDB8_8320;
    end
    return crc;
  endfunction
endpackage
