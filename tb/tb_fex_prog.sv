// tb_fex_prog: FEX firmware shared by the header processor and top-level
// testbenches.
//
// five_tuple() returns a 12-instruction program that checks the IP version
// (anything but 4 ends with an empty key), reads the header length, and
// sends protocol (8 bits), source and destination address (32 + 32) and
// the two ports (16 + 16) to the key: a 104-bit key. For an IPv4 header it
// executes 11 instructions with one taken jump, so the FEX raises done 16
// cycles after start. five_tuple_key() gives the key the classifier should
// build for a header.
package tb_fex_prog;
  import cp_pkg::*;

  function automatic fex_instr_t ins(fex_op_e op, fex_dst_e dst = FEX_DST_A, int n = 0, int b = 0,
                                     int imm = 0, int addr = 0, logic idp = 0);
    fex_instr_t i;
    i = '0;
    i.op = op; i.dst = dst; i.n = 5'(n); i.b = 5'(b); i.imm = 16'(imm);
    i.addr = FEX_PC_W'(addr); i.inc_dp = idp;
    return i;
  endfunction

  localparam int PROG_LEN = 12;

  function automatic fex_instr_t five_tuple(int a);
    case (a)
      0:  return ins(FEX_EXTRACT, FEX_DST_C, 3, 28);
      1:  return ins(FEX_JMP_C, .imm(4), .addr(3));
      2:  return ins(FEX_STR);
      3:  return ins(FEX_EXTRACT, FEX_DST_A, 3, 24, .idp(1));
      4:  return ins(FEX_NOP, .idp(1));
      5:  return ins(FEX_EXTRACT, FEX_DST_KEY, 7, 16, .idp(1));
      6:  return ins(FEX_EXTRACT, FEX_DST_KEY, 31, 0, .idp(1));
      7:  return ins(FEX_EXTRACT, FEX_DST_KEY, 31, 0);
      8:  return ins(FEX_MOV_A);
      9:  return ins(FEX_EXTRACT, FEX_DST_KEY, 15, 16);
      10: return ins(FEX_EXTRACT, FEX_DST_KEY, 15, 0);
      default: return ins(FEX_STR);
    endcase
  endfunction

  // IPv4 header words 0..5 (IHL 5) for a 5-tuple
  function automatic logic [31:0] ipv4_word(int w, logic [7:0] proto, logic [31:0] src, dst,
                                            logic [15:0] sp, dp);
    case (w)
      0: return 32'h4500_0054;
      1: return 32'h0000_4000;
      2: return {8'd64, proto, 16'h0000};
      3: return src;
      4: return dst;
      default: return {sp, dp};
    endcase
  endfunction

  function automatic logic [CLS_KEY_W-1:0] five_tuple_key(logic [7:0] proto, logic [31:0] src, dst,
                                                         logic [15:0] sp, dp);
    return CLS_KEY_W'({proto, src, dst, sp, dp});
  endfunction
endpackage
