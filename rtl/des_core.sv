// des_core: iterative DES / triple-DES block cipher, one round per cycle.
//
// 'start' loads a 64-bit block, three 64-bit keys and the operation. A DES
// pass runs the 16 Feistel rounds of the standard, one per clock, with the
// round key produced on the fly by rotating the C/D key halves left
// (encryption) or right (decryption). Triple DES is the usual EDE
// construction: encrypt with k1, decrypt with k2, encrypt with k3, and for
// decryption the reverse (decrypt k3, encrypt k2, decrypt k1). Since the
// final permutation of one pass and the initial permutation of the next
// cancel, the passes follow each other without extra cycles.
//
// Timing: 'done' pulses 17 cycles after 'start' for DES and 49 for TDES
// (one load cycle, then one cycle per round),
// with 'result' valid from then until the next start. 'busy' is high in
// between; a start while busy is ignored. Single DES uses k1. The
// round-per-cycle structure is this design's choice; the document only
// asks for DES and TDES at up to 80 Mbps, which this exceeds at 100 MHz.
module des_core
  import des_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        tdes,
  input  logic        decrypt,
  input  logic [63:0] k1,
  input  logic [63:0] k2,
  input  logic [63:0] k3,
  input  logic [63:0] block_in,
  output logic        busy,
  output logic        done,
  output logic [63:0] result
);
  logic [31:0] l, r;
  logic [55:0] cd;
  logic [3:0]  round;
  logic [1:0]  pass;
  logic        last_pass;
  logic        pass_dec;        // this pass decrypts
  logic        op_tdes, op_dec;
  logic [63:0] key1, key2, key3;

  // direction of pass p: DES: op; TDES: E-D-E or D-E-D
  function automatic logic pass_is_dec(input logic dec, input logic [1:0] p);
    return (p == 2'd1) ? !dec : dec;
  endfunction

  // key of pass p
  function automatic logic [63:0] pass_key(input logic t, input logic dec, input logic [1:0] p,
                                           input logic [63:0] a, input logic [63:0] b,
                                           input logic [63:0] c);
    if (!t)          return a;
    if (p == 2'd1)   return b;
    if (p == 2'd0)   return dec ? c : a;
    return dec ? a : c;
  endfunction

  // round key and next state of the current round
  logic [55:0] cd_use;
  logic [47:0] rkey;
  logic [31:0] r_new;
  always_comb begin
    if (!pass_dec)        cd_use = des_rotl(cd, SHIFT_T[round]);
    else if (round == 0)  cd_use = cd;
    else                  cd_use = des_rotr(cd, SHIFT_T[16 - int'(round)]);
    rkey  = des_pc2(cd_use);
    r_new = l ^ des_f(r, rkey);
  end

  assign pass_dec  = pass_is_dec(op_dec, pass);
  assign last_pass = !op_tdes || pass == 2'd2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      result  <= '0;
      l       <= '0;
      r       <= '0;
      cd      <= '0;
      round   <= '0;
      pass    <= '0;
      op_tdes <= 1'b0;
      op_dec  <= 1'b0;
      key1    <= '0;
      key2    <= '0;
      key3    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          logic [63:0] ipb;
          ipb     = des_ip(block_in);
          busy    <= 1'b1;
          l       <= ipb[63:32];
          r       <= ipb[31:0];
          cd      <= des_pc1(pass_key(tdes, decrypt, 2'd0, k1, k2, k3));
          round   <= '0;
          pass    <= '0;
          op_tdes <= tdes;
          op_dec  <= decrypt;
          key1    <= k1;
          key2    <= k2;
          key3    <= k3;
        end
      end else begin
        round <= round + 1'b1;
        if (round != 4'd15) begin
          l  <= r;
          r  <= r_new;
          cd <= cd_use;
        end else if (!last_pass) begin
          // end of a pass: the pre-output R16||L16 is the next pass's L0||R0
          l     <= r_new;
          r     <= r;
          cd    <= des_pc1(pass_key(op_tdes, op_dec, pass + 2'd1, key1, key2, key3));
          pass  <= pass + 2'd1;
        end else begin
          busy   <= 1'b0;
          done   <= 1'b1;
          result <= des_fp({r_new, r});
        end
      end
    end
  end

endmodule
