// tb_security_engine: packets through the DES/TDES engine and its contexts.
//
// Four contexts are written: DES encrypt, DES with another key, TDES decrypt
// with k1 = k2 (which reduces to DES decryption under k3), and TDES encrypt
// with three different keys. Packets use the published DES vectors
// (133457799BBCDFF1: 0123456789ABCDEF <-> 85E813540F0AB405;
// 0E329232EA6D0D73: 8787878787878787 -> 0000000000000000), one uses the
// per-packet operation override, and a TDES packet is encrypted and then
// decrypted through the engine to get the plaintext back. Output words,
// sop and eop are compared; the spacing of input blocks with a ready sink
// must be 21 cycles for DES and 53 for TDES (about 305 and 121 Mbit/s at
// 100 MHz). One packet runs with a randomly stalling sink.
module tb_security_engine;
  import cp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ctx_we = 0, in_valid = 0, in_sop = 0, in_eop = 0, in_op_valid = 0, out_ready = 1;
  logic [3:0] ctx_idx, in_ctx;
  sec_ctx_t ctx_wdata;
  sec_op_t in_op;
  logic [31:0] in_data, out_data;
  logic in_ready, out_valid, out_sop, out_eop;
  int checks = 0, failures = 0;
  logic random_sink = 0;

  security_engine dut (.*);

  always #5 clk = ~clk;

  // output capture
  logic [31:0] ow [$];
  logic        osop [$], oeop [$];
  always @(posedge clk) begin
    if (out_valid && out_ready) begin ow.push_back(out_data); osop.push_back(out_sop); oeop.push_back(out_eop); end
  end
  always @(negedge clk) out_ready = random_sink ? 1'($urandom) : 1'b1;

  // cycle stamps of accepted first words of blocks
  int cyc = 0;
  int acc_stamp [$];
  logic odd = 0;
  always @(posedge clk) begin
    cyc++;
    if (in_valid && in_ready) begin
      if (!odd) acc_stamp.push_back(cyc);
      odd <= !odd;
    end
  end

  task automatic set_ctx(int i, logic t, logic d, logic [63:0] a, b, c);
    @(negedge clk); ctx_we = 1; ctx_idx = 4'(i);
    ctx_wdata.op.tdes = t; ctx_wdata.op.decrypt = d; ctx_wdata.k1 = a; ctx_wdata.k2 = b; ctx_wdata.k3 = c;
    @(negedge clk); ctx_we = 0;
  endtask

  task automatic send(int ctx, logic ov, sec_op_t op, logic [31:0] w [$]);
    for (int i = 0; i < w.size(); i++) begin
      @(negedge clk);
      in_valid = 1; in_data = w[i]; in_sop = (i == 0); in_eop = (i == w.size() - 1);
      in_ctx = 4'(ctx); in_op_valid = ov; in_op = op;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask

  task automatic expect_out(string what, logic [31:0] w [$]);
    int guard = 0;
    while (ow.size() < w.size() && guard < 2000) begin @(negedge clk); guard++; end
    checks++;
    if (ow.size() != w.size()) begin failures++; $display("FAIL %s: %0d words", what, ow.size()); end
    for (int i = 0; i < w.size() && i < ow.size(); i++) begin
      checks += 3;
      if (ow[i] != w[i]) begin failures++; $display("FAIL %s word %0d: %h exp %h", what, i, ow[i], w[i]); end
      if (osop[i] != (i == 0)) begin failures++; $display("FAIL %s sop %0d", what, i); end
      if (oeop[i] != (i == w.size() - 1)) begin failures++; $display("FAIL %s eop %0d", what, i); end
    end
    ow.delete(); osop.delete(); oeop.delete();
  endtask

  localparam logic [63:0] K  = 64'h133457799BBCDFF1;
  localparam logic [63:0] K2 = 64'h0E329232EA6D0D73;

  initial begin
    sec_op_t none, dec;
    logic [31:0] ct [$];
    none = '0; dec = '{tdes: 1'b0, decrypt: 1'b1};
    repeat (2) @(negedge clk);
    rst_n = 1;
    set_ctx(0, 0, 0, K, 0, 0);
    set_ctx(1, 0, 0, K2, 0, 0);
    set_ctx(5, 1, 1, 64'h1111222233334444, 64'h1111222233334444, K);
    set_ctx(9, 1, 0, 64'h0123456789ABCDEF, 64'hFEDCBA9876543210, 64'h89ABCDEF01234567);
    // DES encrypt, two blocks, block spacing 21 cycles
    acc_stamp.delete();
    send(0, 0, none, '{32'h01234567, 32'h89ABCDEF, 32'h01234567, 32'h89ABCDEF});
    expect_out("DES enc", '{32'h85E81354, 32'h0F0AB405, 32'h85E81354, 32'h0F0AB405});
    checks++;
    if (acc_stamp.size() != 2 || acc_stamp[1] - acc_stamp[0] != 21) begin
      failures++; $display("FAIL DES block spacing %p", acc_stamp);
    end
    // second context
    send(1, 0, none, '{32'h87878787, 32'h87878787});
    expect_out("DES ctx1", '{32'h0, 32'h0});
    // TDES decrypt context, reduces to DES decrypt with K
    acc_stamp.delete();
    send(5, 0, none, '{32'h85E81354, 32'h0F0AB405, 32'h85E81354, 32'h0F0AB405});
    expect_out("TDES dec", '{32'h01234567, 32'h89ABCDEF, 32'h01234567, 32'h89ABCDEF});
    checks++;
    if (acc_stamp.size() != 2 || acc_stamp[1] - acc_stamp[0] != 53) begin
      failures++; $display("FAIL TDES block spacing %p", acc_stamp);
    end
    // per-packet override: decrypt with context 0's key
    send(0, 1, dec, '{32'h85E81354, 32'h0F0AB405});
    expect_out("override", '{32'h01234567, 32'h89ABCDEF});
    // TDES round trip with three keys and a stalling sink
    random_sink = 1;
    send(9, 0, none, '{32'hDEADBEEF, 32'h00C0FFEE, 32'h12345678, 32'h9ABCDEF0});
    begin
      int guard = 0;
      while (ow.size() < 4 && guard < 2000) begin @(negedge clk); guard++; end
    end
    ct = ow;
    ow.delete(); osop.delete(); oeop.delete();
    checks++;
    if (ct.size() != 4 || ct[0] == 32'hDEADBEEF) begin failures++; $display("FAIL TDES enc produced %p", ct); end
    send(9, 1, '{tdes: 1'b1, decrypt: 1'b1}, ct);
    expect_out("TDES round trip", '{32'hDEADBEEF, 32'h00C0FFEE, 32'h12345678, 32'h9ABCDEF0});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
