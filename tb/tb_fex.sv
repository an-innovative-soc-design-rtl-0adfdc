// tb_fex: runs a hand-assembled program on the Field Extraction engine.
//
// The program parses an IPv4 header: it checks the version with JMP C, reads
// the header length into A, extracts protocol, addresses and ports to the
// key, walks DP with MOV/ADD A/B and the INC/DEC commands, and takes a
// JMP D. The emitted fields (value and length) are compared with values
// taken from the header by hand, and the number of cycles from start to
// done is compared with the pipeline's timing: done is seen 3 + (number
// of instructions executed) cycles after start, plus 2 per taken jump. A second run
// with a version-6 header must stop at once with no fields. A third run
// holds key_ready low to check that STR stalls.
module tb_fex;
  import cp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic imem_we = 0, din_we = 0, start = 0, key_ready = 1;
  logic [FEX_PC_W-1:0] imem_waddr;
  fex_instr_t imem_wdata;
  logic [5:0] din_addr;
  logic [31:0] din_data;
  logic busy, done, stall, fld_valid, key_clear;
  logic [31:0] fld_data;
  logic [5:0] fld_len;
  int checks = 0, failures = 0;

  fex dut (.*);

  always #5 clk = ~clk;

  function automatic fex_instr_t ins(fex_op_e op, fex_dst_e dst = FEX_DST_A, int n = 0, int b = 0,
                                     int imm = 0, int addr = 0, logic idp = 0, logic ddp = 0,
                                     logic da = 0, logic db = 0);
    fex_instr_t i;
    i = '0;
    i.op = op; i.dst = dst; i.n = 5'(n); i.b = 5'(b); i.imm = 16'(imm);
    i.addr = FEX_PC_W'(addr); i.inc_dp = idp; i.dec_dp = ddp; i.dec_a = da; i.dec_b = db;
    return i;
  endfunction

  task automatic load(int a, fex_instr_t i);
    @(negedge clk); imem_we = 1; imem_waddr = FEX_PC_W'(a); imem_wdata = i;
    @(negedge clk); imem_we = 0;
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); din_we = 1; din_addr = 6'(a); din_data = d;
    @(negedge clk); din_we = 0;
  endtask

  // captured fields
  logic [31:0] got_v [$];
  int          got_l [$];
  int          stalls = 0;
  always @(posedge clk) if (rst_n) begin
    if (fld_valid && !stall) begin got_v.push_back(fld_data); got_l.push_back(int'(fld_len)); end
    if (stall) stalls++;
  end

  task automatic run(output int cyc);
    got_v.delete(); got_l.delete();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  localparam logic [31:0] SRC = 32'hC0A8_0A01, DST = 32'h0A00_0005;

  initial begin
    int cyc;
    logic [31:0] ev [6];
    int el [6];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- program
    load(0,  ins(FEX_EXTRACT, FEX_DST_C, 3, 28));
    load(1,  ins(FEX_JMP_C, .imm(4), .addr(3)));
    load(2,  ins(FEX_STR));
    load(3,  ins(FEX_EXTRACT, FEX_DST_A, 3, 24, .idp(1)));
    load(4,  ins(FEX_NOP, .idp(1)));
    load(5,  ins(FEX_EXTRACT, FEX_DST_KEY, 7, 16, .idp(1)));
    load(6,  ins(FEX_EXTRACT, FEX_DST_KEY, 31, 0, .idp(1)));
    load(7,  ins(FEX_EXTRACT, FEX_DST_KEY, 31, 0));
    load(8,  ins(FEX_MOV_A));
    load(9,  ins(FEX_EXTRACT, FEX_DST_KEY, 15, 16));
    load(10, ins(FEX_EXTRACT, FEX_DST_KEY, 15, 0, .da(1)));
    load(11, ins(FEX_MOV_A, .ddp(1)));
    load(12, ins(FEX_EXTRACT, FEX_DST_D, 15, 0));
    load(13, ins(FEX_JMP_D, .imm(int'(SRC[15:0])), .addr(15)));
    load(14, ins(FEX_EXTRACT, FEX_DST_KEY, 7, 0));
    load(15, ins(FEX_EXTRACT, FEX_DST_B, 1, 0));
    load(16, ins(FEX_ADD_B, .db(1)));
    load(17, ins(FEX_ADD_A));
    load(18, ins(FEX_EXTRACT, FEX_DST_KEY, 31, 0));
    load(19, ins(FEX_STR));
    // ---- IPv4 header, IHL 5, protocol 17 (UDP)
    wr(0, 32'h4500_0054);
    wr(1, 32'h1234_4000);
    wr(2, 32'h4011_BEEF);
    wr(3, SRC);
    wr(4, DST);
    wr(5, 32'h9F90_8035);
    wr(8, 32'hCAFE_F00D);
    run(cyc);
    ev = '{32'h11, SRC, DST, 32'h9F90, 32'h8035, 32'hCAFE_F00D};
    el = '{8, 32, 32, 16, 16, 32};
    chk("field count", got_v.size(), 6);
    for (int k = 0; k < 6 && k < got_v.size(); k++) begin
      chk($sformatf("field %0d value", k), got_v[k], ev[k]);
      chk($sformatf("field %0d length", k), got_l[k], el[k]);
    end
    // 18 instructions executed, 2 taken jumps: 3 + 18 + 2*2
    chk("IPv4 cycles", cyc, 25);
    chk("not busy after STR", busy, 0);
    // ---- version 6: stops at address 2
    wr(0, 32'h6000_0000);
    run(cyc);
    chk("IPv6 fields", got_v.size(), 0);
    chk("IPv6 cycles", cyc, 6);
    // ---- STR held by a busy classifier
    wr(0, 32'h4500_0054);
    key_ready = 0;
    fork
      begin repeat (40) @(negedge clk); key_ready = 1; end
      run(cyc);
    join
    chk("stalled cycles", cyc, 40);
    checks++; if (stalls < 10) begin failures++; $display("FAIL no stall seen"); end
    chk("fields after stall", got_v.size(), 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
