// tb_classifier: key assembly, masked rule search and rule-set handling.
//
// Five-tuple keys (protocol, source, destination, ports: 104 bits) are fed
// as fields the way the FEX emits them. The rules: an exact per-flow rule
// (row 1), a deny rule on one source address (rule 3, so it wins over an
// accept rule for the same source in the same row, rule 5), a generic
// accept on protocol 17 (row 25), an exact per-flow rule in the last slot
// and an invalid rule that would match everything. Each lookup's Flow_ID,
// hit flag and set are compared with the expected rule, and the latency
// (row of the first match + 3 cycles, counting the cycle of key_done; 34
// cycles without a match) is checked. key_ready must be low during a
// search.
module tb_classifier;
  import cp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic mask_we = 0, rule_we = 0, key_clear = 0, fld_valid = 0, key_done = 0;
  logic [2:0] mask_idx;
  logic [CLS_KEY_W-1:0] mask_wdata;
  logic [7:0] rule_idx;
  cls_rule_t rule_wdata;
  logic [31:0] fld_data;
  logic [5:0] fld_len;
  logic key_ready, flow_valid, flow_hit;
  logic [7:0] flow_id;
  cls_set_e flow_set;
  int checks = 0, failures = 0;

  classifier dut (.*);

  always #5 clk = ~clk;

  localparam logic [CLS_KEY_W-1:0] M_EXACT = (CLS_KEY_W'(1) << 104) - 1;
  localparam logic [CLS_KEY_W-1:0] M_PROTO = CLS_KEY_W'(8'hFF) << 96;
  localparam logic [CLS_KEY_W-1:0] M_SRC   = CLS_KEY_W'(32'hFFFF_FFFF) << 64;

  function automatic logic [CLS_KEY_W-1:0] k5(logic [7:0] p, logic [31:0] s, d,
                                              logic [15:0] sp, dp);
    return CLS_KEY_W'({p, s, d, sp, dp});
  endfunction

  task automatic set_mask(int i, logic [CLS_KEY_W-1:0] m);
    @(negedge clk); mask_we = 1; mask_idx = 3'(i); mask_wdata = m;
    @(negedge clk); mask_we = 0;
  endtask

  task automatic set_rule(int i, logic v, cls_set_e s, int m, logic [CLS_KEY_W-1:0] val, int f);
    @(negedge clk); rule_we = 1; rule_idx = 8'(i);
    rule_wdata.valid = v; rule_wdata.set = s; rule_wdata.mask_idx = 3'(m);
    rule_wdata.value = val; rule_wdata.flow_id = 8'(f);
    @(negedge clk); rule_we = 0;
  endtask

  task automatic field(logic [31:0] v, int len);
    @(negedge clk); fld_valid = 1; fld_data = v; fld_len = 6'(len);
    @(negedge clk); fld_valid = 0;
  endtask

  task automatic lookup(string what, logic [7:0] p, logic [31:0] s, d, logic [15:0] sp, dp,
                        int exp_id, logic exp_hit, cls_set_e exp_set, int exp_cyc);
    int cyc;
    @(negedge clk); key_clear = 1;
    @(negedge clk); key_clear = 0;
    field(32'(p), 8); field(s, 32); field(d, 32); field(32'(sp), 16); field(32'(dp), 16);
    @(negedge clk); key_done = 1;
    @(negedge clk); key_done = 0; cyc = 1;
    checks++; if (key_ready) begin failures++; $display("FAIL %s: key_ready during search", what); end
    while (!flow_valid) begin @(negedge clk); cyc++; end
    checks += 4;
    if (flow_id != 8'(exp_id)) begin failures++; $display("FAIL %s: id %0d exp %0d", what, flow_id, exp_id); end
    if (flow_hit != exp_hit)   begin failures++; $display("FAIL %s: hit %0d", what, flow_hit); end
    if (flow_set != exp_set)   begin failures++; $display("FAIL %s: set %0d", what, flow_set); end
    if (cyc != exp_cyc)        begin failures++; $display("FAIL %s: latency %0d exp %0d", what, cyc, exp_cyc); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // clear all rules
    for (int i = 0; i < 256; i++) set_rule(i, 0, CLS_DENY, 0, '0, 0);
    set_mask(0, M_EXACT);
    set_mask(1, M_PROTO);
    set_mask(2, M_SRC);
    set_mask(7, '0);
    set_rule(3,   1, CLS_DENY,   2, k5(0, 32'h0A00_0042, 0, 0, 0), 99);
    set_rule(5,   1, CLS_ACCEPT, 2, k5(0, 32'h0A00_0042, 0, 0, 0), 8'h44);  // shadowed by rule 3
    set_rule(10,  1, CLS_FLOW,   0, k5(17, 32'hC0A8_0A01, 32'h0A00_0005, 16'h1F90, 16'h0035), 8'h21);
    set_rule(200, 1, CLS_ACCEPT, 1, k5(17, 0, 0, 0, 0), 8'h05);
    set_rule(255, 1, CLS_FLOW,   0, k5(6, 32'h0102_0304, 32'h0506_0708, 16'd80, 16'd1234), 8'h7F);
    set_rule(100, 0, CLS_FLOW,   7, '0, 8'h33);   // invalid: must never match
    lookup("exact flow",   17, 32'hC0A8_0A01, 32'h0A00_0005, 16'h1F90, 16'h0035, 8'h21, 1, CLS_FLOW, 4);
    lookup("deny source",  17, 32'h0A00_0042, 32'h0A00_0005, 16'h1F90, 16'h0035, 0, 1, CLS_DENY, 3);
    lookup("accept udp",   17, 32'h0101_0101, 32'h0202_0202, 16'd5000, 16'd6000, 8'h05, 1, CLS_ACCEPT, 28);
    lookup("no match",      6, 32'h0101_0101, 32'h0202_0202, 16'd5000, 16'd6000, 0, 0, CLS_DENY, 34);
    lookup("last rule",     6, 32'h0102_0304, 32'h0506_0708, 16'd80, 16'd1234, 8'h7F, 1, CLS_FLOW, 34);
    lookup("near miss",    17, 32'hC0A8_0A01, 32'h0A00_0005, 16'h1F90, 16'h0036, 8'h05, 1, CLS_ACCEPT, 28);
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
