// tb_header_processor: FEX firmware and classifier together.
//
// The 5-tuple firmware is loaded; rules give Flow_ID 0x21 to one UDP flow,
// deny one source and accept the rest of UDP (Flow_ID 5); nothing else
// matches. Headers are written into the data memory and each run's
// Flow_ID is compared with the rule the test expects. A matching flow must
// come out 16 (FEX) + 4 (search in row 1) = 20 cycles after start. Packets
// are started back to back, so an unmatched key (34-cycle search) makes the
// next STR wait: the FEX stall must be seen.
module tb_header_processor;
  import cp_pkg::*;
  import tb_fex_prog::*;
  logic clk = 0, rst_n = 0;
  logic imem_we = 0, mask_we = 0, rule_we = 0, din_we = 0, start = 0;
  logic [FEX_PC_W-1:0] imem_waddr;
  fex_instr_t imem_wdata;
  logic [2:0] mask_idx;
  logic [CLS_KEY_W-1:0] mask_wdata;
  logic [7:0] rule_idx;
  cls_rule_t rule_wdata;
  logic [5:0] din_addr;
  logic [31:0] din_data;
  logic busy, fex_stall, flow_valid, flow_hit;
  logic [7:0] flow_id;
  cls_set_e flow_set;
  int checks = 0, failures = 0, stalls = 0;

  header_processor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && fex_stall) stalls++;

  int results [$];
  always @(posedge clk) if (rst_n && flow_valid) results.push_back(int'(flow_id));

  task automatic header(logic [7:0] p, logic [31:0] s, d, logic [15:0] sp, dp, logic v6 = 0);
    for (int w = 0; w < 6; w++) begin
      @(negedge clk); din_we = 1; din_addr = 6'(w);
      din_data = ipv4_word(w, p, s, d, sp, dp);
      if (v6 && w == 0) din_data = 32'h6000_0000;
    end
    @(negedge clk); din_we = 0;
  endtask

  task automatic go();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (busy) @(negedge clk);
  endtask

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < PROG_LEN; a++) begin
      @(negedge clk); imem_we = 1; imem_waddr = FEX_PC_W'(a); imem_wdata = five_tuple(a);
    end
    @(negedge clk); imem_we = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); rule_we = 1; rule_idx = 8'(i); rule_wdata = '0;
    end
    @(negedge clk); rule_we = 1; rule_idx = 0;
    rule_wdata = '{valid: 1'b1, set: CLS_DENY, mask_idx: 3'd2,
                   value: five_tuple_key(0, 32'h0A00_0042, 0, 0, 0), flow_id: 8'd0};
    @(negedge clk); rule_idx = 9;
    rule_wdata = '{valid: 1'b1, set: CLS_FLOW, mask_idx: 3'd0,
                   value: five_tuple_key(17, 32'hC0A8_0A01, 32'h0A00_0005, 16'h1F90, 16'h0035), flow_id: 8'h21};
    @(negedge clk); rule_idx = 30;
    rule_wdata = '{valid: 1'b1, set: CLS_ACCEPT, mask_idx: 3'd1,
                   value: five_tuple_key(17, 0, 0, 0, 0), flow_id: 8'h05};
    @(negedge clk); rule_we = 0;
    mask_we = 1; mask_idx = 0; mask_wdata = (CLS_KEY_W'(1) << 104) - 1;
    @(negedge clk); mask_idx = 1; mask_wdata = CLS_KEY_W'(8'hFF) << 96;
    @(negedge clk); mask_idx = 2; mask_wdata = CLS_KEY_W'(32'hFFFF_FFFF) << 64;
    @(negedge clk); mask_we = 0;

    // one flow, timed
    header(17, 32'hC0A8_0A01, 32'h0A00_0005, 16'h1F90, 16'h0035);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!flow_valid) begin @(negedge clk); cyc++; end
    checks += 2;
    if (flow_id != 8'h21) begin failures++; $display("FAIL flow id %h", flow_id); end
    if (cyc != 20) begin failures++; $display("FAIL latency %0d", cyc); end
    @(negedge clk);
    results.delete();
    // back to back: unmatched TCP, denied source, other UDP, IPv6
    header(6, 32'h0101_0101, 32'h0202_0202, 16'd80, 16'd8080);  go();
    header(17, 32'h0A00_0042, 32'h0A00_0005, 16'h1F90, 16'h0035); go();
    header(17, 32'h0303_0303, 32'h0404_0404, 16'd1, 16'd2); go();
    header(17, 0, 0, 0, 0, 1); go();
    repeat (60) @(negedge clk);
    checks += 5;
    if (results.size() != 4) begin failures++; $display("FAIL %0d results", results.size()); end
    else begin
      if (results[0] != 0)    begin failures++; $display("FAIL unmatched -> %0d", results[0]); end
      if (results[1] != 0)    begin failures++; $display("FAIL denied -> %0d", results[1]); end
      if (results[2] != 8'h5) begin failures++; $display("FAIL udp -> %0d", results[2]); end
      if (results[3] != 0)    begin failures++; $display("FAIL ipv6 -> %0d", results[3]); end
    end
    if (stalls == 0) begin failures++; $display("FAIL no FEX stall"); end
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
