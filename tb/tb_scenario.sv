// tb_scenario: the reference home-gateway load on the header processor and
// the security engine, at their default sizes.
//
// Header processor: 128 firewall rules are loaded (100 deny rules on source
// addresses, 27 per-flow rules on exact 5-tuples, then one generic accept
// for UDP), with the 5-tuple firmware. 200 headers drawn at random from
// denied sources, known flows, other UDP and TCP that matches nothing are
// pushed through back to back, each written into the data memory as soon
// as the FEX is free (6 cycles per header). Every Flow_ID is compared with
// a first-match search over the same rule list done here, and the rate
// must reach the 2 M packets/s given for the header processor: at most 50
// cycles per packet at 100 MHz, misses included (they search all 256 rule
// slots).
//
// Security engine: a 374-word (1496-byte) packet is TDES-encrypted and the
// result decrypted again; the round trip must give the packet back, and
// the encryption must run at no less than the 80 Mbit/s the engine is
// dimensioned for (at 100 MHz). DES is measured the same way.
module tb_scenario;
  import cp_pkg::*;
  import tb_fex_prog::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // ------------------------------------------------------ header processor
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

  header_processor hp (
    .clk, .rst_n, .imem_we, .imem_waddr, .imem_wdata, .mask_we, .mask_idx, .mask_wdata,
    .rule_we, .rule_idx, .rule_wdata, .din_we, .din_addr, .din_data, .start, .busy,
    .fex_stall, .flow_valid, .flow_id, .flow_hit, .flow_set
  );

  int results [$];
  int t_first_start = -1, t_last_flow = 0, cyc = 0, n_stall = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && flow_valid) begin results.push_back(int'(flow_id)); t_last_flow = cyc; end
    if (rst_n && fex_stall) n_stall++;
  end

  // the rule list, as the testbench sees it
  logic [31:0] deny_src [100];
  logic [31:0] flow_src [27], flow_dst [27];
  logic [15:0] flow_sp [27], flow_dp [27];

  function automatic int expected_flow(logic [7:0] p, logic [31:0] s, d, logic [15:0] sp, dp);
    foreach (deny_src[i]) if (s == deny_src[i]) return 0;
    foreach (flow_src[i])
      if (p == 17 && s == flow_src[i] && d == flow_dst[i] && sp == flow_sp[i] && dp == flow_dp[i])
        return 16 + i;
    if (p == 17) return 5;
    return 0;
  endfunction

  // ------------------------------------------------------- security engine
  logic ctx_we = 0, in_valid = 0, in_sop = 0, in_eop = 0, in_op_valid = 0, in_ready;
  logic [3:0] ctx_idx, in_ctx = 0;
  sec_ctx_t ctx_wdata;
  sec_op_t in_op;
  logic [31:0] in_data, out_data;
  logic out_valid, out_sop, out_eop;

  security_engine se (
    .clk, .rst_n, .ctx_we, .ctx_idx, .ctx_wdata,
    .in_valid, .in_ready, .in_data, .in_sop, .in_eop, .in_ctx, .in_op_valid, .in_op,
    .out_valid, .out_ready(1'b1), .out_data, .out_sop, .out_eop
  );

  logic [31:0] ow [$];
  int t_last_out = 0;
  always @(posedge clk) if (rst_n && out_valid) begin ow.push_back(out_data); t_last_out = cyc; end

  task automatic sec_run(logic tdes, logic decrypt, logic [31:0] w [$], output int cycles);
    int t0;
    ow.delete();
    t0 = -1;
    for (int i = 0; i < w.size(); i++) begin
      @(negedge clk);
      in_valid = 1; in_data = w[i]; in_sop = i == 0; in_eop = i == w.size() - 1;
      in_op_valid = 1; in_op = '{tdes: tdes, decrypt: decrypt};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (t0 < 0) t0 = cyc;
    end
    @(negedge clk); in_valid = 0;
    while (ow.size() < w.size()) @(negedge clk);
    cycles = t_last_out - t0 + 1;
  endtask

  initial begin
    logic [7:0]  hp_p  [200];
    logic [31:0] hp_s  [200], hp_d [200];
    logic [15:0] hp_sp [200], hp_dp [200];
    logic [31:0] pkt [$], enc [$];
    int n_deny = 0, n_flow = 0, n_acc = 0, n_miss = 0;
    int cycles;

    for (int i = 0; i < 100; i++) deny_src[i] = 32'h0A00_0000 + 32'(i * 37 + 1);
    for (int i = 0; i < 27; i++) begin
      flow_src[i] = 32'hC0A8_0100 + 32'(i);
      flow_dst[i] = 32'h5DB8_D800 + 32'(i * 3);
      flow_sp[i]  = 16'(5000 + i);
      flow_dp[i]  = 16'(i % 2 ? 554 : 5060);
    end

    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- firmware, masks, 128 rules (the other 128 slots cleared)
    for (int a = 0; a < PROG_LEN; a++) begin
      @(negedge clk); imem_we = 1; imem_waddr = FEX_PC_W'(a); imem_wdata = five_tuple(a);
    end
    @(negedge clk); imem_we = 0;
    mask_we = 1; mask_idx = 0; mask_wdata = (CLS_KEY_W'(1) << 104) - 1;
    @(negedge clk); mask_idx = 1; mask_wdata = CLS_KEY_W'(8'hFF) << 96;
    @(negedge clk); mask_idx = 2; mask_wdata = CLS_KEY_W'(32'hFFFF_FFFF) << 64;
    @(negedge clk); mask_we = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); rule_we = 1; rule_idx = 8'(i); rule_wdata = '0;
      if (i < 100)
        rule_wdata = '{valid: 1'b1, set: CLS_DENY, mask_idx: 3'd2,
                       value: five_tuple_key(0, deny_src[i], 0, 0, 0), flow_id: 8'd0};
      else if (i < 127)
        rule_wdata = '{valid: 1'b1, set: CLS_FLOW, mask_idx: 3'd0,
                       value: five_tuple_key(17, flow_src[i-100], flow_dst[i-100], flow_sp[i-100], flow_dp[i-100]),
                       flow_id: 8'(16 + i - 100)};
      else if (i == 127)
        rule_wdata = '{valid: 1'b1, set: CLS_ACCEPT, mask_idx: 3'd1,
                       value: five_tuple_key(17, 0, 0, 0, 0), flow_id: 8'd5};
    end
    @(negedge clk); rule_we = 0;

    // ---- 200 headers
    for (int k = 0; k < 200; k++) begin
      int r;
      r = $urandom % 4;
      hp_p[k] = 17; hp_d[k] = 32'h0A00_0005; hp_sp[k] = 16'(1000 + k); hp_dp[k] = 16'd53;
      case (r)
        0: hp_s[k] = deny_src[$urandom % 100];
        1: begin
             int f;
             f = $urandom % 27;
             hp_s[k] = flow_src[f]; hp_d[k] = flow_dst[f]; hp_sp[k] = flow_sp[f]; hp_dp[k] = flow_dp[f];
           end
        2: hp_s[k] = 32'hAC10_0000 + 32'(k);
        default: begin hp_p[k] = 6; hp_s[k] = 32'hAC10_0000 + 32'(k); end
      endcase
      case (expected_flow(hp_p[k], hp_s[k], hp_d[k], hp_sp[k], hp_dp[k]))
        0:       if (hp_p[k] == 6) n_miss++; else n_deny++;
        5:       n_acc++;
        default: n_flow++;
      endcase
    end
    for (int k = 0; k < 200; k++) begin
      while (busy) @(negedge clk);
      for (int w = 0; w < 6; w++) begin
        din_we = 1; din_addr = 6'(w);
        din_data = ipv4_word(w, hp_p[k], hp_s[k], hp_d[k], hp_sp[k], hp_dp[k]);
        @(negedge clk);
      end
      din_we = 0; start = 1;
      if (t_first_start < 0) t_first_start = cyc;
      @(negedge clk); start = 0;
      @(negedge clk);
    end
    begin
      int guard = 0;
      while (results.size() < 200 && guard < 1000) begin @(negedge clk); guard++; end
    end
    chk("flow results", results.size(), 200);
    for (int k = 0; k < 200 && k < results.size(); k++)
      chk($sformatf("packet %0d Flow_ID", k), results[k],
          expected_flow(hp_p[k], hp_s[k], hp_d[k], hp_sp[k], hp_dp[k]));
    begin
      int total;
      total = t_last_flow - t_first_start + 1;
      $display("header processor: %0d packets (deny %0d, per-flow %0d, accept %0d, no match %0d) in %0d cycles = %0d.%02d cycles/packet, %0d kpps at 100 MHz, %0d stall cycles",
               200, n_deny, n_flow, n_acc, n_miss, total, total / 200, (total % 200) / 2,
               200 * 100_000 / total, n_stall);
      chk("at least 2 Mpps (<= 50 cycles per packet)", int'(total <= 200 * 50), 1);
      checks++;
      if (n_deny == 0 || n_flow == 0 || n_acc == 0 || n_miss == 0) begin
        failures++; $display("FAIL a kind of packet never occurred");
      end
    end

    // ---- security engine
    @(negedge clk); ctx_we = 1; ctx_idx = 0;
    ctx_wdata = '{op: '{tdes: 1'b1, decrypt: 1'b0},
                  k1: 64'h0123456789ABCDEF, k2: 64'h23456789ABCDEF01, k3: 64'h456789ABCDEF0123};
    @(negedge clk); ctx_we = 0;
    for (int i = 0; i < 374; i++) pkt.push_back($urandom);
    sec_run(1, 0, pkt, cycles);
    enc = ow;
    $display("security engine TDES: %0d words in %0d cycles = %0d Mbit/s at 100 MHz",
             374, cycles, 374 * 32 * 100 / cycles);
    chk("TDES at least 80 Mbit/s", int'(374 * 32 * 100 / cycles >= 80), 1);
    begin
      int same;
      same = 0;
      foreach (pkt[i]) if (enc[i] == pkt[i]) same++;
      chk("TDES output differs from input", int'(same < 4), 1);
    end
    sec_run(1, 1, enc, cycles);
    for (int i = 0; i < 374 && i < ow.size(); i++) chk($sformatf("TDES round trip word %0d", i), ow[i], pkt[i]);
    sec_run(0, 0, pkt, cycles);
    $display("security engine DES: %0d words in %0d cycles = %0d Mbit/s at 100 MHz",
             374, cycles, 374 * 32 * 100 / cycles);
    chk("DES at least 80 Mbit/s", int'(374 * 32 * 100 / cycles >= 80), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
