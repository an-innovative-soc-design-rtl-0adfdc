// classifier: flow classifier of the header processor.
//
// The classifier appends each field the FEX extracts to its key register
// (key <= key << len | field), so the fields of one packet form a key of up
// to 144 bits. When the FEX ends the packet (key_done) the key is copied
// into the search register, which frees the key register for the next
// packet, and the search engine compares it with the rules RAM.
//
// A rule (cp_pkg::cls_rule_t) holds a value, one of the 8 shared masks, a
// set (generic deny, generic accept, per-flow) and a Flow_ID. A rule
// matches when the key and the value agree on every bit the mask selects.
// The lowest-numbered matching rule wins. A deny rule, or no matching rule,
// gives Flow_ID 0, which tells the DMA to reject the packet. The masks and
// rules are written by the CPU over the microprocessor port.
//
// Timing: the rules RAM is read one row of RULES_PER_CYCLE rules per cycle
// (synchronous read), so a full search takes NRULES/RULES_PER_CYCLE + 2
// cycles (34 with the defaults): about 2.9 M searches/s at 100 MHz.
// key_ready is low while a search is running; flow_valid pulses with the
// result. The row-parallel search, the first-match priority and the
// no-match result are this design's choices; the document gives the key
// width, the 256 rules in three sets, the 8 masks and the 8-bit Flow_ID.
module classifier
  import cp_pkg::*;
#(
  parameter int NRULES          = 256,
  parameter int RULES_PER_CYCLE = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // microprocessor port
  input  logic                          mask_we,
  input  logic [$clog2(CLS_NMASKS)-1:0] mask_idx,
  input  logic [CLS_KEY_W-1:0]          mask_wdata,
  input  logic                          rule_we,
  input  logic [$clog2(NRULES)-1:0]     rule_idx,
  input  cls_rule_t                     rule_wdata,
  // from the FEX
  input  logic                          key_clear,
  input  logic                          fld_valid,
  input  logic [31:0]                   fld_data,
  input  logic [5:0]                    fld_len,
  input  logic                          key_done,
  output logic                          key_ready,
  // result
  output logic                          flow_valid,
  output logic [CLS_FLOW_W-1:0]         flow_id,
  output logic                          flow_hit,
  output cls_set_e                      flow_set
);
  localparam int NROWS = NRULES / RULES_PER_CYCLE;
  localparam int ROW_W = (NROWS > 1) ? $clog2(NROWS) : 1;
  localparam int COL_W = (RULES_PER_CYCLE > 1) ? $clog2(RULES_PER_CYCLE) : 1;

  cls_rule_t            rules [NROWS][RULES_PER_CYCLE];
  logic [CLS_KEY_W-1:0] masks [CLS_NMASKS];

  logic [CLS_KEY_W-1:0] key, skey;
  logic                 searching;
  logic [ROW_W-1:0]     rd_row;
  logic                 rd_last;     // last row has been issued
  cls_rule_t            row_q [RULES_PER_CYCLE];
  logic                 row_q_valid, row_q_last;

  // ------------------------------------------------------ configuration
  always_ff @(posedge clk) begin
    if (mask_we) masks[mask_idx] <= mask_wdata;
    if (rule_we) rules[int'(rule_idx) / RULES_PER_CYCLE][int'(rule_idx) % RULES_PER_CYCLE] <= rule_wdata;
  end

  // Synchronous read of one row of rules.
  always_ff @(posedge clk) begin
    for (int c = 0; c < RULES_PER_CYCLE; c++) row_q[c] <= rules[rd_row][c];
  end

  // ---------------------------------------------------------- key register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         key <= '0;
    else if (key_clear) key <= '0;
    else if (fld_valid) key <= (key << fld_len) | CLS_KEY_W'(fld_data);
  end

  // --------------------------------------------------------- search engine
  logic                 row_hit;
  logic [COL_W-1:0]     row_col;
  always_comb begin
    row_hit = 1'b0;
    row_col = '0;
    for (int c = RULES_PER_CYCLE - 1; c >= 0; c--) begin
      if (row_q[c].valid &&
          ((skey ^ row_q[c].value) & masks[row_q[c].mask_idx]) == '0) begin
        row_hit = 1'b1;
        row_col = COL_W'(c);
      end
    end
  end

  assign key_ready = !searching;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      searching   <= 1'b0;
      skey        <= '0;
      rd_row      <= '0;
      rd_last     <= 1'b0;
      row_q_valid <= 1'b0;
      row_q_last  <= 1'b0;
      flow_valid  <= 1'b0;
      flow_id     <= '0;
      flow_hit    <= 1'b0;
      flow_set    <= CLS_DENY;
    end else begin
      flow_valid <= 1'b0;
      if (!searching) begin
        row_q_valid <= 1'b0;
        if (key_done) begin
          searching <= 1'b1;
          skey      <= key;
          rd_row    <= '0;
          rd_last   <= 1'b0;
        end
      end else begin
        // issue the next row read
        row_q_valid <= !rd_last;
        row_q_last  <= (int'(rd_row) == NROWS - 1);
        if (int'(rd_row) == NROWS - 1) rd_last <= 1'b1;
        else                           rd_row  <= rd_row + 1'b1;
        // evaluate the row read in the previous cycle
        if (row_q_valid && (row_hit || row_q_last)) begin
          searching  <= 1'b0;
          flow_valid <= 1'b1;
          flow_hit   <= row_hit;
          flow_set   <= row_hit ? row_q[row_col].set : CLS_DENY;
          flow_id    <= (row_hit && row_q[row_col].set != CLS_DENY) ? row_q[row_col].flow_id : '0;
        end
      end
    end
  end

  // The FEX holds its STR while a search runs, so no key arrives then.
  a_no_done_while_searching: assert property (@(posedge clk) searching |-> !key_done);

endmodule
