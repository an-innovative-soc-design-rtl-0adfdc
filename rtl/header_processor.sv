// header_processor: Field Extraction engine (FEX) plus Classifier.
//
// The FEX runs its firmware over the header written into its data memory
// and sends the extracted fields to the Classifier's key register; at the
// end of the packet (STR) the Classifier searches its rules and returns an
// 8-bit Flow_ID for the DMA (0 means reject). While the Classifier searches
// one key the FEX may already parse the next header; an STR that arrives
// before the search ends stalls the FEX until the key register is free.
// The microprocessor port loads the FEX program, the 8 masks and the rules.
// The split into FEX and Classifier and their connection (fields, control,
// Flow_ID) follow the document's block diagram; the handshakes are this
// design's own.
module header_processor
  import cp_pkg::*;
#(
  parameter int DMEM_WORDS      = 64,
  parameter int NRULES          = 256,
  parameter int RULES_PER_CYCLE = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // microprocessor port
  input  logic                          imem_we,
  input  logic [FEX_PC_W-1:0]           imem_waddr,
  input  fex_instr_t                    imem_wdata,
  input  logic                          mask_we,
  input  logic [$clog2(CLS_NMASKS)-1:0] mask_idx,
  input  logic [CLS_KEY_W-1:0]          mask_wdata,
  input  logic                          rule_we,
  input  logic [$clog2(NRULES)-1:0]     rule_idx,
  input  cls_rule_t                     rule_wdata,
  // header input
  input  logic                          din_we,
  input  logic [$clog2(DMEM_WORDS)-1:0] din_addr,
  input  logic [31:0]                   din_data,
  input  logic                          start,
  output logic                          busy,
  output logic                          fex_stall,
  // result
  output logic                          flow_valid,
  output logic [CLS_FLOW_W-1:0]         flow_id,
  output logic                          flow_hit,
  output cls_set_e                      flow_set
);
  logic        fld_valid, key_clear, key_done, key_ready;
  logic [31:0] fld_data;
  logic [5:0]  fld_len;

  fex #(.DMEM_WORDS(DMEM_WORDS)) u_fex (
    .clk, .rst_n,
    .imem_we, .imem_waddr, .imem_wdata,
    .din_we, .din_addr, .din_data,
    .start, .busy, .done(key_done), .stall(fex_stall),
    .fld_valid, .fld_data, .fld_len, .key_clear, .key_ready
  );

  classifier #(.NRULES(NRULES), .RULES_PER_CYCLE(RULES_PER_CYCLE)) u_cls (
    .clk, .rst_n,
    .mask_we, .mask_idx, .mask_wdata,
    .rule_we, .rule_idx, .rule_wdata,
    .key_clear, .fld_valid, .fld_data, .fld_len, .key_done, .key_ready,
    .flow_valid, .flow_id, .flow_hit, .flow_set
  );

endmodule
