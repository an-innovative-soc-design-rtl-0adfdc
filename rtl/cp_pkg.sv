// cp_pkg: types and constants shared by the Convergence Processor blocks.
//
// It holds the instruction format of the Field Extraction engine (FEX), the
// rule format of the flow classifier, and the context format of the security
// engine. The document fixes the FEX instruction set (NOP, EXTRACT, four DP
// moves/adds, two compare-and-jump forms and STR, plus four combinable
// commands), the 2K-instruction program size, the 144-bit classification key,
// 256 rules in three sets, 8 masks, an 8-bit Flow_ID and a 16-entry security
// context memory. The bit encodings below are this design's own choice.
package cp_pkg;

  // ---------------------------------------------------------------- FEX
  localparam int FEX_IMEM_DEPTH = 2048;  // "firmware up to 2K instructions"
  localparam int FEX_PC_W       = $clog2(FEX_IMEM_DEPTH);
  localparam int FEX_IMM_W      = 16;    // compare constant 'a' of JMP

  typedef enum logic [3:0] {
    FEX_NOP     = 4'd0,
    FEX_EXTRACT = 4'd1,  // field of n+1 bits, rightmost bit b
    FEX_MOV_A   = 4'd2,  // DP <= A
    FEX_MOV_B   = 4'd3,  // DP <= B
    FEX_ADD_A   = 4'd4,  // DP <= DP + A
    FEX_ADD_B   = 4'd5,  // DP <= DP + B
    FEX_JMP_C   = 4'd6,  // if C == a goto addr
    FEX_JMP_D   = 4'd7,  // if D == a goto addr
    FEX_STR     = 4'd8   // end of packet: hand the key over, restart at 0
  } fex_op_e;

  // Destination of an EXTRACT: one of the four registers or the classifier key.
  typedef enum logic [2:0] {
    FEX_DST_A   = 3'd0,
    FEX_DST_B   = 3'd1,
    FEX_DST_C   = 3'd2,
    FEX_DST_D   = 3'd3,
    FEX_DST_KEY = 3'd4
  } fex_dst_e;

  typedef struct packed {
    fex_op_e               op;
    logic                  dec_dp;   // commands, any combination
    logic                  inc_dp;
    logic                  dec_a;
    logic                  dec_b;
    fex_dst_e              dst;
    logic [4:0]            n;        // field width minus one
    logic [4:0]            b;        // rightmost bit of the field
    logic [FEX_IMM_W-1:0]  imm;      // 'a' of JMP C/D
    logic [FEX_PC_W-1:0]   addr;     // jump target
  } fex_instr_t;                     // 48 bits

  // --------------------------------------------------------- Classifier
  localparam int CLS_KEY_W   = 144;  // "classification key is up to 144 bit wide"
  localparam int CLS_NMASKS  = 8;    // "8 masks for all flows"
  localparam int CLS_FLOW_W  = 8;    // Flow_ID width (Figure 3)

  typedef enum logic [1:0] {
    CLS_DENY   = 2'd0,  // generic reject: Flow_ID 0
    CLS_ACCEPT = 2'd1,  // generic accept
    CLS_FLOW   = 2'd2   // per-flow classification
  } cls_set_e;

  typedef struct packed {
    logic                          valid;
    cls_set_e                      set;
    logic [$clog2(CLS_NMASKS)-1:0] mask_idx;
    logic [CLS_KEY_W-1:0]          value;
    logic [CLS_FLOW_W-1:0]         flow_id;
  } cls_rule_t;

  // ----------------------------------------------------- Security engine
  localparam int SEC_NCTX = 16;      // "context memory of 16 entries"

  typedef struct packed {
    logic        tdes;     // 1: TDES (EDE), 0: single DES with k1
    logic        decrypt;  // 1: decrypt, 0: encrypt
  } sec_op_t;

  typedef struct packed {
    sec_op_t     op;
    logic [63:0] k1;
    logic [63:0] k2;
    logic [63:0] k3;
  } sec_ctx_t;

endpackage
