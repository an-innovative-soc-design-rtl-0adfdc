// fex: Field Extraction engine of the header processor.
//
// A small programmable RISC that walks a packet header held in its data
// memory and extracts fields from it. Each 48-bit instruction (cp_pkg::
// fex_instr_t) carries one instruction (NOP, EXTRACT, MOV A/B to DP, ADD A/B
// to DP, JMP C/D, STR) and any combination of the four commands DEC DP,
// INC DP, DEC A and DEC B, which execute in the same cycle. The machine has
// four 32-bit registers A-D, a program counter and a data pointer DP that
// selects a 32-bit word of the data memory. EXTRACT takes the n+1 bits whose
// rightmost bit is b from the word at DP, through the barrel shifter/mask,
// into A, B, C, D or out to the classifier's key register.
//
// Pipeline (three stages, as in the document):
//   IF  instruction memory read at PC (synchronous RAM)
//   ID  decode: field mask and operand selection
//   EX  data memory read at DP, shift/mask, register and DP update, compare
//       and jump, STR
// All state changes in EX, so there are no data hazards. A taken jump or STR
// flushes IF and ID: a taken jump costs two extra cycles.
// Commands apply after the instruction: "ADD A to DP" with INC DP gives
// DP + A + 1; EXTRACT to A with DEC A gives field - 1.
//
// Interface: the instruction memory is loaded over the microprocessor port
// (imem_we). A packet header is written into the data memory (din_we) and
// 'start' begins a run at PC 0 with DP and A-D cleared. Each EXTRACT to the
// key emits fld_valid/fld_data/fld_len for one cycle. STR raises 'done' for
// one cycle and stops the engine; if the classifier is still searching the
// previous key (key_ready low) the STR waits in EX, stalling the pipeline.
// The data memory size (64 words), the 16-bit compare constant, the register
// width and the register clearing at start are this design's choices.
module fex
  import cp_pkg::*;
#(
  parameter int DMEM_WORDS = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // microprocessor port: instruction memory
  input  logic                          imem_we,
  input  logic [FEX_PC_W-1:0]           imem_waddr,
  input  fex_instr_t                    imem_wdata,
  // packet data input (32-bit)
  input  logic                          din_we,
  input  logic [$clog2(DMEM_WORDS)-1:0] din_addr,
  input  logic [31:0]                   din_data,
  // run control
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output logic                          stall,
  // field output towards the classifier key register
  output logic                          fld_valid,
  output logic [31:0]                   fld_data,
  output logic [5:0]                    fld_len,
  output logic                          key_clear,
  input  logic                          key_ready
);
  localparam int DPW = $clog2(DMEM_WORDS);

  fex_instr_t imem [FEX_IMEM_DEPTH];
  logic [31:0] dmem [DMEM_WORDS];

  logic                running;
  logic [FEX_PC_W-1:0] pc;
  logic [DPW-1:0]      dp;
  logic [31:0]         ra, rb, rc, rd;

  // IF/ID register
  fex_instr_t f_instr;
  logic       f_valid;
  // ID/EX register
  fex_instr_t d_instr;
  logic       d_valid;
  logic [31:0] d_mask;

  // ------------------------------------------------------------ memories
  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_waddr] <= imem_wdata;
    if (din_we)  dmem[din_addr]   <= din_data;
  end

  // ------------------------------------------------------------ EX stage
  logic [31:0]         ex_word, ex_field;
  logic                ex_jump, ex_str;
  logic [DPW-1:0]      dp_next;
  logic [31:0]         ra_next, rb_next, rc_next, rd_next;

  always_comb begin
    ex_word  = dmem[dp];
    ex_field = (ex_word >> d_instr.b) & d_mask;
    ra_next  = ra;
    rb_next  = rb;
    rc_next  = rc;
    rd_next  = rd;
    dp_next  = dp;
    ex_jump  = 1'b0;
    ex_str   = 1'b0;
    if (d_valid) begin
      unique case (d_instr.op)
        FEX_EXTRACT: unique case (d_instr.dst)
          FEX_DST_A: ra_next = ex_field;
          FEX_DST_B: rb_next = ex_field;
          FEX_DST_C: rc_next = ex_field;
          FEX_DST_D: rd_next = ex_field;
          default: ;
        endcase
        FEX_MOV_A: dp_next = ra[DPW-1:0];
        FEX_MOV_B: dp_next = rb[DPW-1:0];
        FEX_ADD_A: dp_next = dp + ra[DPW-1:0];
        FEX_ADD_B: dp_next = dp + rb[DPW-1:0];
        FEX_JMP_C: ex_jump = (rc == 32'(d_instr.imm));
        FEX_JMP_D: ex_jump = (rd == 32'(d_instr.imm));
        FEX_STR:   ex_str  = 1'b1;
        default: ;
      endcase
      if (d_instr.inc_dp) dp_next = dp_next + 1'b1;
      if (d_instr.dec_dp) dp_next = dp_next - 1'b1;
      if (d_instr.dec_a)  ra_next = ra_next - 1'b1;
      if (d_instr.dec_b)  rb_next = rb_next - 1'b1;
    end
  end

  assign stall     = ex_str && !key_ready;
  assign busy      = running;
  assign fld_data  = ex_field;
  assign fld_len   = 6'(d_instr.n) + 6'd1;
  assign fld_valid = d_valid && d_instr.op == FEX_EXTRACT && d_instr.dst == FEX_DST_KEY;

  // ------------------------------------------------------ pipeline control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      pc        <= '0;
      dp        <= '0;
      ra        <= '0;
      rb        <= '0;
      rc        <= '0;
      rd        <= '0;
      f_valid   <= 1'b0;
      d_valid   <= 1'b0;
      f_instr   <= '0;
      d_instr   <= '0;
      d_mask    <= '0;
      done      <= 1'b0;
      key_clear <= 1'b0;
    end else begin
      done      <= 1'b0;
      key_clear <= 1'b0;
      if (start && !running) begin
        running   <= 1'b1;
        pc        <= '0;
        dp        <= '0;
        ra        <= '0;
        rb        <= '0;
        rc        <= '0;
        rd        <= '0;
        f_valid   <= 1'b0;
        d_valid   <= 1'b0;
        key_clear <= 1'b1;
      end else if (running && !stall) begin
        // EX
        dp <= dp_next;
        ra <= ra_next;
        rb <= rb_next;
        rc <= rc_next;
        rd <= rd_next;
        if (ex_str) begin
          running <= 1'b0;
          done    <= 1'b1;
          pc      <= '0;
          f_valid <= 1'b0;
          d_valid <= 1'b0;
        end else if (ex_jump) begin
          pc      <= d_instr.addr;
          f_valid <= 1'b0;
          d_valid <= 1'b0;
        end else begin
          // IF
          f_instr <= imem[pc];
          f_valid <= 1'b1;
          pc      <= pc + 1'b1;
          // ID
          d_instr <= f_instr;
          d_valid <= f_valid;
          d_mask  <= (f_instr.n == 5'd31) ? '1 : ((32'd1 << (f_instr.n + 5'd1)) - 32'd1);
        end
      end
    end
  end

  // 'done' marks the end of one run: a single-cycle pulse.
  a_done_pulse: assert property (@(posedge clk) done |=> !done);

endmodule
