// security_engine: DES / TDES accelerator with a per-flow context memory.
//
// Packets arrive from system memory as a stream of 32-bit words over a
// dedicated DMA channel and leave, processed, over another one. The first
// word of a packet (in_sop) carries the number of its context, 0-15. The
// context memory, written by the CPU, holds for each flow the three keys and
// a default operation (DES or TDES, encrypt or decrypt). The software may
// override the operation for one packet (in_op_valid/in_op); otherwise the
// context's pre-configured operation is used.
//
// The engine gathers two words into a 64-bit block (first word in the upper
// half), runs it through des_core and returns it as two words, keeping the
// sop/eop marks. Packets are processed block by block in ECB mode and must
// hold an even number of words. Both stream ports use valid/ready.
//
// Throughput at 100 MHz: one block per 2 + 17 + 2 cycles for DES (about
// 300 Mbit/s) and 2 + 49 + 2 for TDES (about 120 Mbit/s), above the
// 80 Mbit/s the document asks for. The 16-entry context memory, the
// per-packet operation choice and the DES/TDES function follow the
// document; ECB mode, the word order and the stream handshake are this
// design's own choices.
module security_engine
  import cp_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  // CPU port: context memory
  input  logic                        ctx_we,
  input  logic [$clog2(SEC_NCTX)-1:0] ctx_idx,
  input  sec_ctx_t                    ctx_wdata,
  // input stream (from system memory)
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [31:0]                 in_data,
  input  logic                        in_sop,
  input  logic                        in_eop,
  input  logic [$clog2(SEC_NCTX)-1:0] in_ctx,
  input  logic                        in_op_valid,
  input  sec_op_t                     in_op,
  // output stream (to system memory)
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [31:0]                 out_data,
  output logic                        out_sop,
  output logic                        out_eop
);
  typedef enum logic [2:0] {S_W0, S_W1, S_RUN, S_O0, S_O1} state_e;

  sec_ctx_t ctx_mem [SEC_NCTX];
  state_e   state;
  sec_ctx_t cur;           // context of the current packet
  logic [31:0] hi;
  logic        blk_sop, blk_eop;
  logic        core_start, core_busy, core_done;
  logic [63:0] core_in, core_out, res;

  always_ff @(posedge clk) begin
    if (ctx_we) ctx_mem[ctx_idx] <= ctx_wdata;
  end

  assign in_ready   = (state == S_W0) || (state == S_W1);
  assign core_in    = {hi, in_data};
  assign core_start = (state == S_W1) && in_valid;

  des_core u_des (
    .clk, .rst_n, .start(core_start), .tdes(cur.op.tdes), .decrypt(cur.op.decrypt),
    .k1(cur.k1), .k2(cur.k2), .k3(cur.k3), .block_in(core_in),
    .busy(core_busy), .done(core_done), .result(res)
  );
  assign core_out = res;

  always_comb begin
    out_valid = (state == S_O0) || (state == S_O1);
    out_data  = (state == S_O0) ? core_out[63:32] : core_out[31:0];
    out_sop   = (state == S_O0) && blk_sop;
    out_eop   = (state == S_O1) && blk_eop;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_W0;
      cur     <= '0;
      hi      <= '0;
      blk_sop <= 1'b0;
      blk_eop <= 1'b0;
    end else begin
      unique case (state)
        S_W0: if (in_valid) begin
          hi      <= in_data;
          blk_sop <= in_sop;
          if (in_sop) begin
            cur <= ctx_mem[in_ctx];
            if (in_op_valid) cur.op <= in_op;
          end
          state <= S_W1;
        end
        S_W1: if (in_valid) begin
          blk_eop <= in_eop;
          state   <= S_RUN;
        end
        S_RUN: if (core_done) state <= S_O0;
        S_O0:  if (out_ready) state <= S_O1;
        S_O1:  if (out_ready) state <= S_W0;
        default: state <= S_W0;
      endcase
    end
  end

  a_core_idle_on_start: assert property (@(posedge clk) core_start |-> !core_busy);

endmodule
