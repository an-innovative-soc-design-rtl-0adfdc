// cp_top: data-handling core of the Convergence Processor.
//
// The chip forwards packets between network interfaces through system
// memory: a packet is received into a port FIFO, its header is parsed by the
// header processor, which gives it a Flow_ID, and the DMA moves it to memory
// (or drops it if the Flow_ID is 0); the CPU's software then forwards it,
// optionally through the DES/TDES security engine, and the DMA moves it out
// to a transmit FIFO. This top wires the blocks that carry that path:
//
//   header_processor  FEX + Classifier; Flow_ID goes to the DMA
//   dma_scheduler     traffic descriptor, weighted round robin, thresholds
//   security_engine   DES/TDES, fed and drained by two DMA channels
//   port_fifo x12     receive and transmit port FIFOs of a generic network
//                     port (channels 0, 1), of the HDLC port (4, 5), of
//                     the two Ethernet ports (6, 7 and 8, 9) and of the ATM
//                     port (AAL5 10, 11 and AAL0 12, 13)
//   hdlc              the 2 Mbit/s HDLC port, behind its two FIFOs
//   eth_mac x2        the two 10/100 Ethernet MACs (MII), behind their FIFOs
//   atm_aal5          the ATM port: AAL5/AAL0 for 32 circuits, UTOPIA-style
//                     cell interface, behind two FIFO pairs (one per AAL)
//   bus_arbiter       gives the on-chip bus to the CPU or the DMA
//   uart x2           the two RS-232 ports; their CPU side is brought out
//                     as ports, since the CPU is outside
//
// DMA channel map: 0 receive port FIFO (to memory), 1 transmit port FIFO
// (from memory), 2 security engine input (from memory), 3 security engine
// output (to memory), 4 HDLC receive FIFO (to memory), 5 HDLC transmit FIFO
// (from memory), 6 and 7 Ethernet port 0 receive and transmit, 8 and 9
// Ethernet port 1, 10 and 11 the ATM port's AAL5 receive and transmit, 12
// and 13 its AAL0 receive and transmit, 14 and up brought out (ext_ch_*) for the interfaces that are not part of this
// RTL (DSP and MPEG packet interfaces). The generic port on channels 0 and 1 stands for such an
// interface whose words arrive already packed.
// An HDLC or Ethernet byte travels in the low bits of a 32-bit word: bits
// 7:0 the byte, bit 8 first byte of a frame, bit 9 last byte, bit 10 FCS
// good (on receive, with bit 9) and bit 11 frame error (on receive; no
// byte). ATM words use the same bits 7:0 and 8 and carry the circuit
// number in bits 20:16; on transmit bit 9 marks the last byte; on receive
// the frame ends with a word of its own that has bit 9 set and bit 10 for
// a good AAL5 CRC and length (the byte count comes from the trailer); an
// AAL0 cell arrives as 48 bytes and an end word. The segmenter takes whole
// frames from the AAL5 or the AAL0 transmit FIFO, the AAL5 one first.
// For the channels that read memory (1, 2, 5, 7, 9, 11, 13), ext_ch_req says that
// memory holds words for them (the CPU has queued a packet); the channel
// then requests whenever its sink has room. The other bits of ext_ch_req
// and ext_ch_thresh below 14 are not used.
// The CPU, the AMBA bus and the memory controller are outside: the word the
// DMA writes to memory appears on mem_w*, and the word it reads arrives on
// mem_r* in the same cycle as xfer_valid (with sop/eop and, for channel 2,
// the security context and operation of the packet). The blocks and their
// connections follow the document's block diagrams; the channel map,
// the memory-side port and the byte-per-word format of the serial and
// Ethernet channels are this design's own.
module cp_top
  import cp_pkg::*;
#(
  parameter int NCH             = 32,
  parameter int DMEM_WORDS      = 64,
  parameter int NRULES          = 256,
  parameter int RULES_PER_CYCLE = 8,
  parameter int FIFO_DEPTH      = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // header processor: microprocessor port
  input  logic                          imem_we,
  input  logic [FEX_PC_W-1:0]           imem_waddr,
  input  fex_instr_t                    imem_wdata,
  input  logic                          mask_we,
  input  logic [$clog2(CLS_NMASKS)-1:0] mask_idx,
  input  logic [CLS_KEY_W-1:0]          mask_wdata,
  input  logic                          rule_we,
  input  logic [$clog2(NRULES)-1:0]     rule_idx,
  input  cls_rule_t                     rule_wdata,
  // header processor: header from the receiving interface
  input  logic                          hdr_we,
  input  logic [$clog2(DMEM_WORDS)-1:0] hdr_addr,
  input  logic [31:0]                   hdr_data,
  input  logic                          hdr_start,
  output logic                          hdr_busy,
  output logic                          fex_stall,
  output logic                          flow_valid,
  output logic [CLS_FLOW_W-1:0]         flow_id,
  output logic                          flow_hit,
  output logic                          pkt_accept,
  output logic                          pkt_reject,
  // security engine: context memory
  input  logic                          ctx_we,
  input  logic [$clog2(SEC_NCTX)-1:0]   ctx_idx,
  input  sec_ctx_t                      ctx_wdata,
  // DMA traffic descriptor
  input  logic [15:0]                   cfg_dma_cycles,
  input  logic [15:0]                   cfg_off_cycles,
  input  logic [15:0]                   cfg_rx_cycles,
  input  logic [NCH-1:0]                cfg_ch_en,
  input  logic [NCH-1:0]                cfg_ch_tx,
  input  logic [7:0]                    cfg_ch_weight [NCH],
  input  logic [$clog2(FIFO_DEPTH):0]   cfg_fifo_hi,
  input  logic [$clog2(FIFO_DEPTH):0]   cfg_fifo_lo,
  // receive port (network side of the receive FIFO)
  input  logic                          rx_push,
  input  logic [31:0]                   rx_data,
  output logic                          rx_full,
  output logic                          rx_overflow,
  // transmit port (network side of the transmit FIFO)
  input  logic                          tx_pop,
  output logic [31:0]                   tx_data,
  output logic                          tx_empty,
  output logic                          tx_underflow,
  // channels of the interfaces outside this RTL
  input  logic [NCH-1:0]                ext_ch_req,
  input  logic [NCH-1:0]                ext_ch_thresh,
  // CPU side of the bus
  input  logic                          cpu_req,
  input  logic                          cpu_lock,
  output logic                          cpu_gnt,
  output logic                          bus_handover,
  // DMA transfers and the system memory side of the bus
  output logic                          xfer_valid,
  output logic [$clog2(NCH)-1:0]        xfer_ch,
  output logic                          xfer_tx,
  output logic                          xfer_urgent,
  output logic                          dma_window,
  output logic                          mem_wvalid,
  output logic [31:0]                   mem_wdata,
  output logic                          mem_wsop,
  output logic                          mem_weop,
  input  logic [31:0]                   mem_rdata,
  input  logic                          mem_rsop,
  input  logic                          mem_reop,
  input  logic [$clog2(SEC_NCTX)-1:0]   mem_rctx,
  input  logic                          mem_rop_valid,
  input  sec_op_t                       mem_rop,
  // two UART ports (CPU side brought out; index 0 and 1)
  input  logic [15:0]                   uart_cfg_div [2],
  input  logic [1:0]                    uart_tx_valid,
  output logic [1:0]                    uart_tx_ready,
  input  logic [7:0]                    uart_tx_data [2],
  output logic [1:0]                    uart_txd,
  input  logic [1:0]                    uart_rxd,
  output logic [1:0]                    uart_rx_valid,
  output logic [7:0]                    uart_rx_data [2],
  input  logic [1:0]                    uart_rx_read,
  output logic [1:0]                    uart_rx_frame_err,
  output logic [1:0]                    uart_rx_overrun,
  // 2 Mbit/s HDLC port (bytes go through DMA channels 4 and 5)
  input  logic [7:0]                    hdlc_cfg_div,
  output logic                          hdlc_tx_abort,
  output logic                          hdlc_rx_err,
  output logic                          hdlc_txd,
  input  logic                          hdlc_rxd,
  // two 10/100 Ethernet ports on MII (bytes go through DMA channels 6-9)
  input  logic [7:0]                    eth_cfg_div,
  output logic [1:0]                    eth_tx_abort,
  output logic [1:0]                    eth_rx_err,
  output logic [1:0]                    mii_tx_en,
  output logic [3:0]                    mii_txd [2],
  output logic [1:0]                    mii_tx_er,
  input  logic [1:0]                    mii_rx_dv,
  input  logic [3:0]                    mii_rxd [2],
  input  logic [1:0]                    mii_rx_er,
  // ATM port: circuit table and cell interface (DMA channels 10-13)
  input  logic                          atm_cfg_we,
  input  logic [4:0]                    atm_cfg_vc,
  input  logic                          atm_cfg_en,
  input  logic                          atm_cfg_aal0,
  input  logic [7:0]                    atm_cfg_vpi,
  input  logic [15:0]                   atm_cfg_vci,
  output logic                          atm_hec_err,
  output logic                          atm_unknown,
  output logic                          utp_tx_valid,
  input  logic                          utp_tx_ready,
  output logic [7:0]                    utp_tx_data,
  output logic                          utp_tx_soc,
  input  logic                          utp_rx_valid,
  output logic                          utp_rx_ready,
  input  logic [7:0]                    utp_rx_data,
  input  logic                          utp_rx_soc
);
  localparam int CHW         = $clog2(NCH);
  localparam int CH_RX       = 0;
  localparam int CH_TX       = 1;
  localparam int CH_SEC_IN   = 2;
  localparam int CH_SEC_OUT  = 3;
  localparam int CH_HDLC_RX  = 4;
  localparam int CH_HDLC_TX  = 5;
  localparam int CH_ETH      = 6;     // port p: receive 6+2p, transmit 7+2p
  localparam int CH_ATM_RX   = 10;
  localparam int CH_ATM_TX   = 11;
  localparam int CH_AAL0_RX  = 12;
  localparam int CH_AAL0_TX  = 13;

  // ------------------------------------------------------ header processor
  cls_set_e flow_set;

  header_processor #(.DMEM_WORDS(DMEM_WORDS), .NRULES(NRULES),
                     .RULES_PER_CYCLE(RULES_PER_CYCLE)) u_hp (
    .clk, .rst_n,
    .imem_we, .imem_waddr, .imem_wdata,
    .mask_we, .mask_idx, .mask_wdata,
    .rule_we, .rule_idx, .rule_wdata,
    .din_we(hdr_we), .din_addr(hdr_addr), .din_data(hdr_data),
    .start(hdr_start), .busy(hdr_busy), .fex_stall,
    .flow_valid, .flow_id, .flow_hit, .flow_set
  );

  // ------------------------------------------------------------ port FIFOs
  logic        rx_empty, rx_hi, rx_lo, rx_underflow;
  logic [31:0] rx_dout;
  logic [$clog2(FIFO_DEPTH):0] rx_count, tx_count;
  logic        tx_full, tx_hi, tx_lo, tx_overflow;
  logic        sel_rx, sel_tx, sel_sin, sel_sout, sel_hrx, sel_htx;
  logic [1:0]  sel_erx, sel_etx;
  logic        sel_arx, sel_atx, sel_zrx, sel_ztx;

  assign sel_rx   = xfer_valid && xfer_ch == CHW'(CH_RX);
  assign sel_tx   = xfer_valid && xfer_ch == CHW'(CH_TX);
  assign sel_sin  = xfer_valid && xfer_ch == CHW'(CH_SEC_IN);
  assign sel_sout = xfer_valid && xfer_ch == CHW'(CH_SEC_OUT);
  assign sel_hrx  = xfer_valid && xfer_ch == CHW'(CH_HDLC_RX);
  assign sel_htx  = xfer_valid && xfer_ch == CHW'(CH_HDLC_TX);
  assign sel_arx  = xfer_valid && xfer_ch == CHW'(CH_ATM_RX);
  assign sel_atx  = xfer_valid && xfer_ch == CHW'(CH_ATM_TX);
  assign sel_zrx  = xfer_valid && xfer_ch == CHW'(CH_AAL0_RX);
  assign sel_ztx  = xfer_valid && xfer_ch == CHW'(CH_AAL0_TX);
  for (genvar p = 0; p < 2; p++) begin : g_sel_eth
    assign sel_erx[p] = xfer_valid && xfer_ch == CHW'(CH_ETH + 2 * p);
    assign sel_etx[p] = xfer_valid && xfer_ch == CHW'(CH_ETH + 2 * p + 1);
  end

  port_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk, .rst_n, .push(rx_push), .din(rx_data), .pop(sel_rx), .dout(rx_dout),
    .empty(rx_empty), .full(rx_full), .count(rx_count),
    .cfg_hi(cfg_fifo_hi), .cfg_lo(cfg_fifo_lo), .hi_thresh(rx_hi), .lo_thresh(rx_lo),
    .overflow(rx_overflow), .underflow(rx_underflow)
  );

  port_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk, .rst_n, .push(sel_tx), .din(mem_rdata), .pop(tx_pop), .dout(tx_data),
    .empty(tx_empty), .full(tx_full), .count(tx_count),
    .cfg_hi(cfg_fifo_hi), .cfg_lo(cfg_fifo_lo), .hi_thresh(tx_hi), .lo_thresh(tx_lo),
    .overflow(tx_overflow), .underflow(tx_underflow)
  );

  // -------------------------------------------------------- security engine
  logic        sec_in_ready, sec_out_valid, sec_out_sop, sec_out_eop;
  logic [31:0] sec_out_data;

  security_engine u_sec (
    .clk, .rst_n,
    .ctx_we, .ctx_idx, .ctx_wdata,
    .in_valid(sel_sin), .in_ready(sec_in_ready), .in_data(mem_rdata),
    .in_sop(mem_rsop), .in_eop(mem_reop), .in_ctx(mem_rctx),
    .in_op_valid(mem_rop_valid), .in_op(mem_rop),
    .out_valid(sec_out_valid), .out_ready(sel_sout), .out_data(sec_out_data),
    .out_sop(sec_out_sop), .out_eop(sec_out_eop)
  );

  // ------------------------------------------ serial and Ethernet ports
  for (genvar u = 0; u < 2; u++) begin : g_uart
    uart #(.DIV_W(16)) u_uart (
      .clk, .rst_n, .cfg_div(uart_cfg_div[u]),
      .tx_valid(uart_tx_valid[u]), .tx_ready(uart_tx_ready[u]),
      .tx_data(uart_tx_data[u]), .txd(uart_txd[u]),
      .rxd(uart_rxd[u]), .rx_valid(uart_rx_valid[u]), .rx_data(uart_rx_data[u]),
      .rx_read(uart_rx_read[u]), .rx_frame_err(uart_rx_frame_err[u]),
      .rx_overrun(uart_rx_overrun[u])
    );
  end

  // HDLC port: one byte per FIFO word (see the channel map above)
  logic        hrx_valid, hrx_sop, hrx_eop, hrx_fcs_ok, hrx_push;
  logic [7:0]  hrx_byte;
  logic [31:0] hrx_word, hrx_dout, htx_dout;
  logic        hrx_empty, hrx_full, hrx_hi, hrx_lo, hrx_overflow, hrx_underflow;
  logic        htx_empty, htx_full, htx_hi, htx_lo, htx_overflow, htx_underflow;
  logic        htx_ready, htx_pop;
  logic [$clog2(FIFO_DEPTH):0] hrx_count, htx_count;

  assign hrx_push = hrx_valid || hdlc_rx_err;
  assign hrx_word = {20'd0, hdlc_rx_err, hrx_fcs_ok, hrx_eop, hrx_sop, hrx_byte};
  assign htx_pop  = !htx_empty && htx_ready;

  hdlc #(.DIV_W(8)) u_hdlc (
    .clk, .rst_n, .cfg_div(hdlc_cfg_div),
    .tx_valid(!htx_empty), .tx_ready(htx_ready), .tx_data(htx_dout[7:0]),
    .tx_sop(htx_dout[8]), .tx_eop(htx_dout[9]), .tx_abort(hdlc_tx_abort),
    .rx_valid(hrx_valid), .rx_data(hrx_byte), .rx_sop(hrx_sop),
    .rx_eop(hrx_eop), .rx_fcs_ok(hrx_fcs_ok), .rx_err(hdlc_rx_err),
    .ser_txd(hdlc_txd), .ser_rxd(hdlc_rxd)
  );

  port_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_hdlc_rx_fifo (
    .clk, .rst_n, .push(hrx_push), .din(hrx_word), .pop(sel_hrx), .dout(hrx_dout),
    .empty(hrx_empty), .full(hrx_full), .count(hrx_count),
    .cfg_hi(cfg_fifo_hi), .cfg_lo(cfg_fifo_lo), .hi_thresh(hrx_hi), .lo_thresh(hrx_lo),
    .overflow(hrx_overflow), .underflow(hrx_underflow)
  );

  port_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_hdlc_tx_fifo (
    .clk, .rst_n, .push(sel_htx), .din(mem_rdata), .pop(htx_pop), .dout(htx_dout),
    .empty(htx_empty), .full(htx_full), .count(htx_count),
    .cfg_hi(cfg_fifo_hi), .cfg_lo(cfg_fifo_lo), .hi_thresh(htx_hi), .lo_thresh(htx_lo),
    .overflow(htx_overflow), .underflow(htx_underflow)
  );

  // Ethernet ports: one byte per FIFO word, as on the HDLC port (bit 10 is
  // the MAC's good-frame flag)
  logic [31:0] erx_dout [2], etx_dout [2];
  logic [1:0]  erx_empty, erx_hi, etx_full, etx_lo;

  for (genvar p = 0; p < 2; p++) begin : g_eth
    logic        rv, rsop, reop, rgood, tready, tpop;
    logic [7:0]  rbyte;
    logic        r_full, r_lo, r_over, r_under, t_empty, t_hi, t_over, t_under;
    logic [$clog2(FIFO_DEPTH):0] r_count, t_count;

    assign tpop = !t_empty && tready;

    eth_mac #(.DIV_W(8)) u_mac (
      .clk, .rst_n, .cfg_div(eth_cfg_div),
      .tx_valid(!t_empty), .tx_ready(tready), .tx_data(etx_dout[p][7:0]),
      .tx_sop(etx_dout[p][8]), .tx_eop(etx_dout[p][9]), .tx_abort(eth_tx_abort[p]),
      .rx_valid(rv), .rx_data(rbyte), .rx_sop(rsop), .rx_eop(reop),
      .rx_good(rgood), .rx_err(eth_rx_err[p]),
      .mii_tx_en(mii_tx_en[p]), .mii_txd(mii_txd[p]), .mii_tx_er(mii_tx_er[p]),
      .mii_rx_dv(mii_rx_dv[p]), .mii_rxd(mii_rxd[p]), .mii_rx_er(mii_rx_er[p])
    );

    port_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
      .clk, .rst_n, .push(rv || eth_rx_err[p]),
      .din({20'd0, eth_rx_err[p], rgood, reop, rsop, rbyte}),
      .pop(sel_erx[p]), .dout(erx_dout[p]),
      .empty(erx_empty[p]), .full(r_full), .count(r_count),
      .cfg_hi(cfg_fifo_hi), .cfg_lo(cfg_fifo_lo), .hi_thresh(erx_hi[p]), .lo_thresh(r_lo),
      .overflow(r_over), .underflow(r_under)
    );

    port_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
      .clk, .rst_n, .push(sel_etx[p]), .din(mem_rdata), .pop(tpop), .dout(etx_dout[p]),
      .empty(t_empty), .full(etx_full[p]), .count(t_count),
      .cfg_hi(cfg_fifo_hi), .cfg_lo(cfg_fifo_lo), .hi_thresh(t_hi), .lo_thresh(etx_lo[p]),
      .overflow(t_over), .underflow(t_under)
    );
  end

  // ATM port: bytes with their circuit number, one per FIFO word; the AAL5
  // FIFO pair (a*) and the AAL0 FIFO pair (z*) share the segmenter and the
  // reassembler
  logic        arx_valid, arx_sop, arx_end, arx_good, arx_aal0, atx_ready, atx_pop;
  logic        zrx_empty, zrx_full, zrx_hi, zrx_lo, zrx_overflow, zrx_underflow;
  logic        ztx_empty, ztx_full, ztx_hi, ztx_lo, ztx_overflow, ztx_underflow;
  logic        ztx_pop, seg_src, seg_src_q, seg_in_frame, seg_valid;
  logic [31:0] zrx_dout, ztx_dout, seg_word;
  logic [$clog2(FIFO_DEPTH):0] zrx_count, ztx_count;
  logic [7:0]  arx_byte;
  logic [15:0] arx_len;
  logic [4:0]  arx_vc;
  logic [31:0] arx_word, arx_dout, atx_dout;
  logic        arx_empty, arx_full, arx_hi, arx_lo, arx_overflow, arx_underflow;
  logic        atx_empty, atx_full, atx_hi, atx_lo, atx_overflow, atx_underflow;
  logic [$clog2(FIFO_DEPTH):0] arx_count, atx_count;

  assign arx_word = {11'd0, arx_vc, 5'd0, arx_good, arx_end, arx_sop, arx_byte};
  // a frame is taken whole from one transmit FIFO (1 = AAL0)
  assign seg_src   = seg_in_frame ? seg_src_q : atx_empty;
  assign seg_valid = seg_src ? !ztx_empty : !atx_empty;
  assign seg_word  = seg_src ? ztx_dout : atx_dout;
  assign atx_pop   = !seg_src && !atx_empty && atx_ready;
  assign ztx_pop   = seg_src && !ztx_empty && atx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seg_in_frame <= 1'b0;
      seg_src_q    <= 1'b0;
    end else if (seg_valid && atx_ready) begin
      seg_in_frame <= !seg_word[9];
      seg_src_q    <= seg_src;
    end
  end

  atm_aal5 u_atm (
    .clk, .rst_n,
    .cfg_we(atm_cfg_we), .cfg_vc(atm_cfg_vc), .cfg_en(atm_cfg_en), .cfg_aal0(atm_cfg_aal0),
    .cfg_vpi(atm_cfg_vpi), .cfg_vci(atm_cfg_vci),
    .tx_valid(seg_valid), .tx_ready(atx_ready), .tx_data(seg_word[7:0]),
    .tx_sop(seg_word[8]), .tx_eop(seg_word[9]), .tx_vc(seg_word[20:16]),
    .rx_valid(arx_valid), .rx_data(arx_byte), .rx_sop(arx_sop), .rx_end(arx_end),
    .rx_good(arx_good), .rx_len(arx_len), .rx_vc(arx_vc), .rx_aal0(arx_aal0),
    .rx_hec_err(atm_hec_err), .rx_unknown(atm_unknown),
    .utp_tx_valid, .utp_tx_ready, .utp_tx_data, .utp_tx_soc,
    .utp_rx_valid, .utp_rx_ready, .utp_rx_data, .utp_rx_soc
  );

  port_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_atm_rx_fifo (
    .clk, .rst_n, .push(arx_valid && !arx_aal0), .din(arx_word), .pop(sel_arx), .dout(arx_dout),
    .empty(arx_empty), .full(arx_full), .count(arx_count),
    .cfg_hi(cfg_fifo_hi), .cfg_lo(cfg_fifo_lo), .hi_thresh(arx_hi), .lo_thresh(arx_lo),
    .overflow(arx_overflow), .underflow(arx_underflow)
  );

  port_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_atm_tx_fifo (
    .clk, .rst_n, .push(sel_atx), .din(mem_rdata), .pop(atx_pop), .dout(atx_dout),
    .empty(atx_empty), .full(atx_full), .count(atx_count),
    .cfg_hi(cfg_fifo_hi), .cfg_lo(cfg_fifo_lo), .hi_thresh(atx_hi), .lo_thresh(atx_lo),
    .overflow(atx_overflow), .underflow(atx_underflow)
  );

  port_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_aal0_rx_fifo (
    .clk, .rst_n, .push(arx_valid && arx_aal0), .din(arx_word), .pop(sel_zrx), .dout(zrx_dout),
    .empty(zrx_empty), .full(zrx_full), .count(zrx_count),
    .cfg_hi(cfg_fifo_hi), .cfg_lo(cfg_fifo_lo), .hi_thresh(zrx_hi), .lo_thresh(zrx_lo),
    .overflow(zrx_overflow), .underflow(zrx_underflow)
  );

  port_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_aal0_tx_fifo (
    .clk, .rst_n, .push(sel_ztx), .din(mem_rdata), .pop(ztx_pop), .dout(ztx_dout),
    .empty(ztx_empty), .full(ztx_full), .count(ztx_count),
    .cfg_hi(cfg_fifo_hi), .cfg_lo(cfg_fifo_lo), .hi_thresh(ztx_hi), .lo_thresh(ztx_lo),
    .overflow(ztx_overflow), .underflow(ztx_underflow)
  );

  // ------------------------------------------------------------------ DMA
  logic [NCH-1:0] ch_req, ch_thresh;
  logic           dma_bus_req, dma_gnt;

  always_comb begin
    ch_req    = ext_ch_req;
    ch_thresh = ext_ch_thresh;
    ch_req[CH_RX]         = !rx_empty;
    ch_thresh[CH_RX]      = rx_hi;
    ch_req[CH_TX]         = !tx_full && ext_ch_req[CH_TX];
    ch_thresh[CH_TX]      = tx_lo;
    ch_req[CH_SEC_IN]     = sec_in_ready && ext_ch_req[CH_SEC_IN];
    ch_thresh[CH_SEC_IN]  = 1'b0;
    ch_req[CH_SEC_OUT]    = sec_out_valid;
    ch_thresh[CH_SEC_OUT] = 1'b0;
    ch_req[CH_HDLC_RX]    = !hrx_empty;
    ch_thresh[CH_HDLC_RX] = hrx_hi;
    ch_req[CH_HDLC_TX]    = !htx_full && ext_ch_req[CH_HDLC_TX];
    ch_thresh[CH_HDLC_TX] = htx_lo;
    ch_req[CH_ATM_RX]     = !arx_empty;
    ch_thresh[CH_ATM_RX]  = arx_hi;
    ch_req[CH_ATM_TX]     = !atx_full && ext_ch_req[CH_ATM_TX];
    ch_thresh[CH_ATM_TX]  = atx_lo;
    ch_req[CH_AAL0_RX]    = !zrx_empty;
    ch_thresh[CH_AAL0_RX] = zrx_hi;
    ch_req[CH_AAL0_TX]    = !ztx_full && ext_ch_req[CH_AAL0_TX];
    ch_thresh[CH_AAL0_TX] = ztx_lo;
    for (int p = 0; p < 2; p++) begin
      ch_req[CH_ETH + 2 * p]        = !erx_empty[p];
      ch_thresh[CH_ETH + 2 * p]     = erx_hi[p];
      ch_req[CH_ETH + 2 * p + 1]    = !etx_full[p] && ext_ch_req[CH_ETH + 2 * p + 1];
      ch_thresh[CH_ETH + 2 * p + 1] = etx_lo[p];
    end
  end

  dma_scheduler #(.NCH(NCH), .WEIGHT_W(8), .CNT_W(16), .FLOW_W(CLS_FLOW_W)) u_dma (
    .clk, .rst_n,
    .cfg_dma_cycles, .cfg_off_cycles, .cfg_rx_cycles,
    .cfg_ch_en, .cfg_ch_tx, .cfg_ch_weight,
    .ch_req, .ch_thresh,
    .bus_req(dma_bus_req), .bus_gnt(dma_gnt),
    .xfer_valid, .xfer_ch, .xfer_tx, .xfer_urgent, .dma_window,
    .flow_valid, .flow_id, .pkt_accept, .pkt_reject
  );

  bus_arbiter u_arb (
    .clk, .rst_n, .cpu_req, .cpu_lock, .dma_req(dma_bus_req),
    .cpu_gnt, .dma_gnt, .handover(bus_handover)
  );

  // ------------------------------------------------- memory side of the bus
  logic [31:0] erx_sel_word;
  assign erx_sel_word = sel_erx[1] ? erx_dout[1] : erx_dout[0];
  assign mem_wvalid = sel_rx || sel_sout || sel_hrx || |sel_erx || sel_arx || sel_zrx;
  assign mem_wdata  = sel_sout ? sec_out_data :
                      sel_hrx  ? hrx_dout     :
                      |sel_erx ? erx_sel_word :
                      sel_arx  ? arx_dout     :
                      sel_zrx  ? zrx_dout     : rx_dout;
  assign mem_wsop   = (sel_sout && sec_out_sop) || (sel_hrx && hrx_dout[8]) ||
                      (|sel_erx && erx_sel_word[8]) || (sel_arx && arx_dout[8]) ||
                      (sel_zrx && zrx_dout[8]);
  assign mem_weop   = (sel_sout && sec_out_eop) || (sel_hrx && hrx_dout[9]) ||
                      (|sel_erx && erx_sel_word[9]) || (sel_arx && arx_dout[9]) ||
                      (sel_zrx && zrx_dout[9]);

endmodule
