// atm_aal5: ATM port with AAL5 segmentation and reassembly (or AAL0 raw
// cells) for 32 circuits.
//
// The port joins a circuit table, the segmenter (atm_sar_tx) and the
// reassembler (atm_sar_rx). Table entry i holds the VPI and VCI of circuit
// i, an enable bit and the mode (AAL5, or AAL0 raw cells when cfg_aal0 is
// set); it is written by the CPU through cfg_we/cfg_vc. On
// transmit, a frame of bytes tagged with its circuit number is cut into
// cells whose header carries that circuit's VPI/VCI. On receive, cells are
// matched against the enabled entries and reassembled per circuit.
//
// Line side: an 8-bit cell interface in the style of UTOPIA (byte, start of
// cell, valid/ready in the same cycle). A full UTOPIA Level 2 PHY interface
// has a one-cycle enable-to-data delay and multi-PHY polling; here the ready
// of the transmit side stands for TxClav and that of the receive side for
// RxEnb. Timing: one byte per clock each way.
//
// From the document: the chip's ATM/AAL block with a UTOPIA interface and
// AAL0 and AAL5 protocol processing in hardware for 32 flows. Own choices:
// the valid/ready cell interface and the table port. AAL2, also named by
// the document, is not part of this block.
module atm_aal5
  import atm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // circuit table
  input  logic        cfg_we,
  input  logic [4:0]  cfg_vc,
  input  logic        cfg_en,
  input  logic        cfg_aal0,
  input  logic [7:0]  cfg_vpi,
  input  logic [15:0] cfg_vci,
  // frame bytes to send
  input  logic        tx_valid,
  output logic        tx_ready,
  input  logic [7:0]  tx_data,
  input  logic        tx_sop,
  input  logic        tx_eop,
  input  logic [4:0]  tx_vc,
  // reassembled frames
  output logic        rx_valid,
  output logic [7:0]  rx_data,
  output logic        rx_sop,
  output logic        rx_end,
  output logic        rx_good,
  output logic [15:0] rx_len,
  output logic [4:0]  rx_vc,
  output logic        rx_aal0,     // rx_vc is an AAL0 circuit
  output logic        rx_hec_err,
  output logic        rx_unknown,
  // cell interface
  output logic        utp_tx_valid,
  input  logic        utp_tx_ready,
  output logic [7:0]  utp_tx_data,
  output logic        utp_tx_soc,
  input  logic        utp_rx_valid,
  output logic        utp_rx_ready,
  input  logic [7:0]  utp_rx_data,
  input  logic        utp_rx_soc
);
  logic [NVC-1:0] vc_en, vc_aal0;
  logic [7:0]     vc_vpi [NVC];
  logic [15:0]    vc_vci [NVC];
  logic [4:0]     cur_vc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vc_en  <= '0;
      vc_aal0 <= '0;
      vc_vpi <= '{default: '0};
      vc_vci <= '{default: '0};
    end else if (cfg_we) begin
      vc_en[cfg_vc]  <= cfg_en;
      vc_aal0[cfg_vc] <= cfg_aal0;
      vc_vpi[cfg_vc] <= cfg_vpi;
      vc_vci[cfg_vc] <= cfg_vci;
    end
  end

  assign rx_aal0 = vc_aal0[rx_vc];

  atm_sar_tx u_tx (
    .clk, .rst_n,
    .in_valid(tx_valid), .in_ready(tx_ready), .in_data(tx_data),
    .in_sop(tx_sop), .in_eop(tx_eop), .in_vc(tx_vc), .in_aal0(vc_aal0[tx_vc]),
    .tx_vc(cur_vc), .hdr_vpi(vc_vpi[cur_vc]), .hdr_vci(vc_vci[cur_vc]),
    .out_valid(utp_tx_valid), .out_ready(utp_tx_ready),
    .out_data(utp_tx_data), .out_soc(utp_tx_soc)
  );

  atm_sar_rx u_rx (
    .clk, .rst_n, .vc_en, .vc_vpi, .vc_vci, .vc_aal0,
    .in_valid(utp_rx_valid), .in_ready(utp_rx_ready),
    .in_data(utp_rx_data), .in_soc(utp_rx_soc),
    .out_valid(rx_valid), .out_data(rx_data), .out_sop(rx_sop),
    .out_end(rx_end), .out_good(rx_good), .out_len(rx_len), .out_vc(rx_vc),
    .hec_err(rx_hec_err), .unknown(rx_unknown)
  );

endmodule
