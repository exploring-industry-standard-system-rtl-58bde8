// pcie_protocol_stack: the three-layer PCIe protocol stack of one link end.
//
// Transaction layer (TX buffers with TX credit counters, RX buffers with RX
// credit counters), data link layer (sequence numbers, LCRC, replay buffer,
// ACK/NAK and UpdateFC DLLPs) and physical layer (start/end symbols and
// serialisation onto the lanes) wired as in the usual PCIe stack:
//
//   tlp_tx -> tl_tx -> dll_tx -> phy_tx -> link_tx
//   link_rx -> phy_rx -> dll_rx -> tl_rx -> tlp_rx
//
// with the side paths dll_rx -> tl_tx (credit limits from UpdateFC),
// tl_rx -> dll_tx (UpdateFC to send), dll_rx -> dll_tx (ACK/NAK to send and
// ACK/NAK received). The upper side carries whole TLPs (3-DW header and
// payload, no digest), the lower side symbol groups. The same stack serves
// the root complex and the endpoint. Status pulses are brought out for
// counting.
//
// Origin: the three layers and their buffers follow the reference; the widths
// and depths are this design's choices (see the parameters).
module pcie_protocol_stack
  import pcie_pkg::*;
#(
  parameter int NUM_VC        = 1,
  parameter int LANES         = 8,
  parameter int SYMS_PER_LANE = 1,
  parameter int TX_BUF_DEPTH  = 256,
  parameter int HDR_CREDITS   = 32,
  parameter int DATA_CREDITS  = 256,
  parameter int REPLAY_DEPTH  = 512,
  parameter bit ECRC          = 1'b1,
  localparam int G            = LANES * SYMS_PER_LANE
) (
  input  logic          clk,
  input  logic          rst_n,
  // TLPs to send
  input  beat_t         tlp_tx,
  input  logic [2:0]    tlp_tx_vc,
  input  logic          tlp_tx_valid,
  output logic          tlp_tx_ready,
  // TLPs received
  output beat_t         tlp_rx,
  output logic [2:0]    tlp_rx_vc,
  output logic          tlp_rx_valid,
  input  logic          tlp_rx_ready,
  // link
  output sym_t [G-1:0]  link_tx,
  output logic          link_tx_valid,
  input  logic          link_tx_ready,
  input  sym_t [G-1:0]  link_rx,
  input  logic          link_rx_valid,
  // status pulses
  output logic          credit_stall,
  output logic          replay_start,
  output logic          ecrc_err,
  output logic          lcrc_err,
  output logic          dllp_err,
  output logic          fc_update_sent
);
  beat_t       tl2dl;
  logic        tl2dl_valid, tl2dl_ready;
  beat_t       dl2ph;
  logic        dl2ph_dllp, dl2ph_valid, dl2ph_ready;
  beat_t       ph2dl;
  logic        ph2dl_dllp, ph2dl_valid;
  beat_t       dl2tl;
  logic        dl2tl_valid;
  logic        fcr_valid;
  fc_upd_t     fcr;
  logic        fct_valid, fct_ready;
  fc_upd_t     fct;
  logic        ackreq_valid, ackreq_nak, rxack_valid, rxack_nak;
  logic [11:0] ackreq_seq, rxack_seq;
  logic [5:0]  unacked;

  pcie_tl_tx #(.NUM_VC(NUM_VC), .BUF_DEPTH(TX_BUF_DEPTH), .ECRC(ECRC)) u_tl_tx (
    .clk, .rst_n, .in(tlp_tx), .in_vc(tlp_tx_vc), .in_valid(tlp_tx_valid),
    .in_ready(tlp_tx_ready), .out(tl2dl), .out_valid(tl2dl_valid), .out_ready(tl2dl_ready),
    .fc_valid(fcr_valid), .fc(fcr), .credit_stall);

  pcie_tl_rx #(.NUM_VC(NUM_VC), .HDR_CREDITS(HDR_CREDITS), .DATA_CREDITS(DATA_CREDITS)) u_tl_rx (
    .clk, .rst_n, .in(dl2tl), .in_valid(dl2tl_valid), .out(tlp_rx), .out_vc(tlp_rx_vc),
    .out_valid(tlp_rx_valid), .out_ready(tlp_rx_ready), .fc_valid(fct_valid), .fc(fct),
    .fc_ready(fct_ready), .ecrc_err);

  pcie_dll_tx #(.REPLAY_DEPTH(REPLAY_DEPTH)) u_dll_tx (
    .clk, .rst_n, .in(tl2dl), .in_valid(tl2dl_valid), .in_ready(tl2dl_ready),
    .ackreq_valid, .ackreq_nak, .ackreq_seq, .fc_valid(fct_valid), .fc(fct),
    .fc_ready(fct_ready), .rxack_valid, .rxack_nak, .rxack_seq, .out(dl2ph),
    .out_dllp(dl2ph_dllp), .out_valid(dl2ph_valid), .out_ready(dl2ph_ready),
    .replay_start, .unacked);

  pcie_dll_rx u_dll_rx (
    .clk, .rst_n, .in(ph2dl), .in_dllp(ph2dl_dllp), .in_valid(ph2dl_valid),
    .out(dl2tl), .out_valid(dl2tl_valid), .ackreq_valid, .ackreq_nak, .ackreq_seq,
    .rxack_valid, .rxack_nak, .rxack_seq, .fc_valid(fcr_valid), .fc(fcr), .lcrc_err,
    .dllp_err);

  pcie_phy_tx #(.LANES(LANES), .SYMS_PER_LANE(SYMS_PER_LANE)) u_phy_tx (
    .clk, .rst_n, .in(dl2ph), .in_dllp(dl2ph_dllp), .in_valid(dl2ph_valid),
    .in_ready(dl2ph_ready), .grp(link_tx), .out_valid(link_tx_valid), .out_ready(link_tx_ready));

  pcie_phy_rx #(.LANES(LANES), .SYMS_PER_LANE(SYMS_PER_LANE)) u_phy_rx (
    .clk, .rst_n, .grp(link_rx), .in_valid(link_rx_valid), .out(ph2dl), .out_dllp(ph2dl_dllp),
    .out_valid(ph2dl_valid));

  assign fc_update_sent = fct_valid && fct_ready;
endmodule
