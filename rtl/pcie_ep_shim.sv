// pcie_ep_shim: endpoint side of the PCIe model with the optional MMIO shim.
//
// An instance of the protocol stack, followed by the shim that lets an
// existing memory-mapped device sit behind PCIe unchanged. The shim holds two
// protocol adapters and an interrupt path:
//
//   PCIeToTL (client): configuration reads/writes from the root complex become
//     requests on the device's register (manager) port; replies become
//     completions.
//   TLToPCIe (manager): the device's DMA requests become MRd/MWr TLPs;
//     completions become bus responses.
//   interrupts: a rising edge on irq[i] sends an MSI, a one-DW memory write of
//     value i to MSI_ADDR.
//
// The arbiter merges the three TLP sources packet by packet (round robin) into
// the stack; incoming TLPs are routed by type, configuration requests to
// PCIeToTL and completions to TLToPCIe, the rest dropped. An MSI raised while
// a previous one still waits is remembered per vector and sent afterwards.
//
// Timing: adds one registered stage of header holding in the router; the MSI
// goes out a few cycles after the interrupt's rising edge. Origin: the two
// adapters, the arbiter, the router and the interrupt-to-MSI conversion follow
// the reference; edge detection and the vector as MSI data are this
// design's choices.
module pcie_ep_shim
  import pcie_pkg::*;
#(
  parameter int          NUM_VC        = 1,
  parameter int          LANES         = 8,
  parameter int          SYMS_PER_LANE = 1,
  parameter int          HDR_CREDITS   = 32,
  parameter int          DATA_CREDITS  = 256,
  parameter int          NUM_IRQ       = 1,
  parameter logic [31:0] MSI_ADDR      = 32'hFEE0_0000,
  parameter logic [31:0] DEV_BASE      = 32'h0000_0000,
  parameter logic [15:0] EP_ID         = 16'h0100,
  localparam int         G             = LANES * SYMS_PER_LANE
) (
  input  logic          clk,
  input  logic          rst_n,
  // to the device's manager (register) port
  output tl_a_t         mgr_a,
  output logic          mgr_a_valid,
  input  logic          mgr_a_ready,
  input  tl_d_t         mgr_d,
  input  logic          mgr_d_valid,
  output logic          mgr_d_ready,
  // from the device's client (DMA) port
  input  tl_a_t         cli_a,
  input  logic          cli_a_valid,
  output logic          cli_a_ready,
  output tl_d_t         cli_d,
  output logic          cli_d_valid,
  input  logic          cli_d_ready,
  // device interrupts
  input  logic [NUM_IRQ-1:0] irq,
  // link
  output sym_t [G-1:0]  link_tx,
  output logic          link_tx_valid,
  input  logic          link_tx_ready,
  input  sym_t [G-1:0]  link_rx,
  input  logic          link_rx_valid,
  // events
  output logic          credit_stall,
  output logic          replay_start,
  output logic          fc_update_sent, // an UpdateFC DLLP was sent
  output logic          link_err        // a TLP or DLLP arrived damaged
);
  beat_t       s_tx, s_rx;
  logic        s_tx_valid, s_tx_ready, s_rx_valid, s_rx_ready;
  logic        ecrc_err, lcrc_err, dllp_err;

  pcie_protocol_stack #(.NUM_VC(NUM_VC), .LANES(LANES), .SYMS_PER_LANE(SYMS_PER_LANE),
                        .HDR_CREDITS(HDR_CREDITS), .DATA_CREDITS(DATA_CREDITS)) u_stack (
    .clk, .rst_n, .tlp_tx(s_tx), .tlp_tx_vc(3'd0), .tlp_tx_valid(s_tx_valid),
    .tlp_tx_ready(s_tx_ready), .tlp_rx(s_rx), .tlp_rx_vc(), .tlp_rx_valid(s_rx_valid),
    .tlp_rx_ready(s_rx_ready), .link_tx, .link_tx_valid, .link_tx_ready, .link_rx,
    .link_rx_valid, .credit_stall, .replay_start, .ecrc_err, .lcrc_err, .dllp_err,
    .fc_update_sent);

  assign link_err = ecrc_err || lcrc_err || dllp_err;

  // ------------------------------------------------------------ adapters
  beat_t p2t_tx, t2p_tx, msi_tx, p2t_rx, t2p_rx;
  logic  p2t_tx_valid, p2t_tx_ready, t2p_tx_valid, t2p_tx_ready, msi_tx_valid, msi_tx_ready;
  logic  p2t_rx_valid, p2t_rx_ready, t2p_rx_valid, t2p_rx_ready;

  pcie_pcie_to_tl #(.DEV_BASE(DEV_BASE), .CPL_ID(EP_ID)) u_p2t (
    .clk, .rst_n, .rx(p2t_rx), .rx_valid(p2t_rx_valid), .rx_ready(p2t_rx_ready), .tx(p2t_tx),
    .tx_valid(p2t_tx_valid), .tx_ready(p2t_tx_ready), .dev_a(mgr_a), .dev_a_valid(mgr_a_valid),
    .dev_a_ready(mgr_a_ready), .dev_d(mgr_d), .dev_d_valid(mgr_d_valid), .dev_d_ready(mgr_d_ready));

  pcie_tl_to_pcie #(.REQ_ID(EP_ID)) u_t2p (
    .clk, .rst_n, .dev_a(cli_a), .dev_a_valid(cli_a_valid), .dev_a_ready(cli_a_ready),
    .dev_d(cli_d), .dev_d_valid(cli_d_valid), .dev_d_ready(cli_d_ready), .tx(t2p_tx),
    .tx_valid(t2p_tx_valid), .tx_ready(t2p_tx_ready), .rx(t2p_rx), .rx_valid(t2p_rx_valid),
    .rx_ready(t2p_rx_ready));

  // ------------------------------------------------------------ interrupts
  localparam int IW = (NUM_IRQ > 1) ? $clog2(NUM_IRQ) : 1;
  logic [NUM_IRQ-1:0] irq_q, irq_pend;
  logic               msi_busy;
  logic [IW-1:0]      msi_vec;
  logic [1:0]         msi_idx;

  always_comb begin
    msi_tx       = '0;
    msi_tx_valid = msi_busy;
    case (msi_idx)
      2'd0:    msi_tx.data = mk_dw0(FT_MWR, 3'd0, 1'b0, 10'd1);
      2'd1:    msi_tx.data = {EP_ID, 8'h00, 4'h0, 4'hF};
      2'd2:    msi_tx.data = MSI_ADDR;
      default: msi_tx.data = 32'(msi_vec);
    endcase
    msi_tx.sop = (msi_idx == 2'd0);
    msi_tx.eop = (msi_idx == 2'd3);
  end

  logic [NUM_IRQ-1:0] irq_new;    // pending vectors including new edges
  assign irq_new = irq_pend | (irq & ~irq_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_q    <= '0;
      irq_pend <= '0;
      msi_busy <= 1'b0;
      msi_vec  <= '0;
      msi_idx  <= '0;
    end else begin
      irq_q    <= irq;
      irq_pend <= irq_new;
      if (!msi_busy) begin
        // the lowest pending vector is sent next
        for (int i = NUM_IRQ - 1; i >= 0; i--) begin
          if (irq_new[i]) begin
            msi_vec  <= IW'(i);
            msi_busy <= 1'b1;
          end
        end
        irq_pend <= irq_new & (irq_new - 1'b1);
        msi_idx  <= '0;
      end else if (msi_tx_ready) begin
        msi_idx <= msi_idx + 2'd1;
        if (msi_tx.eop) msi_busy <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------ arbiter
  beat_t      arb_in [3];
  logic [2:0] arb_valid, arb_ready;
  assign arb_in[0] = t2p_tx;
  assign arb_in[1] = p2t_tx;
  assign arb_in[2] = msi_tx;
  assign arb_valid = {msi_tx_valid, p2t_tx_valid, t2p_tx_valid};
  assign {msi_tx_ready, p2t_tx_ready, t2p_tx_ready} = arb_ready;

  pcie_tlp_arb #(.N(3)) u_arb (
    .clk, .rst_n, .in(arb_in), .in_valid(arb_valid), .in_ready(arb_ready),
    .out(s_tx), .out_valid(s_tx_valid), .out_ready(s_tx_ready));

  // ------------------------------------------------------------ router
  typedef enum logic [1:0] {R_P2T, R_T2P, R_DROP} route_e;
  route_e cur_q, cur;

  always_comb begin
    logic [7:0] ft;
    ft  = tlp_ft(s_rx.data);
    cur = cur_q;
    if (s_rx.sop) begin
      if (ft == FT_CFGRD || ft == FT_CFGWR) cur = R_P2T;
      else if (ft == FT_CPL || ft == FT_CPLD) cur = R_T2P;
      else cur = R_DROP;
    end
  end

  assign p2t_rx       = s_rx;
  assign t2p_rx       = s_rx;
  assign p2t_rx_valid = s_rx_valid && cur == R_P2T;
  assign t2p_rx_valid = s_rx_valid && cur == R_T2P;
  assign s_rx_ready   = (cur == R_P2T) ? p2t_rx_ready : (cur == R_T2P) ? t2p_rx_ready : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cur_q <= R_DROP;
    else if (s_rx_valid && s_rx_ready) cur_q <= cur;
  end
endmodule
