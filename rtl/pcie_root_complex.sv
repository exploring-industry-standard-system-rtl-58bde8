// pcie_root_complex: the root complex of the PCIe model.
//
// Joins a protocol stack to the system bus through four nodes: the MMIO node
// (root complex registers and the CPU interrupt), the endpoint manager node
// (CPU accesses to the endpoint, carried as configuration TLPs), and the DMA
// node with its memory client port (reads and writes on the endpoint's
// behalf). The packetization layer in between forms no TLPs itself (the
// nodes do) but routes: outgoing TLPs of the endpoint manager and the DMA node
// share the stack through a packet-level round-robin arbiter, and incoming
// TLPs are routed by type. The router holds the 3-DW header, then sends
// completions to the endpoint manager, memory writes to the MSI address to
// the MMIO node as interrupts, other memory reads and writes to the DMA node,
// and drops anything else. Routing by address is used only for the MSI
// address; the MSI address itself is this design's choice.
module pcie_root_complex
  import pcie_pkg::*;
#(
  parameter int          NUM_VC        = 1,
  parameter int          LANES         = 8,
  parameter int          SYMS_PER_LANE = 1,
  parameter int          HDR_CREDITS   = 32,
  parameter int          DATA_CREDITS  = 256,
  parameter int          MAX_READ_DW   = 64,
  parameter logic [31:0] MSI_ADDR      = 32'hFEE0_0000,
  localparam int         G             = LANES * SYMS_PER_LANE
) (
  input  logic          clk,
  input  logic          rst_n,
  // endpoint manager node (CPU -> endpoint)
  input  tl_a_t         epm_a,
  input  logic          epm_a_valid,
  output logic          epm_a_ready,
  output tl_d_t         epm_d,
  output logic          epm_d_valid,
  input  logic          epm_d_ready,
  // MMIO node (root complex registers)
  input  tl_a_t         mmio_a,
  input  logic          mmio_a_valid,
  output logic          mmio_a_ready,
  output tl_d_t         mmio_d,
  output logic          mmio_d_valid,
  input  logic          mmio_d_ready,
  // DMA node (root complex -> memory)
  output tl_a_t         dma_a,
  output logic          dma_a_valid,
  input  logic          dma_a_ready,
  input  tl_d_t         dma_d,
  input  logic          dma_d_valid,
  output logic          dma_d_ready,
  output logic          irq,
  // link
  output sym_t [G-1:0]  link_tx,
  output logic          link_tx_valid,
  input  logic          link_tx_ready,
  input  sym_t [G-1:0]  link_rx,
  input  logic          link_rx_valid,
  // events, for counting
  output logic          credit_stall,
  output logic          replay_start,
  output logic          reorder_event,
  output logic          msi_event,
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

  // ------------------------------------------------------------ TX side
  beat_t       arb_in [2];
  logic [1:0]  arb_valid, arb_ready;
  beat_t       epm_tx, dma_tx;
  logic        epm_tx_valid, epm_tx_ready, dma_tx_valid, dma_tx_ready;

  assign arb_in[0]    = epm_tx;
  assign arb_in[1]    = dma_tx;
  assign arb_valid    = {dma_tx_valid, epm_tx_valid};
  assign epm_tx_ready = arb_ready[0];
  assign dma_tx_ready = arb_ready[1];

  pcie_tlp_arb #(.N(2)) u_arb (
    .clk, .rst_n, .in(arb_in), .in_valid(arb_valid), .in_ready(arb_ready),
    .out(s_tx), .out_valid(s_tx_valid), .out_ready(s_tx_ready));

  // ------------------------------------------------------------ RX router
  typedef enum logic [2:0] {D_EPM, D_DMA, D_MSI, D_DROP} dest_e;
  logic [31:0] rh [3];
  logic [1:0]  ridx;
  logic        fwd;         // header held, forwarding
  beat_t       fbeat;
  logic        fvalid, fready;
  beat_t       epm_rx, dma_rx;
  logic        epm_rx_valid, epm_rx_ready, dma_rx_valid, dma_rx_ready;
  dest_e       dsel;

  always_comb begin
    logic [7:0] ft;
    ft = tlp_ft(rh[0]);
    if (ft == FT_CPL || ft == FT_CPLD) dsel = D_EPM;
    else if (ft == FT_MWR && rh[2] == MSI_ADDR) dsel = D_MSI;
    else if (ft == FT_MWR || ft == FT_MRD) dsel = D_DMA;
    else dsel = D_DROP;
  end

  // beat being forwarded: the held header, then the payload from the stack
  always_comb begin
    fbeat  = '0;
    fvalid = 1'b0;
    if (fwd) begin
      if (ridx != 2'd3) begin
        fbeat.data = rh[ridx];
        fbeat.sop  = (ridx == 2'd0);
        fbeat.eop  = (ridx == 2'd2) && !tlp_has_data(rh[0]);
        fvalid     = 1'b1;
      end else begin
        fbeat  = s_rx;
        fvalid = s_rx_valid;
      end
    end
  end

  always_comb begin
    epm_rx       = fbeat;
    dma_rx       = fbeat;
    epm_rx_valid = fwd && fvalid && dsel == D_EPM;
    dma_rx_valid = fwd && fvalid && dsel == D_DMA;
    case (dsel)
      D_EPM:   fready = epm_rx_ready;
      D_DMA:   fready = dma_rx_ready;
      default: fready = 1'b1;
    endcase
    s_rx_ready = !fwd || (ridx == 2'd3 && fready);
  end

  logic        msi_valid;
  logic [31:0] msi_data;
  assign msi_valid = fwd && fvalid && dsel == D_MSI && ridx == 2'd3;
  assign msi_data  = fbeat.data;
  assign msi_event = msi_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ridx <= '0;
      fwd  <= 1'b0;
      for (int i = 0; i < 3; i++) rh[i] <= '0;
    end else if (!fwd) begin
      if (s_rx_valid) begin
        rh[ridx] <= s_rx.data;
        if (ridx == 2'd2) begin
          fwd  <= 1'b1;
          ridx <= 2'd0;
        end else begin
          ridx <= ridx + 2'd1;
        end
      end
    end else begin
      if (fvalid && fready) begin
        if (fbeat.eop) begin
          fwd  <= 1'b0;
          ridx <= 2'd0;
        end else if (ridx != 2'd3) begin
          ridx <= ridx + 2'd1;
        end
      end
    end
  end

  // ------------------------------------------------------------ nodes
  pcie_rc_ep_manager u_epm (
    .clk, .rst_n, .a(epm_a), .a_valid(epm_a_valid), .a_ready(epm_a_ready), .d(epm_d),
    .d_valid(epm_d_valid), .d_ready(epm_d_ready), .tx(epm_tx), .tx_valid(epm_tx_valid),
    .tx_ready(epm_tx_ready), .rx(epm_rx), .rx_valid(epm_rx_valid), .rx_ready(epm_rx_ready));

  pcie_rc_dma #(.MAX_READ_DW(MAX_READ_DW)) u_dma (
    .clk, .rst_n, .rx(dma_rx), .rx_valid(dma_rx_valid), .rx_ready(dma_rx_ready), .tx(dma_tx),
    .tx_valid(dma_tx_valid), .tx_ready(dma_tx_ready), .mem_a(dma_a), .mem_a_valid(dma_a_valid),
    .mem_a_ready(dma_a_ready), .mem_d(dma_d), .mem_d_valid(dma_d_valid),
    .mem_d_ready(dma_d_ready), .reorder_event);

  pcie_rc_mmio u_mmio (
    .clk, .rst_n, .a(mmio_a), .a_valid(mmio_a_valid), .a_ready(mmio_a_ready), .d(mmio_d),
    .d_valid(mmio_d_valid), .d_ready(mmio_d_ready), .msi_valid, .msi_data,
    .err_event(link_err), .replay_event(replay_start), .irq);
endmodule
