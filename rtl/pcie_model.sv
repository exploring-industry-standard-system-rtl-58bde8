// pcie_model: complete PCIe link model between a host system bus and an
// MMIO device.
//
//   CPU --epm/mmio--> root complex --link--> timing model --> endpoint stack
//   memory <--dma---  (protocol stack)  <--  timing model <-- + MMIO shim --> device
//
// The root complex turns CPU accesses into configuration TLPs and serves the
// device's DMA from system memory; the endpoint shim turns those TLPs into
// bus requests on the device's register port and the device's DMA requests
// into memory TLPs, and sends its interrupts as MSIs. Both ends run the same
// protocol stack (flow control, ACK/NAK, replay). The link in each direction
// is a timing model that delays every symbol group by PHY_LATENCY cycles; the
// lane count sets how many symbols cross per cycle.
//
// All ports are plain structs and signals. err_inject[0] corrupts one TLP on
// the root-complex-to-endpoint link and err_inject[1] one on the way back
// (test hooks for the ACK/NAK replay). The event outputs pulse once per
// occurrence and exist for measurement.
//
// Origin: the overall structure (root complex, timing model, endpoint stack
// and shim) follows the reference architecture; the bus format, the event
// outputs and err_inject are this design's.
module pcie_model
  import pcie_pkg::*;
#(
  parameter int          NUM_VC        = 1,
  parameter int          LANES         = 8,
  parameter int          SYMS_PER_LANE = 1,
  parameter int          PHY_LATENCY   = 500,
  parameter int          LINK_DEPTH    = 512,
  parameter int          HDR_CREDITS   = 32,
  parameter int          DATA_CREDITS  = 256,
  parameter int          MAX_READ_DW   = 64,
  parameter int          NUM_IRQ       = 1,
  parameter logic [31:0] MSI_ADDR      = 32'hFEE0_0000
) (
  input  logic               clk,
  input  logic               rst_n,
  // host side: endpoint manager node
  input  tl_a_t              epm_a,
  input  logic               epm_a_valid,
  output logic               epm_a_ready,
  output tl_d_t              epm_d,
  output logic               epm_d_valid,
  input  logic               epm_d_ready,
  // host side: MMIO node
  input  tl_a_t              mmio_a,
  input  logic               mmio_a_valid,
  output logic               mmio_a_ready,
  output tl_d_t              mmio_d,
  output logic               mmio_d_valid,
  input  logic               mmio_d_ready,
  // host side: DMA node to memory
  output tl_a_t              dma_a,
  output logic               dma_a_valid,
  input  logic               dma_a_ready,
  input  tl_d_t              dma_d,
  input  logic               dma_d_valid,
  output logic               dma_d_ready,
  output logic               irq,
  // device side: register port
  output tl_a_t              dev_mgr_a,
  output logic               dev_mgr_a_valid,
  input  logic               dev_mgr_a_ready,
  input  tl_d_t              dev_mgr_d,
  input  logic               dev_mgr_d_valid,
  output logic               dev_mgr_d_ready,
  // device side: DMA port
  input  tl_a_t              dev_cli_a,
  input  logic               dev_cli_a_valid,
  output logic               dev_cli_a_ready,
  output tl_d_t              dev_cli_d,
  output logic               dev_cli_d_valid,
  input  logic               dev_cli_d_ready,
  input  logic [NUM_IRQ-1:0] dev_irq,
  // test hooks and events
  input  logic [1:0]         err_inject,
  output logic [1:0]         credit_stall,   // [0] root complex, [1] endpoint
  output logic [1:0]         replay_start,
  output logic               reorder_event,
  output logic               msi_event,
  output logic [1:0]         fc_update,      // UpdateFC DLLP sent
  output logic [1:0]         link_err        // damaged TLP or DLLP received
);
  localparam int G = LANES * SYMS_PER_LANE;

  sym_t [G-1:0] rc_tx, rc_rx, ep_tx, ep_rx;
  logic rc_tx_valid, rc_tx_ready, rc_rx_valid, ep_tx_valid, ep_tx_ready, ep_rx_valid;

  pcie_root_complex #(.NUM_VC(NUM_VC), .LANES(LANES), .SYMS_PER_LANE(SYMS_PER_LANE),
                      .HDR_CREDITS(HDR_CREDITS), .DATA_CREDITS(DATA_CREDITS),
                      .MAX_READ_DW(MAX_READ_DW), .MSI_ADDR(MSI_ADDR)) u_rc (
    .clk, .rst_n, .epm_a, .epm_a_valid, .epm_a_ready, .epm_d, .epm_d_valid, .epm_d_ready,
    .mmio_a, .mmio_a_valid, .mmio_a_ready, .mmio_d, .mmio_d_valid, .mmio_d_ready,
    .dma_a, .dma_a_valid, .dma_a_ready, .dma_d, .dma_d_valid, .dma_d_ready, .irq,
    .link_tx(rc_tx), .link_tx_valid(rc_tx_valid), .link_tx_ready(rc_tx_ready),
    .link_rx(rc_rx), .link_rx_valid(rc_rx_valid), .credit_stall(credit_stall[0]),
    .replay_start(replay_start[0]), .reorder_event, .msi_event,
    .fc_update_sent(fc_update[0]), .link_err(link_err[0]));

  pcie_timing_model #(.LANES(LANES), .SYMS_PER_LANE(SYMS_PER_LANE), .LATENCY(PHY_LATENCY),
                      .DEPTH(LINK_DEPTH)) u_down (
    .clk, .rst_n, .in_grp(rc_tx), .in_valid(rc_tx_valid), .in_ready(rc_tx_ready),
    .out_grp(ep_rx), .out_valid(ep_rx_valid), .err_inject(err_inject[0]));

  pcie_timing_model #(.LANES(LANES), .SYMS_PER_LANE(SYMS_PER_LANE), .LATENCY(PHY_LATENCY),
                      .DEPTH(LINK_DEPTH)) u_up (
    .clk, .rst_n, .in_grp(ep_tx), .in_valid(ep_tx_valid), .in_ready(ep_tx_ready),
    .out_grp(rc_rx), .out_valid(rc_rx_valid), .err_inject(err_inject[1]));

  pcie_ep_shim #(.NUM_VC(NUM_VC), .LANES(LANES), .SYMS_PER_LANE(SYMS_PER_LANE),
                 .HDR_CREDITS(HDR_CREDITS), .DATA_CREDITS(DATA_CREDITS), .NUM_IRQ(NUM_IRQ),
                 .MSI_ADDR(MSI_ADDR)) u_ep (
    .clk, .rst_n, .mgr_a(dev_mgr_a), .mgr_a_valid(dev_mgr_a_valid),
    .mgr_a_ready(dev_mgr_a_ready), .mgr_d(dev_mgr_d), .mgr_d_valid(dev_mgr_d_valid),
    .mgr_d_ready(dev_mgr_d_ready), .cli_a(dev_cli_a), .cli_a_valid(dev_cli_a_valid),
    .cli_a_ready(dev_cli_a_ready), .cli_d(dev_cli_d), .cli_d_valid(dev_cli_d_valid),
    .cli_d_ready(dev_cli_d_ready), .irq(dev_irq), .link_tx(ep_tx), .link_tx_valid(ep_tx_valid),
    .link_tx_ready(ep_tx_ready), .link_rx(ep_rx), .link_rx_valid(ep_rx_valid),
    .credit_stall(credit_stall[1]), .replay_start(replay_start[1]),
    .fc_update_sent(fc_update[1]), .link_err(link_err[1]));
endmodule
