// pcie_rc_mmio: MMIO node of the root complex.
//
// The root complex's own configuration and status registers on the system
// bus, and its interrupt line to the CPU. MSIs that reach the root complex
// (memory writes to the MSI address) set the pending bit of their vector,
// data[4:0]; the interrupt output is high while any pending and enabled
// vector exists. Register map (32-bit words, offset address[7:2]):
//
//   0x00 ID           read-only, 32'h5043_4965
//   0x04 INT_PENDING  pending MSI vectors; writing 1 clears a bit
//   0x08 INT_ENABLE   read/write
//   0x0C MSI_COUNT    read-only, MSIs received
//   0x10 LAST_MSI     read-only, data of the last MSI
//   0x14 ERR_COUNT    read-only, link errors seen (ECRC, LCRC, DLLP CRC)
//   0x18 REPLAY_COUNT read-only, replays started by the root complex
//
// The register set is this design's own; the document names the node and
// its role but not its registers. Every request is answered in the cycle
// after it is accepted; one request is handled at a time.
module pcie_rc_mmio
  import pcie_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  tl_a_t       a,
  input  logic        a_valid,
  output logic        a_ready,
  output tl_d_t       d,
  output logic        d_valid,
  input  logic        d_ready,
  input  logic        msi_valid,
  input  logic [31:0] msi_data,
  input  logic        err_event,
  input  logic        replay_event,
  output logic        irq
);
  localparam logic [31:0] ID = 32'h5043_4965;

  logic [31:0] pending, enable, msi_count, last_msi, err_count, replay_count;
  logic [31:0] rdata;

  assign a_ready = !d_valid;
  assign irq     = |(pending & enable);

  always_comb begin
    case (a.address[7:2])
      6'h00:   rdata = ID;
      6'h01:   rdata = pending;
      6'h02:   rdata = enable;
      6'h03:   rdata = msi_count;
      6'h04:   rdata = last_msi;
      6'h05:   rdata = err_count;
      6'h06:   rdata = replay_count;
      default: rdata = 32'h0;
    endcase
  end

  // INT_PENDING: write one to clear, MSI sets the bit of its vector
  logic [31:0] clr, set;
  assign clr = (a_valid && a_ready && a.opcode != TL_GET && a.address[7:2] == 6'h01) ?
               a.data : 32'h0;
  assign set = msi_valid ? (32'h1 << msi_data[4:0]) : 32'h0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending      <= '0;
      enable       <= '0;
      msi_count    <= '0;
      last_msi     <= '0;
      err_count    <= '0;
      replay_count <= '0;
      d            <= '0;
      d_valid      <= 1'b0;
    end else begin
      if (d_valid && d_ready) d_valid <= 1'b0;
      if (a_valid && a_ready) begin
        d_valid  <= 1'b1;
        d.source <= a.source;
        d.error  <= 1'b0;
        if (a.opcode == TL_GET) begin
          d.opcode <= TL_ACKD;
          d.data   <= rdata;
        end else begin
          d.opcode <= TL_ACK;
          d.data   <= '0;
          if (a.address[7:2] == 6'h02) enable <= a.data;
        end
      end
      if (msi_valid) begin
        msi_count <= msi_count + 32'd1;
        last_msi  <= msi_data;
      end
      pending <= (pending & ~clr) | set;
      if (err_event) err_count <= err_count + 32'd1;
      if (replay_event) replay_count <= replay_count + 32'd1;
    end
  end
endmodule
