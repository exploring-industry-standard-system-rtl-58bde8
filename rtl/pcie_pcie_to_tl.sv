// pcie_pcie_to_tl: PCIeToTL protocol adapter of the endpoint shim (client).
//
// Turns the configuration reads and writes that the root complex sends to the
// endpoint into system-bus requests on the device's manager (register) port,
// and the device's responses into completions. A CfgRd0 becomes a Get of the
// word at DEV_BASE + 4 x register number; a CfgWr0 becomes a PutFullData with
// the TLP's first byte enables as mask. When the device answers, a CplD (for
// a read, with the data) or a Cpl (for a write) is sent back carrying the
// requester ID and tag of the request; a device error gives the status
// "unsupported request". Other TLP types are consumed without effect. One
// request is handled at a time; the bus source ID is always 0.
//
// Timing: one request at a time; the completion starts the cycle after the
// device answers. Origin: the adapter's role follows the reference; mapping
// the register number to DEV_BASE + 4*reg and the UR status on a device error
// are this design's choices.
module pcie_pcie_to_tl
  import pcie_pkg::*;
#(
  parameter logic [31:0] DEV_BASE = 32'h0000_0000,
  parameter logic [15:0] CPL_ID   = 16'h0100    // bus 1, device 0, function 0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  beat_t  rx,
  input  logic   rx_valid,
  output logic   rx_ready,
  output beat_t  tx,
  output logic   tx_valid,
  input  logic   tx_ready,
  output tl_a_t  dev_a,
  output logic   dev_a_valid,
  input  logic   dev_a_ready,
  input  tl_d_t  dev_d,
  input  logic   dev_d_valid,
  output logic   dev_d_ready
);
  typedef enum logic [1:0] {S_RX, S_REQ, S_RESP, S_CPL} state_e;
  state_e      st;
  logic [31:0] h [4];
  logic        is_wr;
  logic [1:0]  idx;
  logic [31:0] rdata;
  logic        err;

  assign is_wr  = (tlp_ft(h[0]) == FT_CFGWR);

  assign rx_ready    = (st == S_RX);
  assign dev_a_valid = (st == S_REQ);
  assign dev_d_ready = (st == S_RESP);

  always_comb begin
    dev_a         = '0;
    dev_a.opcode  = is_wr ? TL_PUT : TL_GET;
    dev_a.size    = 3'd2;
    dev_a.address = DEV_BASE + {20'h0, h[2][11:2], 2'b00};
    dev_a.mask    = is_wr ? h[1][3:0] : 4'hF;
    dev_a.data    = h[3];
  end

  always_comb begin
    tx       = '0;
    tx_valid = (st == S_CPL);
    case (idx)
      2'd0:    tx.data = mk_dw0(is_wr ? FT_CPL : FT_CPLD, 3'd0, 1'b0, is_wr ? 10'd0 : 10'd1);
      2'd1:    tx.data = {CPL_ID, err ? 3'b001 : 3'b000, 1'b0, 12'd4};
      2'd2:    tx.data = {h[1][31:16], h[1][15:8], 8'h00};
      default: tx.data = rdata;
    endcase
    tx.sop = (idx == 2'd0);
    tx.eop = is_wr ? (idx == 2'd2) : (idx == 2'd3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_RX;
      idx   <= '0;
      rdata <= '0;
      err   <= 1'b0;
      for (int i = 0; i < 4; i++) h[i] <= '0;
    end else begin
      case (st)
        S_RX: if (rx_valid) begin
          h[rx.sop ? 2'd0 : idx] <= rx.data;
          idx <= rx.sop ? 2'd1 : ((idx == 2'd3) ? 2'd3 : idx + 2'd1);
          if (rx.eop) begin
            idx <= '0;
            // a configuration request goes on; anything else is consumed
            if (tlp_ft(rx.sop ? rx.data : h[0]) == FT_CFGRD ||
                tlp_ft(rx.sop ? rx.data : h[0]) == FT_CFGWR) st <= S_REQ;
          end
        end
        S_REQ: if (dev_a_ready) st <= S_RESP;
        S_RESP: if (dev_d_valid) begin
          rdata <= dev_d.data;
          err   <= dev_d.error;
          st    <= S_CPL;
        end
        default: if (tx_ready) begin
          idx <= idx + 2'd1;
          if (tx.eop) begin
            st  <= S_RX;
            idx <= '0;
          end
        end
      endcase
    end
  end
endmodule
