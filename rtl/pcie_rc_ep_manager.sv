// pcie_rc_ep_manager: endpoint manager node of the root complex.
//
// A memory-mapped window through which the CPU reaches the endpoint. Each
// system-bus request becomes a configuration TLP: a Get becomes a CfgRd0 and
// a PutFullData a CfgWr0 carrying the data, addressed to register
// address[11:2] of bus 1, device 0, function 0, with the byte mask as first
// byte enables. The bus source ID is used as the TLP tag, so the completion
// that comes back (Cpl or CplD) is answered on the D channel with the same
// source: AccessAckData with the data for a CplD, AccessAck for a Cpl, and
// the error flag set when the completion status is not successful. Several
// requests may be in flight; the model delivers completions in order.
//
// Timing: one CPU access at a time; the bus response is given when the
// completion returns, about two link latencies later. Origin: turning CPU
// accesses into configuration requests follows the reference; the address
// mapping is this design's.
module pcie_rc_ep_manager
  import pcie_pkg::*;
#(
  parameter logic [15:0] REQ_ID = 16'h0000,   // bus 0, device 0, function 0
  parameter logic [7:0]  EP_BUS = 8'd1
) (
  input  logic   clk,
  input  logic   rst_n,
  // system bus manager port (from the CPU)
  input  tl_a_t  a,
  input  logic   a_valid,
  output logic   a_ready,
  output tl_d_t  d,
  output logic   d_valid,
  input  logic   d_ready,
  // configuration TLPs out
  output beat_t  tx,
  output logic   tx_valid,
  input  logic   tx_ready,
  // completions in
  input  beat_t  rx,
  input  logic   rx_valid,
  output logic   rx_ready
);
  // ----------------------------------------------------- request side
  tl_a_t      req;
  logic       busy;
  logic [1:0] idx;
  logic       wr;

  assign wr      = (req.opcode == TL_PUT);
  assign a_ready = !busy;

  always_comb begin
    tx       = '0;
    tx_valid = busy;
    case (idx)
      2'd0: tx.data = mk_dw0(wr ? FT_CFGWR : FT_CFGRD, 3'd0, 1'b0, 10'd1);
      2'd1: tx.data = {REQ_ID, req.source, 4'h0, wr ? req.mask : 4'hF};
      2'd2: tx.data = {EP_BUS, 5'd0, 3'd0, 4'h0, req.address[11:2], 2'b00};
      default: tx.data = req.data;
    endcase
    tx.sop = (idx == 2'd0);
    tx.eop = wr ? (idx == 2'd3) : (idx == 2'd2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= '0;
      req  <= '0;
    end else if (!busy) begin
      if (a_valid) begin
        req  <= a;
        busy <= 1'b1;
        idx  <= '0;
      end
    end else if (tx_ready) begin
      idx <= idx + 2'd1;
      if (tx.eop) busy <= 1'b0;
    end
  end

  // ----------------------------------------------------- completion side
  logic [1:0]  ridx;
  logic [31:0] rdw0;
  logic [2:0]  rstat;
  logic [7:0]  rtag;

  assign rx_ready = !d_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ridx    <= '0;
      rdw0    <= '0;
      rstat   <= '0;
      rtag    <= '0;
      d       <= '0;
      d_valid <= 1'b0;
    end else begin
      if (d_valid && d_ready) d_valid <= 1'b0;
      if (rx_valid && rx_ready) begin
        ridx <= rx.eop ? 2'd0 : ((ridx == 2'd3) ? 2'd3 : ridx + 2'd1);
        case (rx.sop ? 2'd0 : ridx)
          2'd0: rdw0 <= rx.data;
          2'd1: rstat <= rx.data[15:13];
          2'd2: rtag <= rx.data[15:8];
          default: ;
        endcase
        if (rx.eop) begin
          d_valid  <= 1'b1;
          d.opcode <= tlp_has_data(rdw0) ? TL_ACKD : TL_ACK;
          d.data   <= tlp_has_data(rdw0) ? rx.data : 32'h0;
          d.source <= (ridx == 2'd2) ? rx.data[15:8] : rtag;
          d.error  <= (rstat != 3'b000);
        end
      end
    end
  end
endmodule
