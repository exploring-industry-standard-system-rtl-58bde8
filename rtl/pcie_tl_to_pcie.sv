// pcie_tl_to_pcie: TLToPCIe protocol adapter of the endpoint shim (manager).
//
// Takes the device's own system-bus requests (its DMA client port) and sends
// them over PCIe: a Get of 2^size bytes becomes an MRd of that many DW (at
// least one, at most 32), a PutFullData a one-DW MWr with the bus mask as
// first byte enables. The bus source ID is used as the TLP tag, so several
// reads may be in flight; each data DW of a CplD is answered on the D channel
// as one AccessAckData beat with the source of its request (a multi-beat
// response for a burst read; error flag set for a non-successful status). Memory writes are posted: the AccessAck is given as
// soon as the MWr has been handed to the stack. An assertion checks that a
// source ID is not reused while its read is still outstanding.
//
// Timing: the TLP is sent over 3 or 4 cycles after the request is accepted;
// completion beats leave one per cycle. Origin: the adapter's role follows the
// reference; the 32-DW read limit, posted-write acknowledgement and tag =
// source are this design's choices.
module pcie_tl_to_pcie
  import pcie_pkg::*;
#(
  parameter logic [15:0] REQ_ID = 16'h0100
) (
  input  logic   clk,
  input  logic   rst_n,
  input  tl_a_t  dev_a,
  input  logic   dev_a_valid,
  output logic   dev_a_ready,
  output tl_d_t  dev_d,
  output logic   dev_d_valid,
  input  logic   dev_d_ready,
  output beat_t  tx,
  output logic   tx_valid,
  input  logic   tx_ready,
  input  beat_t  rx,
  input  logic   rx_valid,
  output logic   rx_ready
);
  // ----------------------------------------------------- request side
  tl_a_t      req;
  logic       busy;
  logic [1:0] idx;
  logic       wr;
  logic       wack_pend;       // posted-write acknowledgement owed
  logic [7:0] wack_src;
  logic [255:0] outstanding;

  logic [9:0] rd_len;
  assign wr          = (req.opcode == TL_PUT);
  assign rd_len      = (req.size <= 3'd2) ? 10'd1 : 10'(1 << (req.size - 3'd2));
  assign dev_a_ready = !busy && !wack_pend;
  assign tx_valid    = busy;

  always_comb begin
    tx = '0;
    case (idx)
      2'd0:    tx.data = mk_dw0(wr ? FT_MWR : FT_MRD, 3'd0, 1'b0, wr ? 10'd1 : rd_len);
      2'd1:    tx.data = {REQ_ID, req.source, 4'h0, req.mask};
      2'd2:    tx.data = {req.address[31:2], 2'b00};
      default: tx.data = req.data;
    endcase
    tx.sop = (idx == 2'd0);
    tx.eop = wr ? (idx == 2'd3) : (idx == 2'd2);
  end

  // ----------------------------------------------------- completion side
  logic [1:0]  ridx;
  logic [2:0]  rstat;
  logic [7:0]  rtag;
  tl_d_t       cpl_d;
  logic        cpl_valid;

  assign rx_ready = !cpl_valid || dev_d_ready;

  // D channel: completions first, then posted-write acknowledgements
  always_comb begin
    if (cpl_valid) begin
      dev_d       = cpl_d;
      dev_d_valid = 1'b1;
    end else begin
      dev_d        = '0;
      dev_d.opcode = TL_ACK;
      dev_d.source = wack_src;
      dev_d_valid  = wack_pend;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      idx         <= '0;
      req         <= '0;
      wack_pend   <= 1'b0;
      wack_src    <= '0;
      ridx        <= '0;
      rstat       <= '0;
      rtag        <= '0;
      cpl_d       <= '0;
      cpl_valid   <= 1'b0;
      outstanding <= '0;
    end else begin
      if (!busy) begin
        if (dev_a_valid && dev_a_ready) begin
          req  <= dev_a;
          busy <= 1'b1;
          idx  <= '0;
        end
      end else if (tx_ready) begin
        idx <= idx + 2'd1;
        if (tx.eop) begin
          busy <= 1'b0;
          if (wr) begin
            wack_pend <= 1'b1;
            wack_src  <= req.source;
          end else begin
            outstanding[req.source] <= 1'b1;
          end
        end
      end
      if (!cpl_valid && wack_pend && dev_d_ready) wack_pend <= 1'b0;
      if (cpl_valid && dev_d_ready) cpl_valid <= 1'b0;
      if (rx_valid && rx_ready) begin
        ridx <= rx.eop ? 2'd0 : ((ridx == 2'd3) ? 2'd3 : ridx + 2'd1);
        if (!rx.sop && ridx == 2'd1) rstat <= rx.data[15:13];
        if (!rx.sop && ridx == 2'd2) rtag <= rx.data[15:8];
        // one response beat per data DW; a completion without data answers
        // with an error beat
        if (!rx.sop && (ridx == 2'd3 || (ridx == 2'd2 && rx.eop))) begin
          cpl_valid    <= 1'b1;
          cpl_d.opcode <= (ridx == 2'd3) ? TL_ACKD : TL_ACK;
          cpl_d.data   <= (ridx == 2'd3) ? rx.data : 32'h0;
          cpl_d.source <= (ridx == 2'd2) ? rx.data[15:8] : rtag;
          cpl_d.error  <= (ridx == 2'd2) ? 1'b1 : (rstat != 3'b000);
          if (rx.eop) outstanding[(ridx == 2'd2) ? rx.data[15:8] : rtag] <= 1'b0;
        end
      end
    end
  end

  // assertions, checked only out of reset
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
    end else if (dev_a_valid && dev_a_ready && dev_a.opcode == TL_GET)
      assert (!outstanding[dev_a.source]) else $error("tl_to_pcie: source ID reused");
  end
endmodule
