// pcie_tl_tx: transmit side of the transaction layer.
//
// Each virtual channel (VC) has a TX buffer that stages whole TLPs and a set
// of TX flow-control counters per credit class (posted, non-posted,
// completion): the credit limit last advertised by the link partner and the
// credits consumed so far, in header units and 16-byte data units. A TLP is
// sent only once it is completely buffered and its class has enough header
// and data credits, using the modulo comparison of the PCIe specification.
// Among VCs that may send, the highest-numbered one wins (fixed strict
// priority, the hardware-dependent arbitration). When ECRC is set, the TD bit
// of the header is set and a CRC-32 digest DW is appended after the payload.
//
// Interface: TLP stream in (in_vc is sampled with the sop beat), TLP stream out
// to the data link layer, credit-limit updates from the received UpdateFC
// DLLPs. credit_stall is high in a cycle where a buffered TLP is held back only
// for lack of credits. Packets leave one DW per cycle, back to back.
//
// Timing: one DW per cycle; a TLP starts the cycle after its credits are
// available. Origin: per-VC staging buffers and credit-limit counters follow
// the reference; strict VC priority and the ECRC default are this design's.
module pcie_tl_tx
  import pcie_pkg::*;
#(
  parameter int NUM_VC    = 1,
  parameter int BUF_DEPTH = 256,   // DW per VC TX buffer
  parameter bit ECRC      = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // from packetization layer
  input  beat_t       in,
  input  logic [2:0]  in_vc,
  input  logic        in_valid,
  output logic        in_ready,
  // to data link layer
  output beat_t       out,
  output logic        out_valid,
  input  logic        out_ready,
  // credit limits received in UpdateFC DLLPs
  input  logic        fc_valid,
  input  fc_upd_t     fc,
  output logic        credit_stall
);
  localparam int AW = $clog2(BUF_DEPTH);
  localparam int VW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  // ------------------------------------------------------------ buffers
  logic [NUM_VC-1:0]     push, pop, full, empty;
  beat_t                 rd   [NUM_VC];
  logic [AW:0]           cnt  [NUM_VC];
  logic [15:0]           pkts [NUM_VC];
  logic [VW-1:0]         wr_vc_q, wr_vc;

  // the VC of a packet is taken at its sop beat and held to its eop
  assign wr_vc    = in.sop ? VW'(in_vc % NUM_VC) : wr_vc_q;
  assign in_ready = !full[wr_vc];

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    assign push[v] = in_valid && in_ready && (wr_vc == VW'(v));
    pcie_fifo #(.WIDTH($bits(beat_t)), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n, .push(push[v]), .wr_data(in), .pop(pop[v]),
      .rd_data(rd[v]), .full(full[v]), .empty(empty[v]), .count(cnt[v]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_vc_q  <= '0;
    end else if (in_valid && in_ready) begin
      wr_vc_q  <= wr_vc;
    end
  end

  // ------------------------------------------------------------ credits
  logic [7:0]  cl_h [NUM_VC][3];
  logic [11:0] cl_d [NUM_VC][3];
  logic [7:0]  cc_h [NUM_VC][3];
  logic [11:0] cc_d [NUM_VC][3];

  logic [NUM_VC-1:0] ready_vc, has_pkt;
  fc_class_e         head_cls [NUM_VC];
  logic [11:0]       head_dc  [NUM_VC];

  always_comb begin
    for (int v = 0; v < NUM_VC; v++) begin
      logic [7:0]  dh;
      logic [11:0] dd;
      head_cls[v] = tlp_class(rd[v].data);
      head_dc[v]  = data_credits(tlp_len(rd[v].data));
      dh = cl_h[v][head_cls[v]] - (cc_h[v][head_cls[v]] + 8'd1);
      dd = cl_d[v][head_cls[v]] - (cc_d[v][head_cls[v]] + head_dc[v]);
      has_pkt[v]  = (pkts[v] != 16'd0);
      ready_vc[v] = has_pkt[v] && (dh <= 8'd128) && (dd <= 12'd2048);
    end
  end

  // -------------------------------------------------------- transmitter
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_ECRC} state_e;
  state_e        st;
  logic [VW-1:0] sel;
  logic [VW-1:0] pick;
  logic          pick_ok;
  logic          first;
  logic [31:0]   crc;
  logic          fire;

  always_comb begin
    pick    = '0;
    pick_ok = 1'b0;
    for (int v = 0; v < NUM_VC; v++) begin
      if (ready_vc[v]) begin
        pick    = VW'(v);
        pick_ok = 1'b1;
      end
    end
  end

  assign credit_stall = (st == S_IDLE) && (|has_pkt) && !pick_ok;

  always_comb begin
    out       = '0;
    out_valid = 1'b0;
    pop       = '0;
    if (st == S_SEND) begin
      out.data  = rd[sel].data;
      if (first && ECRC) out.data[15] = 1'b1;
      out.sop   = rd[sel].sop;
      out.eop   = rd[sel].eop && !ECRC;
      out_valid = 1'b1;
      pop[sel]  = out_ready;
    end else if (st == S_ECRC) begin
      out.data  = crc;
      out.eop   = 1'b1;
      out_valid = 1'b1;
    end
  end
  assign fire = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      sel   <= '0;
      first <= 1'b0;
      crc   <= CRC_INIT;
      for (int v = 0; v < NUM_VC; v++) begin
        pkts[v] <= '0;
        for (int c = 0; c < 3; c++) begin
          cl_h[v][c] <= '0; cl_d[v][c] <= '0;
          cc_h[v][c] <= '0; cc_d[v][c] <= '0;
        end
      end
    end else begin
      // complete packets per VC
      for (int v = 0; v < NUM_VC; v++) begin
        pkts[v] <= pkts[v] + 16'(push[v] && in.eop) - 16'(pop[v] && rd[v].eop);
      end
      if (fc_valid && (32'(fc.vc) < NUM_VC) && fc.cls != 2'd3) begin
        cl_h[VW'(fc.vc)][fc.cls] <= fc.hdr;
        cl_d[VW'(fc.vc)][fc.cls] <= fc.data;
      end
      case (st)
        S_IDLE: if (pick_ok) begin
          sel   <= pick;
          st    <= S_SEND;
          first <= 1'b1;
          crc   <= CRC_INIT;
          cc_h[pick][head_cls[pick]] <= cc_h[pick][head_cls[pick]] + 8'd1;
          cc_d[pick][head_cls[pick]] <= cc_d[pick][head_cls[pick]] + head_dc[pick];
        end
        S_SEND: if (fire) begin
          first <= 1'b0;
          crc   <= crc32_dw(crc, out.data);
          if (rd[sel].eop) st <= ECRC ? S_ECRC : S_IDLE;
        end
        default: if (fire) st <= S_IDLE;
      endcase
    end
  end
endmodule
