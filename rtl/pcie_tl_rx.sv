// pcie_tl_rx: receive side of the transaction layer.
//
// Each virtual channel has three header buffers and three payload buffers,
// one pair per credit class (posted, non-posted, completion). An incoming TLP
// is checked against its ECRC digest (when its TD bit is set); its payload is
// written speculatively and published only if the digest matches, otherwise
// the TLP is dropped and ecrc_err pulses. A small order queue records the
// (VC, class) of every accepted TLP, and TLPs leave in arrival order, so the
// model keeps strict ordering. The RX flow-control counters add up the header
// and data credits freed as TLPs are dequeued; whenever a class's limit has
// moved, an UpdateFC request carrying the new limit (initial credits plus all
// credits freed so far) is raised towards the data link layer. Right after
// reset every class requests an update, which advertises the initial credits.
//
// The input is always ready: the credits advertised guarantee buffer space
// (checked by an assertion). Output is a TLP stream without the digest, with
// the VC of the packet on out_vc.
//
// Timing: a TLP can leave the RX buffers the cycle after its last DW (ECRC)
// arrived. Origin: the three header and three payload buffers per VC and the
// credit-return counters follow the reference; in-order release across
// classes and the UpdateFC policy are this design's choices.
module pcie_tl_rx
  import pcie_pkg::*;
#(
  parameter int NUM_VC       = 1,
  parameter int HDR_CREDITS  = 32,    // per class, power of two
  parameter int DATA_CREDITS = 256    // per class, 16-byte units, power of two
) (
  input  logic        clk,
  input  logic        rst_n,
  input  beat_t       in,
  input  logic        in_valid,
  output beat_t       out,
  output logic [2:0]  out_vc,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        fc_valid,
  output fc_upd_t     fc,
  input  logic        fc_ready,
  output logic        ecrc_err
);
  localparam int NB  = NUM_VC * 3;
  localparam int PD  = DATA_CREDITS * 4;
  localparam int IW  = (NB > 1) ? $clog2(NB) : 1;
  localparam int OD  = 2 ** $clog2(HDR_CREDITS * NB);

  // ------------------------------------------------------------ receive
  logic [31:0] hdr [3];
  logic [10:0] idx;            // DW index in the current TLP
  logic [31:0] crc;
  logic [IW-1:0] in_buf;       // buffer of the current TLP
  logic [10:0] in_len;
  logic        in_td;
  logic        td_q;           // TD bit of the current TLP
  logic [31:0] dw0_now;

  assign dw0_now = in.sop ? in.data : hdr[0];
  always_comb begin
    logic [2:0] tc;
    tc     = dw0_now[22:20];
    in_buf = IW'((32'(tc) % NUM_VC) * 3 + 32'(tlp_class(dw0_now)));
    in_len = tlp_len(dw0_now);
    in_td  = in.sop ? in.data[15] : td_q;
  end

  logic is_payload, good;
  assign is_payload = in_valid && !in.sop && (idx >= 11'd3) && (idx < 11'd3 + in_len);
  assign good       = !in_td || (crc == in.data);

  logic [NB-1:0] p_push, p_commit, p_rewind, p_pop, p_empty, h_push, h_pop, h_full, h_empty;
  logic [31:0]   p_rd [NB];
  logic [95:0]   h_rd [NB];
  logic [$clog2(PD):0] p_free [NB];
  logic [$clog2(HDR_CREDITS):0] h_cnt [NB];

  for (genvar i = 0; i < NB; i++) begin : g_buf
    assign p_push[i]   = is_payload && (in_buf == IW'(i));
    assign p_commit[i] = in_valid && in.eop && good && (in_buf == IW'(i));
    assign p_rewind[i] = in_valid && in.eop && !good && (in_buf == IW'(i));
    assign h_push[i]   = p_commit[i];
    pcie_commit_fifo #(.WIDTH(32), .DEPTH(PD)) u_pay (
      .clk, .rst_n, .push(p_push[i]), .wr_data(in.data), .commit(p_commit[i]),
      .rewind(p_rewind[i]), .pop(p_pop[i]), .rd_data(p_rd[i]), .empty(p_empty[i]),
      .free(p_free[i]));
    pcie_fifo #(.WIDTH(96), .DEPTH(HDR_CREDITS)) u_hdr (
      .clk, .rst_n, .push(h_push[i]), .wr_data({hdr[0], hdr[1], hdr[2]}), .pop(h_pop[i]),
      .rd_data(h_rd[i]), .full(h_full[i]), .empty(h_empty[i]), .count(h_cnt[i]));
  end

  // arrival order of accepted TLPs
  logic          o_empty, o_full, o_pop;
  logic [IW-1:0] o_head;
  logic [$clog2(OD):0] o_cnt;
  pcie_fifo #(.WIDTH(IW), .DEPTH(OD)) u_order (
    .clk, .rst_n, .push(in_valid && in.eop && good), .wr_data(in_buf), .pop(o_pop),
    .rd_data(o_head), .full(o_full), .empty(o_empty), .count(o_cnt));

  assign ecrc_err = in_valid && in.eop && !good;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0;
      td_q <= 1'b0;
      crc <= CRC_INIT;
      for (int i = 0; i < 3; i++) hdr[i] <= '0;
    end else if (in_valid) begin
      if (in.sop) idx <= 11'd1; else idx <= idx + 11'd1;
      crc <= in.eop ? CRC_INIT : crc32_dw(in.sop ? CRC_INIT : crc, in.data);
      if (in.sop) td_q <= in.data[15];
      if (in.sop) hdr[0] <= in.data & ~32'h0000_8000;  // digest removed
      else if (idx == 11'd1) hdr[1] <= in.data;
      else if (idx == 11'd2) hdr[2] <= in.data;
    end
  end

  // ------------------------------------------------------------ dequeue
  logic [10:0]   o_idx;     // DW index of the TLP being sent out
  logic [10:0]   o_len;
  logic [95:0]   o_hdr;
  logic          o_last;

  assign o_hdr  = h_rd[o_head];
  assign o_len  = tlp_len(o_hdr[95:64]);
  assign o_last = (o_idx == 11'd2 + o_len);

  always_comb begin
    out       = '0;
    out_valid = !o_empty;
    out_vc    = 3'(32'(o_head) / 3);
    case (o_idx)
      11'd0:   out.data = o_hdr[95:64];
      11'd1:   out.data = o_hdr[63:32];
      11'd2:   out.data = o_hdr[31:0];
      default: out.data = p_rd[o_head];
    endcase
    out.sop = (o_idx == 11'd0);
    out.eop = o_last;
    p_pop = '0;
    h_pop = '0;
    if (out_valid && out_ready) begin
      p_pop[o_head] = (o_idx >= 11'd3);
      h_pop[o_head] = o_last;
    end
  end
  assign o_pop = out_valid && out_ready && o_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) o_idx <= '0;
    else if (out_valid && out_ready) o_idx <= o_last ? 11'd0 : o_idx + 11'd1;
  end

  // ---------------------------------------------------------- RX counters
  logic [7:0]  alloc_h [NB];
  logic [11:0] alloc_d [NB];
  logic [NB-1:0] dirty;
  logic [IW-1:0] upd;
  logic          upd_ok;

  always_comb begin
    upd    = '0;
    upd_ok = 1'b0;
    for (int i = NB - 1; i >= 0; i--) begin
      if (dirty[i]) begin
        upd    = IW'(i);
        upd_ok = 1'b1;
      end
    end
  end

  assign fc_valid = upd_ok;
  always_comb begin
    fc      = '0;
    fc.vc   = 3'(32'(upd) / 3);
    fc.cls  = fc_class_e'(2'(32'(upd) % 3));
    fc.hdr  = alloc_h[upd];
    fc.data = alloc_d[upd];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dirty <= '1;
      for (int i = 0; i < NB; i++) begin
        alloc_h[i] <= 8'(HDR_CREDITS);
        alloc_d[i] <= 12'(DATA_CREDITS);
      end
    end else begin
      for (int i = 0; i < NB; i++) begin
        if (o_pop && (o_head == IW'(i))) begin
          alloc_h[i] <= alloc_h[i] + 8'd1;
          alloc_d[i] <= alloc_d[i] + data_credits(o_len);
        end
        if (o_pop && (o_head == IW'(i))) dirty[i] <= 1'b1;
        else if (fc_valid && fc_ready && upd == IW'(i)) dirty[i] <= 1'b0;
      end
    end
  end

  // the link partner must respect the advertised credits
  // assertions, checked only out of reset
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
    end else begin
      assert (!(|(h_push & h_full))) else $error("tl_rx: header buffer overflow");
      assert (!(o_full && in_valid && in.eop)) else $error("tl_rx: order queue overflow");
    end
  end
endmodule
