// pcie_phy_rx: receive side of the physical layer.
//
// Takes one symbol group per cycle from the link, walks its symbols in lane
// order and rebuilds the packets: STP or SDP starts a TLP or DLLP, four data
// symbols make one DW, END closes the packet (its last DW is marked eop), PAD
// is skipped. The start and end symbols are thereby removed. Each DW is held
// back until the next symbol shows whether it was the last one. A wide group
// can complete several DWs in one cycle; they go into an output queue that is
// drained one DW per cycle, so the output is a packet stream with sop/eop and
// a DLLP flag. The link cannot be stalled; the queue is sized for the burst
// of one group and an assertion checks that it never overflows.
//
// Timing: one symbol group per cycle in, one DW per cycle out through a small
// queue. Origin: removing the start/end symbols follows the reference; the
// symbol values are those of PCIe 8b/10b framing.
module pcie_phy_rx
  import pcie_pkg::*;
#(
  parameter int LANES         = 8,
  parameter int SYMS_PER_LANE = 1,
  parameter int QDEPTH        = 32,   // power of two
  localparam int G            = LANES * SYMS_PER_LANE
) (
  input  logic            clk,
  input  logic            rst_n,
  input  sym_t [G-1:0]    grp,
  input  logic            in_valid,
  output beat_t           out,
  output logic            out_dllp,
  output logic            out_valid
);
  localparam int M  = G / 4 + 2;   // most DWs one group can complete
  localparam int QW = $clog2(QDEPTH);

  typedef struct packed {
    logic       dllp;
    beat_t      b;
  } qent_t;

  // parser state carried between groups
  typedef struct packed {
    logic        inpkt;
    logic        dllp;
    logic        first;
    logic [1:0]  nb;
    logic [23:0] acc;
    logic        have;
    qent_t       pend;
  } pst_t;

  pst_t  st_q, st_d;
  qent_t outs [M];
  int    n;

  always_comb begin
    st_d = st_q;
    n    = 0;
    for (int j = 0; j < M; j++) outs[j] = '0;
    if (in_valid) begin
      for (int i = 0; i < G; i++) begin
        if (grp[i].k) begin
          if (grp[i].b == K_STP || grp[i].b == K_SDP) begin
            st_d.inpkt = 1'b1;
            st_d.dllp  = (grp[i].b == K_SDP);
            st_d.first = 1'b1;
            st_d.nb    = '0;
            st_d.have  = 1'b0;
          end else if (grp[i].b == K_END && st_d.inpkt) begin
            if (st_d.have) begin
              outs[n] = st_d.pend;
              outs[n].b.eop = 1'b1;
              n = n + 1;
            end
            st_d.inpkt = 1'b0;
            st_d.have  = 1'b0;
          end
        end else if (st_d.inpkt) begin
          if (st_d.nb == 2'd3) begin
            if (st_d.have) begin
              outs[n] = st_d.pend;
              n = n + 1;
            end
            st_d.pend  = '{dllp: st_d.dllp,
                          b: '{data: {st_d.acc, grp[i].b}, sop: st_d.first, eop: 1'b0}};
            st_d.have  = 1'b1;
            st_d.first = 1'b0;
          end
          st_d.acc = {st_d.acc[15:0], grp[i].b};
          st_d.nb  = st_d.nb + 2'd1;
        end
      end
    end
  end

  // output queue with several writes per cycle
  qent_t       q [QDEPTH];
  logic [QW:0] wp, rp, used;

  assign used = wp - rp;

  assign out_valid = (wp != rp);
  assign out       = q[rp[QW-1:0]].b;
  assign out_dllp  = q[rp[QW-1:0]].dllp;

  always_ff @(posedge clk) begin
    for (int j = 0; j < M; j++) begin
      if (j < n) q[QW'(wp[QW-1:0] + QW'(j))] <= outs[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= '0;
      wp   <= '0;
      rp   <= '0;
    end else begin
      st_q <= st_d;
      wp   <= wp + (QW+1)'(n);
      if (out_valid) rp <= rp + 1'b1;
    end
  end

  // assertions, checked only out of reset
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
    end else assert (32'(used) + n <= QDEPTH) else $error("phy_rx: queue overflow");
  end
endmodule
