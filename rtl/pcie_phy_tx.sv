// pcie_phy_tx: transmit side of the physical layer.
//
// Adds the physical-layer start and end symbols around each packet (STP for a
// TLP, SDP for a DLLP, END after both, as in PCIe 8b/10b framing) and turns
// the one-DW-per-cycle packet stream into symbol groups of LANES x
// SYMS_PER_LANE symbols (bytes with a control flag), one group per cycle. A
// physical lane is thus modelled as SYMS_PER_LANE logical lanes, so that a
// group carries what the real link carries in one model clock without a
// separate clock domain. A DW is sent most significant byte first, lane 0
// first.
//
// Symbols collect in an accumulator; a full group is sent whenever one is
// available, and a partial group is padded with PAD symbols and sent when no
// new DW arrives in that cycle. With fewer than 4 symbols per group the
// accumulator fills and the input is back-pressured, which is how a narrow
// link limits bandwidth. The datapath moves at most one DW per cycle, so
// groups wider than 6 symbols do not raise the bandwidth above 4 bytes per
// cycle.
//
// Timing: emits one group per cycle whenever a full group is available, or a
// padded group when the input pauses. Origin: the start/end symbols and the
// spreading over lanes follow the reference; the PAD fill is this design's.
module pcie_phy_tx
  import pcie_pkg::*;
#(
  parameter int LANES         = 8,
  parameter int SYMS_PER_LANE = 1,
  localparam int G            = LANES * SYMS_PER_LANE
) (
  input  logic            clk,
  input  logic            rst_n,
  input  beat_t           in,
  input  logic            in_dllp,
  input  logic            in_valid,
  output logic            in_ready,
  output sym_t [G-1:0]    grp,
  output logic            out_valid,
  input  logic            out_ready
);
  localparam int CAP = G + 6;
  localparam int CW  = $clog2(CAP + 1);

  sym_t         acc [CAP];
  logic [CW-1:0] cnt;

  sym_t          s [6];
  logic [2:0]    ns;
  logic          emit;
  logic [CW-1:0] cnt1;
  sym_t          nxt [CAP];
  logic [CW-1:0] ncnt;

  // symbols of the incoming DW
  always_comb begin
    int k;
    for (int j = 0; j < 6; j++) s[j] = '{k: 1'b1, b: K_PAD};
    k = 0;
    if (in.sop) begin
      s[0] = '{k: 1'b1, b: in_dllp ? K_SDP : K_STP};
      k = 1;
    end
    for (int j = 0; j < 4; j++) s[k + j] = '{k: 1'b0, b: in.data[31 - 8*j -: 8]};
    k = k + 4;
    if (in.eop) begin
      s[k] = '{k: 1'b1, b: K_END};
      k = k + 1;
    end
    ns = 3'(k);
  end

  assign out_valid = (cnt >= CW'(G)) || (cnt != '0 && !in_valid);
  assign emit      = out_valid && out_ready;
  assign cnt1      = emit ? ((cnt > CW'(G)) ? cnt - CW'(G) : '0) : cnt;
  assign in_ready  = (32'(cnt1) + 32'(ns) <= CAP);

  always_comb begin
    for (int i = 0; i < G; i++) grp[i] = (CW'(i) < cnt) ? acc[i] : '{k: 1'b1, b: K_PAD};
  end

  always_comb begin
    for (int i = 0; i < CAP; i++) begin
      if (emit) nxt[i] = (i + G < CAP) ? acc[(i + G) % CAP] : '{k: 1'b1, b: K_PAD};
      else      nxt[i] = acc[i];
    end
    ncnt = cnt1;
    if (in_valid && in_ready) begin
      for (int j = 0; j < 6; j++) begin
        if (3'(j) < ns && 32'(cnt1) + j < CAP) nxt[32'(cnt1) + j] = s[j];
      end
      ncnt = cnt1 + CW'(ns);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < CAP; i++) acc[i] <= '{k: 1'b1, b: K_PAD};
    end else begin
      cnt <= ncnt;
      for (int i = 0; i < CAP; i++) acc[i] <= nxt[i];
    end
  end
endmodule
