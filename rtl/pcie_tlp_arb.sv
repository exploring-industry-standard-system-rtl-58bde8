// pcie_tlp_arb: packet-level round-robin arbiter for TLP streams.
//
// N TLP sources share one output. When the output is free, the next source
// after the last winner that has a beat waiting is granted; the grant is held
// from the sop beat to the eop beat so packets are never interleaved. Beats
// pass through combinationally (no added latency).
//
// Timing: grant is decided when no packet is in progress and held until the
// granted input's eop beat; no added latency. Origin: the reference only says
// the shim and root complex arbitrate between their sources; round robin is
// this design's choice.
module pcie_tlp_arb
  import pcie_pkg::*;
#(
  parameter int N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  beat_t        in [N],
  input  logic [N-1:0] in_valid,
  output logic [N-1:0] in_ready,
  output beat_t        out,
  output logic         out_valid,
  input  logic         out_ready
);
  localparam int W = (N > 1) ? $clog2(N) : 1;
  logic [W-1:0] cur, last, pick;
  logic         busy, pick_ok;

  always_comb begin
    pick    = last;
    pick_ok = 1'b0;
    for (int k = 1; k <= N; k++) begin
      int c;
      c = (32'(last) + k) % N;
      if (!pick_ok && in_valid[c]) begin
        pick    = W'(c);
        pick_ok = 1'b1;
      end
    end
  end

  logic [W-1:0] g;
  assign g         = busy ? cur : pick;
  assign out       = in[g];
  assign out_valid = (busy || pick_ok) && in_valid[g];
  always_comb begin
    in_ready    = '0;
    in_ready[g] = (busy || pick_ok) && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cur  <= '0;
      last <= W'(N - 1);
    end else if (out_valid && out_ready) begin
      if (out.eop) begin
        busy <= 1'b0;
        last <= g;
      end else begin
        busy <= 1'b1;
        cur  <= g;
      end
    end
  end
endmodule
