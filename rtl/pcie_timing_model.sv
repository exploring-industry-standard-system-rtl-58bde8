// pcie_timing_model: one direction of the link between two protocol stacks.
//
// A queue of symbol groups. A group is stamped, when it enters, with a timing
// token: the cycle at which it may leave, the current cycle plus LATENCY. The
// head group leaves once the free-running cycle counter has reached its
// token, so every group crosses the link in exactly LATENCY cycles as long as
// the queue does not fill (DEPTH groups in flight). Groups leave at most one
// per cycle and the receiver cannot stall them.
//
// err_inject arms a one-shot bit error: the first data symbol that follows an
// STP symbol within a later outgoing group has its lowest bit flipped, which
// corrupts that TLP so that the receiver's LCRC check fails. This is a test
// hook for the ACK/NAK protocol and is not part of the document's model.
module pcie_timing_model
  import pcie_pkg::*;
#(
  parameter int LANES         = 8,
  parameter int SYMS_PER_LANE = 1,
  parameter int LATENCY       = 500,  // cycles to cross the link
  parameter int DEPTH         = 512,  // groups in flight, power of two
  localparam int G            = LANES * SYMS_PER_LANE
) (
  input  logic          clk,
  input  logic          rst_n,
  input  sym_t [G-1:0]  in_grp,
  input  logic          in_valid,
  output logic          in_ready,
  output sym_t [G-1:0]  out_grp,
  output logic          out_valid,
  input  logic          err_inject
);
  localparam int GW = G * $bits(sym_t);

  logic [31:0] now;
  logic        full, empty;
  logic [GW+31:0] head;
  logic [31:0] token;
  sym_t [G-1:0] hgrp;

  pcie_fifo #(.WIDTH(GW + 32), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n, .push(in_valid && !full), .wr_data({in_grp, now + 32'(LATENCY)}),
    .pop(out_valid), .rd_data(head), .full, .empty, .count());

  assign in_ready  = !full;
  assign {hgrp, token} = head;
  // the token has been reached (wrap-safe comparison)
  assign out_valid = !empty && !(now - token >= 32'h8000_0000);

  logic armed;
  logic hit;
  always_comb begin
    logic seen;
    out_grp = hgrp;
    seen    = 1'b0;
    hit     = 1'b0;
    for (int i = 0; i < G; i++) begin
      if (hgrp[i].k && hgrp[i].b == K_STP) seen = 1'b1;
      else if (seen && !hgrp[i].k && armed && !hit) begin
        out_grp[i].b[0] = ~hgrp[i].b[0];
        hit = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now   <= '0;
      armed <= 1'b0;
    end else begin
      now <= now + 32'd1;
      if (err_inject) armed <= 1'b1;
      else if (out_valid && hit) armed <= 1'b0;
    end
  end
endmodule
