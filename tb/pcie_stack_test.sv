// pcie_stack_test: two protocol stacks joined by two timing models.
//
// Stack A sends a mix of memory writes, memory reads and completions of
// random lengths to stack B, and B sends writes back to A. The receiver side
// is stalled at random so that the RX buffers fill and the senders run out of
// credits. The testbench keeps its own copy of every TLP sent and compares
// each received TLP word by word. One TLP is corrupted on the link to force
// a NAK and a replay. It checks that every TLP arrives once, in order and
// intact, and that credit stalls, UpdateFC DLLPs, the NAK replay and the
// LCRC error all happened.
//
// This module is the shared body of the testbenches of the protocol stack
// and of its six layer blocks; each of those wraps one instance of it.
// Timing: 10-unit clock, 40-cycle link latency, 4 lanes, 8 header and 32
// data credits per class so that credit stalls occur quickly.
// Origin: the traffic pattern and the reduced credit and latency sizes are
// this testbench's own choices, made so that every mechanism occurs quickly.
module pcie_stack_test;
  import pcie_pkg::*;
  localparam int LANES = 4;
  localparam int G = LANES;
  localparam int NPKT = 120;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  beat_t a_tx, b_tx, a_rx, b_rx;
  logic a_tx_v, a_tx_r, b_tx_v, b_tx_r, a_rx_v, a_rx_r, b_rx_v, b_rx_r;
  logic [2:0] a_rx_vc, b_rx_vc;
  sym_t [G-1:0] a_l, b_l, a2b, b2a;
  logic a_lv, a_lr, b_lv, b_lr, a2b_v, b2a_v;
  logic err_ab;
  logic [5:0] st_a, st_b;

  pcie_protocol_stack #(.LANES(LANES), .HDR_CREDITS(8), .DATA_CREDITS(32)) u_a (
    .clk, .rst_n, .tlp_tx(a_tx), .tlp_tx_vc(3'd0), .tlp_tx_valid(a_tx_v), .tlp_tx_ready(a_tx_r),
    .tlp_rx(a_rx), .tlp_rx_vc(a_rx_vc), .tlp_rx_valid(a_rx_v), .tlp_rx_ready(a_rx_r),
    .link_tx(a_l), .link_tx_valid(a_lv), .link_tx_ready(a_lr), .link_rx(b2a), .link_rx_valid(b2a_v),
    .credit_stall(st_a[0]), .replay_start(st_a[1]), .ecrc_err(st_a[2]), .lcrc_err(st_a[3]),
    .dllp_err(st_a[4]), .fc_update_sent(st_a[5]));
  pcie_protocol_stack #(.LANES(LANES), .HDR_CREDITS(8), .DATA_CREDITS(32)) u_b (
    .clk, .rst_n, .tlp_tx(b_tx), .tlp_tx_vc(3'd0), .tlp_tx_valid(b_tx_v), .tlp_tx_ready(b_tx_r),
    .tlp_rx(b_rx), .tlp_rx_vc(b_rx_vc), .tlp_rx_valid(b_rx_v), .tlp_rx_ready(b_rx_r),
    .link_tx(b_l), .link_tx_valid(b_lv), .link_tx_ready(b_lr), .link_rx(a2b), .link_rx_valid(a2b_v),
    .credit_stall(st_b[0]), .replay_start(st_b[1]), .ecrc_err(st_b[2]), .lcrc_err(st_b[3]),
    .dllp_err(st_b[4]), .fc_update_sent(st_b[5]));
  pcie_timing_model #(.LANES(LANES), .LATENCY(40), .DEPTH(64)) u_ab (
    .clk, .rst_n, .in_grp(a_l), .in_valid(a_lv), .in_ready(a_lr), .out_grp(a2b), .out_valid(a2b_v),
    .err_inject(err_ab));
  pcie_timing_model #(.LANES(LANES), .LATENCY(40), .DEPTH(64)) u_ba (
    .clk, .rst_n, .in_grp(b_l), .in_valid(b_lv), .in_ready(b_lr), .out_grp(b2a), .out_valid(b2a_v),
    .err_inject(1'b0));

  int checks = 0, failures = 0;
  // reference copies of the TLPs, as flat DW lists with packet lengths
  logic [31:0] ref_ab [$], ref_ba [$];
  int n_ecrc = 0, n_stall = 0, n_replay = 0, n_lcrc = 0, n_fc = 0, n_rx_ab = 0, n_rx_ba = 0;

  always @(posedge clk) if (rst_n) begin
    if (st_a[0] || st_b[0]) n_stall++;
    if (st_a[1]) n_replay++;
    if (st_b[3]) n_lcrc++;
    if (st_a[2] || st_b[2]) n_ecrc++;
    if (st_a[5] || st_b[5]) n_fc++;
  end

  // random TLP of a random kind
  task automatic make_tlp(output logic [31:0] p [$], input int i);
    int len, kind;
    logic [7:0] ft;
    kind = $urandom_range(0, 2);
    len  = (kind == 1) ? 0 : $urandom_range(1, 64);
    ft   = (kind == 0) ? FT_MWR : (kind == 1) ? FT_MRD : FT_CPLD;
    p = {};
    p.push_back(mk_dw0(ft, 3'd0, 1'b0, (kind == 1) ? 10'd8 : 10'(len)));
    p.push_back({16'h0100, 8'(i), 8'hFF});
    p.push_back($urandom() & 32'hFFFF_FFFC);
    for (int k = 0; k < len; k++) p.push_back($urandom());
  endtask

  task automatic send(input bit from_a, input int i);
    logic [31:0] p [$];
    make_tlp(p, i);
    foreach (p[k]) begin
      if (from_a) ref_ab.push_back(p[k]); else ref_ba.push_back(p[k]);
    end
    if (from_a) begin
      a_tx_v <= 1;
      foreach (p[k]) begin
        a_tx <= '{data: p[k], sop: k == 0, eop: k == p.size() - 1};
        do @(posedge clk); while (!a_tx_r);
      end
    end else begin
      b_tx_v <= 1;
      foreach (p[k]) begin
        b_tx <= '{data: p[k], sop: k == 0, eop: k == p.size() - 1};
        do @(posedge clk); while (!b_tx_r);
      end
    end
  endtask

  // receivers: random stalls, compare against the reference
  always @(posedge clk) begin
    if (rst_n) begin
      if (b_rx_v && b_rx_r) begin
        checks++;
        if (ref_ab.size() == 0 || b_rx.data !== ref_ab[0]) begin
          failures++;
          $display("A->B mismatch got %h", b_rx.data);
        end
        if (ref_ab.size() != 0) void'(ref_ab.pop_front());
        if (b_rx.eop) n_rx_ab++;
      end
      if (a_rx_v && a_rx_r) begin
        checks++;
        if (ref_ba.size() == 0 || a_rx.data !== ref_ba[0]) begin
          failures++;
          $display("B->A mismatch got %h", a_rx.data);
        end
        if (ref_ba.size() != 0) void'(ref_ba.pop_front());
        if (a_rx.eop) n_rx_ba++;
      end
    end
    b_rx_r <= ($urandom_range(0, 9) < 3);
    a_rx_r <= ($urandom_range(0, 9) < 8);
  end

  initial begin
    a_tx_v = 0; b_tx_v = 0; a_tx = '0; b_tx = '0; err_ab = 0; a_rx_r = 0; b_rx_r = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    fork
      begin for (int i = 0; i < NPKT; i++) send(1, i); a_tx_v <= 0; end
      begin for (int i = 0; i < NPKT / 2; i++) send(0, i); b_tx_v <= 0; end
      begin
        repeat (400) @(posedge clk);
        err_ab <= 1; @(posedge clk); err_ab <= 0;
      end
    join
    wait (n_rx_ab == NPKT && n_rx_ba == NPKT / 2);
    repeat (200) @(posedge clk);
    checks++; if (ref_ab.size() != 0 || ref_ba.size() != 0) begin failures++; $display("leftover"); end
    checks++; if (n_stall == 0) begin failures++; $display("no credit stall"); end
    checks++; if (n_replay == 0) begin failures++; $display("no replay"); end
    checks++; if (n_lcrc == 0) begin failures++; $display("no lcrc error seen"); end
    checks++; if (n_ecrc != 0) begin failures++; $display("unexpected ECRC errors"); end
    checks++; if (n_fc < 10) begin failures++; $display("too few UpdateFC"); end
    checks++; if (st_a[2] || st_b[2]) begin failures++; end
    $display("stalls=%0d replays=%0d lcrc=%0d fc=%0d", n_stall, n_replay, n_lcrc, n_fc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: ab=%0d ba=%0d", n_rx_ab, n_rx_ba);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
