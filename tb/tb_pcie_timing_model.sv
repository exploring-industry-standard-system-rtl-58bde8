// tb_pcie_timing_model: testbench of the link timing model.
//
// Drives random symbol groups into a model with LATENCY = 100 and room for
// DEPTH = 64 groups, sometimes every cycle so that the queue fills and
// in_ready drops. A scoreboard stamps every accepted group with its entry
// cycle and checks that each group leaves unchanged, in order, exactly
// LATENCY cycles later. It then arms err_inject and sends a group with an STP
// symbol: the data symbol after the STP must leave with its lowest bit
// flipped, once, and the next STP group must pass unchanged.
// Origin: the exact-latency property checked here is the token rule of the
// reference's link timing model; the sizes are this testbench's own.
module tb_pcie_timing_model;
  import pcie_pkg::*;
  localparam int LANES = 4, LAT = 100, DEPTH = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sym_t [LANES-1:0] in_grp, out_grp;
  logic in_valid, in_ready, out_valid, err_inject;

  pcie_timing_model #(.LANES(LANES), .LATENCY(LAT), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, n_full = 0, n_out = 0;
  typedef struct { int t; sym_t [LANES-1:0] g; } ent_t;
  ent_t q [$];
  sym_t [LANES-1:0] expect_mod;
  bit expect_flip = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (!in_ready) n_full++;
      if (in_valid && in_ready) q.push_back('{cyc, in_grp});
      if (out_valid) begin
        ent_t e;
        checks++;
        n_out++;
        if (q.size() == 0) begin
          failures++; $display("FAIL: output with nothing sent");
        end else begin
          e = q.pop_front();
          if (expect_flip) begin
            e.g[1].b[0] = ~e.g[1].b[0];
            expect_flip = 0;
          end
          if (out_grp != e.g || cyc - e.t != LAT) begin
            failures++;
            $display("FAIL: group sent at %0d left at %0d, %h vs %h", e.t, cyc, out_grp, e.g);
          end
        end
      end
    end
  end

  function automatic sym_t [LANES-1:0] rnd_grp();
    sym_t [LANES-1:0] g;
    for (int i = 0; i < LANES; i++) g[i] = '{k: 1'b0, b: 8'($urandom)};
    return g;
  endfunction

  initial begin
    in_valid = 0; in_grp = '0; err_inject = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // random traffic, then a long burst that fills the queue
    for (int i = 0; i < 600; i++) begin
      in_valid <= (i >= 300) || ($urandom_range(0, 3) == 0);
      in_grp   <= rnd_grp();
      do @(posedge clk); while (in_valid && !in_ready);
    end
    in_valid <= 0;
    repeat (LAT + DEPTH + 10) @(posedge clk);
    // bit error: STP in lane 0, data in lane 1
    err_inject <= 1; @(posedge clk); err_inject <= 0;
    for (int r = 0; r < 2; r++) begin
      sym_t [LANES-1:0] g;
      g = rnd_grp();
      g[0] = '{k: 1'b1, b: K_STP};
      in_grp <= g; in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      if (r == 0) begin
        repeat (LAT - 1) @(posedge clk);
        expect_flip = 1;
      end
      repeat (LAT + 5) @(posedge clk);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL: queue never filled"); end
    checks++;
    if (q.size() != 0 || expect_flip) begin failures++; $display("FAIL: groups left in flight"); end
    $display("groups=%0d full_cycles=%0d", n_out, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
