// tb_pcie_read_bandwidth: sustained DMA read bandwidth of the PCIe model for
// 1, 4 and 16 lanes.
//
// Three copies of the model run at their default parameters apart from the
// lane count. The device on each one streams 48 reads of 128 bytes each, with
// up to four in flight (source IDs 0-3). Memory answers two cycles after
// each request. The testbench checks every returned word. From the first
// request to the last response beat it measures the bytes per cycle, which
// it prints with the payload efficiency.
//
// Checks: all data, and that the bandwidth stays below the 4 bytes per cycle
// of the datapath. It also checks that 1 lane is slower than 4 lanes, and
// that 16 lanes are no faster than 4 lanes. That last check is this design's
// known departure: the reference's bandwidth keeps scaling up to 16 lanes.
//
// Origin: the measurement mirrors the reference's bandwidth evaluation, which
// used repeated DMA transfers on 16 lanes. The read size (128 bytes, this
// design's largest device read), the count and the memory timing are this
// testbench's own.
module tb_pcie_read_bandwidth;
  import pcie_pkg::*;
  localparam int NL = 3;
  localparam int LAT = 500;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  tl_a_t epm_a, mmio_a, dev_cli_a;
  tl_d_t dev_mgr_d;
  logic  [NL-1:0] dev_cli_a_ready, dev_cli_d_valid, dma_a_valid;
  tl_d_t dev_cli_d [NL];
  tl_a_t dma_a [NL];
  tl_d_t dma_d [NL];
  logic  [NL-1:0] dma_d_valid;
  logic dev_cli_a_valid;
  int lane_cfg [NL] = '{1, 4, 16};

  assign epm_a = '0; assign mmio_a = '0; assign dev_mgr_d = '0;

  for (genvar g = 0; g < NL; g++) begin : gl
    localparam int L = (g == 0) ? 1 : (g == 1) ? 4 : 16;
    logic [31:0] mem [256];
    initial for (int i = 0; i < 256; i++) mem[i] = 32'hC0DE_0000 + i * 32'h0101 + g;
    pcie_model #(.LANES(L)) dut (
      .clk, .rst_n,
      .epm_a, .epm_a_valid(1'b0), .epm_a_ready(), .epm_d(), .epm_d_valid(), .epm_d_ready(1'b1),
      .mmio_a, .mmio_a_valid(1'b0), .mmio_a_ready(), .mmio_d(), .mmio_d_valid(), .mmio_d_ready(1'b1),
      .dma_a(dma_a[g]), .dma_a_valid(dma_a_valid[g]), .dma_a_ready(1'b1), .dma_d(dma_d[g]),
      .dma_d_valid(dma_d_valid[g]), .dma_d_ready(),
      .irq(),
      .dev_mgr_a(), .dev_mgr_a_valid(), .dev_mgr_a_ready(1'b1), .dev_mgr_d,
      .dev_mgr_d_valid(1'b0), .dev_mgr_d_ready(),
      .dev_cli_a, .dev_cli_a_valid, .dev_cli_a_ready(dev_cli_a_ready[g]),
      .dev_cli_d(dev_cli_d[g]), .dev_cli_d_valid(dev_cli_d_valid[g]), .dev_cli_d_ready(1'b1),
      .dev_irq(1'b0), .err_inject(2'b00), .credit_stall(), .replay_start(), .reorder_event(),
      .msi_event(), .fc_update(), .link_err());
    // memory: answers two cycles after each request, in order
    tl_d_t p1, p2;
    logic v1, v2;
    always @(posedge clk) begin
      v1 <= dma_a_valid[g];
      p1 <= '{opcode: TL_ACKD, data: mem[dma_a[g].address[9:2]], source: dma_a[g].source, error: 1'b0};
      v2 <= v1;
      p2 <= p1;
    end
    assign dma_d[g] = p2;
    assign dma_d_valid[g] = v2 && rst_n;
  end

  localparam int NRD = 48, RDW = 32;
  int got [NL], tend [NL];
  int t0;

  // response checker: beats of each source arrive in order within a read
  int beat [NL][4];
  int base [NL][4];
  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < NL; g++) if (dev_cli_d_valid[g]) begin
      int src;
      logic [31:0] exp;
      src = int'(dev_cli_d[g].source[1:0]);
      exp = 32'hC0DE_0000 + (base[g][src] + beat[g][src]) * 32'h0101 + g;
      checks++;
      if (dev_cli_d[g].data !== exp) begin
        failures++; $display("FAIL: lanes %0d source %0d beat %0d", lane_cfg[g], src, beat[g][src]);
      end
      beat[g][src] = beat[g][src] + 1;
      got[g]++;
      if (got[g] == NRD * RDW) tend[g] = cyc;
    end
  end

  // requests: same stream to all three models, at most four reads in flight each
  initial begin
    int issued [NL];
    dev_cli_a_valid = 0; dev_cli_a = '0;
    for (int g = 0; g < NL; g++) begin
      got[g] = 0; tend[g] = 0;
      for (int k = 0; k < 4; k++) begin beat[g][k] = RDW; base[g][k] = 0; end
    end
    repeat (10) @(posedge clk);
    rst_n = 1;
    repeat (3 * LAT) @(posedge clk);
    t0 = cyc;
    for (int r = 0; r < NRD; r++) begin
      int src;
      src = r % 4;
      // wait until this source's previous read has fully returned everywhere
      forever begin
        bit ok;
        ok = 1;
        for (int g = 0; g < NL; g++) if (beat[g][src] != RDW) ok = 0;
        if (ok) break;
        @(negedge clk);
      end
      @(posedge clk);
      for (int g = 0; g < NL; g++) begin
        beat[g][src] = 0;
        base[g][src] = (r * 8) % 200;
      end
      dev_cli_a <= '{opcode: TL_GET, size: 3'd7, address: 32'(4 * ((r * 8) % 200)), mask: 4'hF,
                     data: 0, source: 8'(src)};
      dev_cli_a_valid <= 1;
      do @(negedge clk); while (dev_cli_a_ready != '1);
      @(posedge clk);
      dev_cli_a_valid <= 0;
    end
    while ((tend[0] == 0 || tend[1] == 0 || tend[2] == 0) && cyc - t0 < 200000) @(posedge clk);
    begin
      real bw [NL];
      for (int g = 0; g < NL; g++) begin
        bw[g] = real'(NRD * RDW * 4) / real'(tend[g] - t0);
        $display("lanes %0d  %0d bytes in %0d cycles  %.2f bytes/cycle  payload efficiency %.0f%%",
                 lane_cfg[g], NRD * RDW * 4, tend[g] - t0, bw[g], 100.0 * bw[g] / 4.0);
        checks++;
        if (tend[g] == 0 || bw[g] > 4.0) begin failures++; $display("FAIL: bandwidth bound"); end
      end
      checks++;
      if (!(bw[0] < bw[1])) begin failures++; $display("FAIL: 1 lane not slower than 4"); end
      checks++;
      if (bw[2] > bw[1] * 1.01) begin failures++; $display("FAIL: 16 lanes faster than 4"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
