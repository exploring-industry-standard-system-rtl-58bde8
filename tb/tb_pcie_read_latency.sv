// tb_pcie_read_latency: round-trip read latency of the PCIe model versus read
// size and lane count, the measurement behind the model's calibration.
//
// The model runs with its default 500-cycle link latency and, in turn, 1, 4
// and 8 lanes (three instances, each with its own memory). A device-side
// driver issues, one at a time, a Get of 4, 8, 16, 32, 64 and 128 bytes on the
// endpoint's client port and measures the cycles from the request to the
// last response beat. The memory answers every request two cycles after it
// is accepted, in order, so the numbers show the model alone. Each latency
// is printed, each read's data is compared with the memory, and the
// testbench checks that the latency grows with size, that one lane is slower
// than four for reads of more than one DW, and that it stays between
// 2 x 500 cycles and 2 x 500 + 120 + 6 x (read size in DW) x (4 / lanes, at
// least 1) cycles: the datapath moves at most one DW, or one symbol per lane,
// per cycle, and a read passes through several store-and-forward buffers.
//
// Origin: the sweep over sizes and lanes mirrors the reference's latency
// evaluation (single-DW round trip about 1 us on 8 lanes); the sizes here stop
// at the 128-byte limit of this design's device adapter, and the bounds are
// this testbench's own.
module tb_pcie_read_latency;
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
  int lane_cfg [NL] = '{1, 4, 8};

  assign epm_a = '0; assign mmio_a = '0; assign dev_mgr_d = '0;

  for (genvar g = 0; g < NL; g++) begin : gl
    localparam int L = (g == 0) ? 1 : (g == 1) ? 4 : 8;
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

  int prev [NL];
  initial begin
    dev_cli_a_valid = 0; dev_cli_a = '0;
    repeat (10) @(posedge clk);
    rst_n = 1;
    repeat (3 * LAT) @(posedge clk);
    for (int g = 0; g < NL; g++) prev[g] = 0;
    for (int s = 2; s <= 7; s++) begin
      int ndw, t0, got [NL], tend [NL];
      ndw = 1 << (s - 2);
      @(posedge clk);
      dev_cli_a <= '{opcode: TL_GET, size: 3'(s), address: 32'(4 * s), mask: 4'hF, data: 0,
                     source: 8'(s)};
      dev_cli_a_valid <= 1;
      do @(negedge clk); while (dev_cli_a_ready != '1);
      @(posedge clk);
      t0 = cyc;
      dev_cli_a_valid <= 0;
      for (int g = 0; g < NL; g++) begin got[g] = 0; tend[g] = 0; end
      while ((got[0] < ndw || got[1] < ndw || got[2] < ndw) && cyc - t0 < 5000) begin
        @(negedge clk);
        for (int g = 0; g < NL; g++) if (dev_cli_d_valid[g]) begin
          logic [31:0] exp;
          exp = 32'hC0DE_0000 + (s + got[g]) * 32'h0101 + g;
          checks++;
          if (dev_cli_d[g].data !== exp) begin
            failures++; $display("FAIL: lanes %0d size %0d word %0d", lane_cfg[g], 4 * ndw, got[g]);
          end
          got[g]++;
          if (got[g] == ndw) tend[g] = cyc + 1;
        end
      end
      for (int g = 0; g < NL; g++) begin
        int lat;
        lat = tend[g] - t0;
        $display("lanes %0d  read %3d bytes  round trip %0d cycles", lane_cfg[g], 4 * ndw, lat);
        checks++;
        if (got[g] != ndw || lat < 2 * LAT || lat > 2 * LAT + 120 + 6 * ndw * ((lane_cfg[g] < 4) ? 4 / lane_cfg[g] : 1) || lat <= prev[g]) begin
          failures++; $display("FAIL: latency out of bounds");
        end
        prev[g] = lat;
      end
      // fewer than four lanes carry less than one DW per cycle
      checks++;
      if (ndw >= 2 && !(prev[0] > prev[1])) begin
        failures++; $display("FAIL: 1 lane not slower than 4 lanes");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
