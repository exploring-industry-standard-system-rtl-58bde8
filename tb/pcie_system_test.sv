// pcie_system_test: end-to-end test of the whole PCIe model at its default
// parameters (8 lanes, 500-cycle link latency in each direction).
//
// Around the model the testbench places a CPU driver on the endpoint manager
// and MMIO nodes, a system memory that answers after random delays and out of
// order, and an MMIO device behind the endpoint shim. The device has a few
// registers (source, destination, length, command, done count, scratch) and a
// copy engine: on command it reads the source with burst Gets of 16 words,
// writes the words to the destination with single Puts, and then pulses its
// interrupt, which reaches the CPU as an MSI.
//
// Checked: the root complex ID register; a configuration write and read of
// the device scratch register and the round-trip time of that read; two
// copies through DMA reads and writes, compared word for word with the
// source; the interrupt and its pending bit; bit errors injected on both link
// directions, which must be recovered by replay without corrupting data; the
// error and replay counters. Counted, and each required at least once: credit
// stalls, UpdateFC DLLPs, replays in both directions, out-of-order memory
// responses reordered by the DMA node, MSIs, configuration reads and writes,
// DMA read and write TLPs.
//
// This module is the shared body of the testbenches of the top model and of
// the root complex and endpoint blocks; each of those wraps one instance of
// it. The model keeps all its default parameters.
// Origin: the traffic and the stand-in CPU, memory and device are this
// testbench's own; the 500-cycle latency and 8 lanes are the reference's
// main configuration.
module pcie_system_test;
  import pcie_pkg::*;

  localparam int LAT = 500;            // the model's default link latency

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  tl_a_t epm_a, mmio_a, dma_a, dev_mgr_a, dev_cli_a;
  tl_d_t epm_d, mmio_d, dma_d, dev_mgr_d, dev_cli_d;
  logic epm_a_valid, epm_a_ready, epm_d_valid, epm_d_ready;
  logic mmio_a_valid, mmio_a_ready, mmio_d_valid, mmio_d_ready;
  logic dma_a_valid, dma_a_ready, dma_d_valid, dma_d_ready;
  logic dev_mgr_a_valid, dev_mgr_a_ready, dev_mgr_d_valid, dev_mgr_d_ready;
  logic dev_cli_a_valid, dev_cli_a_ready, dev_cli_d_valid, dev_cli_d_ready;
  logic irq;
  logic [0:0] dev_irq;
  logic [1:0] err_inject, credit_stall, replay_start;
  logic reorder_event, msi_event;
  logic [1:0] fc_update, link_err;

  pcie_model dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------ event counters
  int n_stall = 0, n_replay_rc = 0, n_replay_ep = 0, n_reorder = 0, n_msi = 0;
  int n_err_rc = 0, n_err_ep = 0, n_fc = 0, n_cfgrd = 0, n_cfgwr = 0, n_mrd = 0, n_mwr = 0;
  always @(posedge clk) if (rst_n) begin
    if (|credit_stall) n_stall++;
    if (replay_start[0]) n_replay_rc++;
    if (replay_start[1]) n_replay_ep++;
    if (reorder_event) n_reorder++;
    if (msi_event) n_msi++;
    if (|fc_update) n_fc++;
    if (link_err[0]) n_err_rc++;
    if (link_err[1]) n_err_ep++;
    if (dut.u_ep.p2t_rx_valid && dut.u_ep.p2t_rx_ready && dut.u_ep.p2t_rx.sop) begin
      if (tlp_ft(dut.u_ep.p2t_rx.data) == FT_CFGRD) n_cfgrd++;
      if (tlp_ft(dut.u_ep.p2t_rx.data) == FT_CFGWR) n_cfgwr++;
    end
    if (dut.u_rc.dma_rx_valid && dut.u_rc.dma_rx_ready && dut.u_rc.dma_rx.sop) begin
      if (tlp_ft(dut.u_rc.dma_rx.data) == FT_MRD) n_mrd++;
      if (tlp_ft(dut.u_rc.dma_rx.data) == FT_MWR) n_mwr++;
    end
  end

  // ------------------------------------------------------ system memory
  localparam int MEMW = 4096;
  logic [31:0] mem [MEMW];
  int mem_rate = 100;                  // percent of cycles the memory accepts
  typedef struct { int due; tl_d_t d; } pend_t;
  pend_t pend [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    dma_a_ready <= ($urandom_range(0, 99) < mem_rate);
    dma_d_valid <= 1'b0;
    if (rst_n && dma_a_valid && dma_a_ready) begin
      pend_t p;
      p.due = cyc + $urandom_range(2, 24);
      p.d.source = dma_a.source;
      p.d.error  = 1'b0;
      if (dma_a.opcode == TL_PUT) begin
        mem[dma_a.address[13:2]] <= dma_a.data;
        p.d.opcode = TL_ACK;
        p.d.data   = '0;
      end else begin
        p.d.opcode = TL_ACKD;
        p.d.data   = mem[dma_a.address[13:2]];
      end
      pend.push_back(p);
    end
    // answer one due request, chosen at random: responses come out of order
    if (pend.size() > 0) begin
      int k;
      k = $urandom_range(0, pend.size() - 1);
      if (pend[k].due <= cyc) begin
        dma_d       <= pend[k].d;
        dma_d_valid <= 1'b1;
        pend.delete(k);
      end
    end
  end

  // ------------------------------------------------------ MMIO device
  logic [31:0] dreg [6];
  bit start_copy = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      dev_mgr_d_valid <= 1'b0;
      for (int i = 0; i < 6; i++) dreg[i] <= '0;
    end else begin
      if (dev_mgr_d_valid && dev_mgr_d_ready) dev_mgr_d_valid <= 1'b0;
      if (dev_mgr_a_valid && dev_mgr_a_ready) begin
        int r;
        r = int'(dev_mgr_a.address[4:2]);
        dev_mgr_d_valid  <= 1'b1;
        dev_mgr_d.source <= dev_mgr_a.source;
        dev_mgr_d.error  <= (r > 5);
        if (dev_mgr_a.opcode == TL_PUT) begin
          dev_mgr_d.opcode <= TL_ACK;
          dev_mgr_d.data   <= '0;
          if (r <= 5) dreg[r] <= dev_mgr_a.data;
          if (r == 3) start_copy <= 1;
        end else begin
          dev_mgr_d.opcode <= TL_ACKD;
          dev_mgr_d.data   <= (r <= 5) ? dreg[r] : 32'hDEAD_BEEF;
        end
      end
    end
  end
  assign dev_mgr_a_ready = !dev_mgr_d_valid;

  // copy engine: burst reads of 16 words into a buffer, then single writes
  initial begin
    dev_cli_a_valid = 0; dev_cli_a = '0; dev_cli_d_ready = 1; dev_irq = '0;
    forever begin
      logic [31:0] cbuf [256];
      int len, src, dst;
      @(posedge clk);
      if (start_copy) begin
        start_copy = 0;
        src = dreg[0]; dst = dreg[1]; len = dreg[2];
        // read phase: bursts of 16 words
        for (int b = 0; b < len; b += 16) begin
          int got;
          @(posedge clk);
          dev_cli_a <= '{opcode: TL_GET, size: 3'd6, address: src + 4 * b, mask: 4'hF,
                         data: 0, source: 8'(b / 16 % 4)};
          dev_cli_a_valid <= 1;
          do @(negedge clk); while (!dev_cli_a_ready);
          @(posedge clk);
          dev_cli_a_valid <= 0;
          got = 0;
          while (got < 16) begin
            @(negedge clk);
            if (dev_cli_d_valid) begin
              if (dev_cli_d.opcode != TL_ACKD || dev_cli_d.error) begin
                failures++; $display("FAIL: device read response");
              end
              cbuf[b + got] = dev_cli_d.data;
              got++;
            end
          end
        end
        // write phase: back-to-back single-word posted writes
        for (int w = 0; w < len; w++) begin
          @(posedge clk);
          dev_cli_a <= '{opcode: TL_PUT, size: 3'd2, address: dst + 4 * w, mask: 4'hF,
                         data: cbuf[w], source: 8'd100};
          dev_cli_a_valid <= 1;
          do @(negedge clk); while (!dev_cli_a_ready);
          @(posedge clk);
          dev_cli_a_valid <= 0;
          do @(negedge clk); while (!dev_cli_d_valid);
          @(posedge clk);
        end
        dreg[4] = dreg[4] + 1;
        dev_irq <= 1'b1;
        repeat (4) @(posedge clk);
        dev_irq <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------ CPU driver
  task automatic bus(input bit to_mmio, input bit wr, input logic [31:0] addr,
                     input logic [31:0] wdata, output logic [31:0] rdata, output bit err);
    tl_a_t a;
    a = '{opcode: wr ? TL_PUT : TL_GET, size: 3'd2, address: addr, mask: 4'hF, data: wdata,
          source: 8'h07};
    @(posedge clk);
    if (to_mmio) begin
      mmio_a <= a; mmio_a_valid <= 1;
      do @(negedge clk); while (!mmio_a_ready);
      @(posedge clk);
      mmio_a_valid <= 0;
      do @(negedge clk); while (!mmio_d_valid);
      rdata = mmio_d.data; err = mmio_d.error;
    end else begin
      epm_a <= a; epm_a_valid <= 1;
      do @(negedge clk); while (!epm_a_ready);
      @(posedge clk);
      epm_a_valid <= 0;
      do @(negedge clk); while (!epm_d_valid);
      rdata = epm_d.data; err = epm_d.error;
      if (epm_d.source != 8'h07) begin failures++; $display("FAIL: source"); end
    end
    @(posedge clk);
  endtask

  task automatic copy_test(input int src, input int dst, input int len);
    logic [31:0] r;
    bit e;
    int t0;
    for (int i = 0; i < len; i++) mem[src / 4 + i] = $urandom();
    bus(0, 1, 32'h0, src, r, e);
    bus(0, 1, 32'h4, dst, r, e);
    bus(0, 1, 32'h8, len, r, e);
    bus(0, 1, 32'hC, 1, r, e);
    t0 = cyc;
    while (!irq && cyc - t0 < 300000) @(posedge clk);
    check(irq, "interrupt after copy");
    bus(1, 0, 32'h04, 0, r, e);
    check(r[0], "MSI pending bit");
    bus(1, 1, 32'h04, 32'h1, r, e);
    repeat (2) @(posedge clk);
    check(!irq, "interrupt cleared");
    for (int i = 0; i < len; i++) begin
      check(mem[dst / 4 + i] == mem[src / 4 + i], "copied word");
      if (mem[dst / 4 + i] != mem[src / 4 + i]) $display("  word %0d: %h vs %h", i, mem[dst / 4 + i], mem[src / 4 + i]);
    end
  endtask

  initial begin
    logic [31:0] r;
    bit e;
    int t0, rt;
    epm_a_valid = 0; mmio_a_valid = 0; epm_a = '0; mmio_a = '0;
    epm_d_ready = 1; mmio_d_ready = 1; err_inject = 0;
    for (int i = 0; i < MEMW; i++) mem[i] = '0;
    repeat (10) @(posedge clk);
    rst_n = 1;
    repeat (3 * LAT) @(posedge clk);   // initial flow-control exchange

    bus(1, 0, 32'h00, 0, r, e);
    check(r == 32'h5043_4965, "root complex ID");
    bus(1, 1, 32'h08, 32'h1, r, e);      // enable MSI vector 0

    // configuration write and read of the device scratch register
    bus(0, 1, 32'h14, 32'hA5A5_1234, r, e);
    check(!e, "config write status");
    t0 = cyc;
    bus(0, 0, 32'h14, 0, r, e);
    rt = cyc - t0;
    check(r == 32'hA5A5_1234 && !e, "config read data");
    $display("config read round trip: %0d cycles", rt);
    check(rt >= 2 * LAT && rt < 2 * LAT + 150, "config read round-trip time");
    bus(0, 0, 32'h1C, 0, r, e);
    check(e, "read of a missing device register reports an error");

    // DMA copy at full memory speed, then with a slow memory (credit stalls)
    copy_test(32'h0000, 32'h2000, 64);
    mem_rate = 3;
    copy_test(32'h1000, 32'h3000, 128);
    mem_rate = 100;

    // bit errors on both link directions
    err_inject <= 2'b01; @(posedge clk); err_inject <= 2'b00;
    bus(0, 1, 32'h14, 32'h0BAD_F00D, r, e);
    bus(0, 0, 32'h14, 0, r, e);
    check(r == 32'h0BAD_F00D, "config data after replay");
    err_inject <= 2'b10; @(posedge clk); err_inject <= 2'b00;
    copy_test(32'h0400, 32'h2400, 32);
    bus(0, 0, 32'h10, 0, r, e);
    check(r == 3, "device done count");
    bus(1, 0, 32'h14, 0, r, e);
    check(r >= 1, "root complex error count");
    bus(1, 0, 32'h18, 0, r, e);
    check(r >= 1, "root complex replay count");

    repeat (2 * LAT) @(posedge clk);
    $display("errors=%0d/%0d stalls=%0d fc=%0d replay_rc=%0d replay_ep=%0d reorder=%0d msi=%0d cfgrd=%0d cfgwr=%0d mrd=%0d mwr=%0d",
             n_err_rc, n_err_ep, n_stall, n_fc, n_replay_rc, n_replay_ep, n_reorder, n_msi, n_cfgrd, n_cfgwr, n_mrd, n_mwr);
    check(n_stall > 0, "credit stall happened");
    check(n_fc > 0, "UpdateFC sent");
    check(n_err_rc > 0 && n_err_ep > 0, "damaged packets detected at both ends");
    check(n_replay_rc > 0, "root complex replay");
    check(n_replay_ep > 0, "endpoint replay");
    check(n_reorder > 0, "DMA response reordering");
    check(n_msi == 3, "MSI count");
    check(n_cfgrd > 0 && n_cfgwr > 0, "configuration reads and writes");
    check(n_mrd == 14 && n_mwr == 224, "DMA read and write TLP counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
