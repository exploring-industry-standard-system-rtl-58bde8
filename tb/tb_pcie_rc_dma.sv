// tb_pcie_rc_dma: testbench of the root complex DMA node (memory reads and writes from the device).
//
// The block is exercised in place, inside the assembly that pcie_system_test builds:
// the full PCIe model at its default parameters between a CPU driver, a
// system memory with out-of-order responses and an MMIO device with a copy
// engine; configuration accesses, DMA copies, MSIs and link errors.
// The checks are those of pcie_system_test, which prints the TB_RESULT line and ends the
// simulation; a fault in this block shows up there as lost, duplicated or
// corrupted packets, missing events or a hang caught by the watchdog.
// Origin: the traffic and the stand-in CPU, memory and device are this
// testbench's own; the 500-cycle latency and 8 lanes are the reference's
// main configuration.
module tb_pcie_rc_dma;
  pcie_system_test u_test ();
endmodule
