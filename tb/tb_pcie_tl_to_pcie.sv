// tb_pcie_tl_to_pcie: testbench of the endpoint's bus to memory-request bridge.
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
module tb_pcie_tl_to_pcie;
  pcie_system_test u_test ();
endmodule
