// tb_pcie_phy_tx: testbench of the physical-layer framer (STP/SDP/END/PAD symbol groups).
//
// The block is exercised in place, inside the assembly that pcie_stack_test builds:
// two protocol stacks joined by two link timing models, random TLP traffic
// in both directions, random receiver stalls and one corrupted TLP.
// The checks are those of pcie_stack_test, which prints the TB_RESULT line and ends the
// simulation; a fault in this block shows up there as lost, duplicated or
// corrupted packets, missing events or a hang caught by the watchdog.
// Origin: the traffic pattern and the reduced credit and latency sizes are
// this testbench's own choices, made so that every mechanism occurs quickly.
module tb_pcie_phy_tx;
  pcie_stack_test u_test ();
endmodule
