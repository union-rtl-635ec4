// tb_union_top -- the whole system with four chips under random traffic
// (a third of the packets to another chip); see union_traffic.svh for what
// is checked and counted.
module tb_union_top;
  localparam int NC       = 4;
  localparam int PKTS     = 4;
  localparam int P_REMOTE = 35;
  localparam int WATCHDOG = 40000;
`include "union_traffic.svh"
  union_top #(.NUM_CHIPS(NC)) dut (.*);
endmodule
