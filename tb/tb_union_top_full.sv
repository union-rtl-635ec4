// tb_union_top_full -- the system at its full default size: union_top with
// its default parameters (8 chips of 64 cores, 512 cores). Every core sends
// one packet of 1..8 flits, half of them to another chip; see
// union_traffic.svh for what is checked and counted.
module tb_union_top_full;
  localparam int NC       = 8;
  localparam int PKTS     = 1;
  localparam int P_REMOTE = 50;
  localparam int WATCHDOG = 40000;
`include "union_traffic.svh"
  union_top dut (.*);
endmodule
