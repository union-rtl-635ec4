// union_top -- UNION: a unified inter/intrachip optical network for a system
// of NUM_CHIPS chip multiprocessors of 64 cores each.
//
// Every chip (union_chip) carries its own optical fat tree and network
// controller. The chips share
//   * the optical data bus: 16 segmented channels; the top routers of each
//     chip reach them through interface switches (optical_data_bus model);
//   * the optical control bus: a broadcast waveguide on which every network
//     controller may send one 16-bit message per slot; all controllers
//     receive all messages of a slot one cycle later. The waveguide itself is
//     passive optics; its logical effect is the register stage below.
// Light crosses from one chip's network to another's without conversion: a
// packet leaves its concentrator's laser, climbs the source fat tree, runs
// along a bus segment and descends the destination fat tree to the receiving
// concentrator in the same cycle.
// Core ports are [chip][core], core = 4*concentrator + core in concentrator.
// The lasers' settings (laser_on, launch power in milli-dBm) are brought out
// for the analog VCSEL drivers. Synchronous active-high reset.
module union_top
  import union_pkg::*;
#(
  parameter int NUM_CHIPS = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [63:0]        core_tx_valid [NUM_CHIPS],
  input  flit_t              core_tx_flit  [NUM_CHIPS][64],
  output logic [63:0]        core_tx_ready [NUM_CHIPS],
  output logic [63:0]        core_rx_valid [NUM_CHIPS],
  output flit_t              core_rx_flit  [NUM_CHIPS][64],
  input  logic [63:0]        core_rx_ready [NUM_CHIPS],
  output logic [NUM_CONC-1:0] laser_on     [NUM_CHIPS],
  output logic signed [15:0]  laser_mdbm   [NUM_CHIPS][NUM_CONC],
  // observation: per chip, end of an arbitration batch, requests refused in
  // it, and whether all on-chip links are free
  output logic [NUM_CHIPS-1:0] batch_done,
  output logic [15:0]          batch_refused [NUM_CHIPS],
  output logic [NUM_CHIPS-1:0] links_idle
);
  light_t bus_tx [NUM_CHIPS][NUM_CH];
  light_t bus_rx [NUM_CHIPS][NUM_CH];
  dir_e   txd    [NUM_CHIPS][NUM_CH];
  dir_e   rxd    [NUM_CHIPS][NUM_CH];
  cmsg_t  ctrl_tx [NUM_CHIPS];
  cmsg_t  ctrl_rx [NUM_CHIPS];

  for (genvar k = 0; k < NUM_CHIPS; k++) begin : g_chip
    lmask_t      link_state;
    assign links_idle[k] = (link_state == '0);
    union_chip #(.NUM_CHIPS(NUM_CHIPS), .CHIP_ID(k)) u_chip (
      .clk, .rst,
      .core_tx_valid(core_tx_valid[k]), .core_tx_flit(core_tx_flit[k]),
      .core_tx_ready(core_tx_ready[k]),
      .core_rx_valid(core_rx_valid[k]), .core_rx_flit(core_rx_flit[k]),
      .core_rx_ready(core_rx_ready[k]),
      .bus_tx_light(bus_tx[k]), .bus_rx_light(bus_rx[k]),
      .tx_dir(txd[k]), .rx_dir(rxd[k]),
      .ctrl_tx(ctrl_tx[k]), .ctrl_rx(ctrl_rx),
      .laser_on(laser_on[k]), .laser_mdbm(laser_mdbm[k]),
      .link_state, .batch_done(batch_done[k]), .batch_refused(batch_refused[k])
    );
  end

  optical_data_bus #(.NUM_CHIPS(NUM_CHIPS), .N_CH(NUM_CH)) u_bus (
    .tx_light(bus_tx), .tx_dir(txd), .rx_dir(rxd), .rx_light(bus_rx)
  );

  // control bus: one slot per cycle, delivered to every controller
  always_ff @(posedge clk) begin
    if (rst) for (int k = 0; k < NUM_CHIPS; k++) ctrl_rx[k] <= '0;
    else     ctrl_rx <= ctrl_tx;
  end
endmodule
