// concentrator -- joins four cores to the optical network.
//
// Contents: the 5 x 5 local crossbar (ports 0-3 = cores, port 4 = optical),
// the optical transmit side with its path-request state machine, the adaptive
// laser power control, and a receive queue for packets arriving as light.
// A packet between two cores of the same concentrator only crosses the
// crossbar. A packet for any other concentrator is switched to port 4, where
// the transmit machine
//   IDLE  -> REQ : a packet waits at port 4; send a request (destination chip
//                  and concentrator) to the network controller and look up the
//                  launch power for that path;
//   REQ   -> WAIT: the controller accepted the request (req_ready);
//   WAIT  -> SEND: grant received; the path is configured;
//   SEND  -> IDLE: the packet is sent as light, one flit per cycle while the
//                  core supplies it; with the last flit a one-cycle tear-down
//                  pulse goes to the controller.
// Light arriving from the network is written into a receive queue of RX_DEPTH
// flits (one packet) and delivered to the destination core through the
// crossbar; light cannot be stalled, so an overflow is an error (asserted).
// Ports: core_tx/core_rx valid/ready flit streams, the control link to the
// network controller (req_*, grant, teardown), light_tx/light_rx toward the
// level-1 router, and the laser setting (laser_on, laser_mdbm).
// The steps request-grant-send-tear-down and the power look-up during path
// set-up are the document's; queue depth and handshakes are this design's.
// Synchronous active-high reset.
module concentrator
  import union_pkg::*;
#(
  parameter int CHIP_ID   = 0,
  parameter int CONC_ID   = 0,
  parameter int RX_DEPTH  = 32
) (
  input  logic               clk,
  input  logic               rst,
  // cores
  input  logic [3:0]         core_tx_valid,
  input  flit_t              core_tx_flit [4],
  output logic [3:0]         core_tx_ready,
  output logic [3:0]         core_rx_valid,
  output flit_t              core_rx_flit [4],
  input  logic [3:0]         core_rx_ready,
  // control link to the network controller
  output logic               req_valid,
  output req_t               req,
  input  logic               req_ready,
  input  logic               grant,
  output logic               teardown,
  // optical side
  output light_t             light_tx,
  input  light_t             light_rx,
  output logic               laser_on,
  output logic signed [15:0] laser_mdbm
);
  localparam logic [CHIP_W-1:0] ME_CHIP = CHIP_W'(CHIP_ID);
  localparam logic [CONC_W-1:0] ME_CONC = CONC_W'(CONC_ID);

  // ---------------- receive queue ----------------
  flit_t rxq_head;
  logic  rxq_empty, rxq_full, rxq_pop;

  sync_fifo #(.T(flit_t), .DEPTH(RX_DEPTH)) u_rxq (
    .clk, .rst, .push(light_rx.valid), .wr_data(light_rx.flit), .pop(rxq_pop),
    .rd_data(rxq_head), .empty(rxq_empty), .full(rxq_full)
  );
  assert property (@(posedge clk) disable iff (rst) !(light_rx.valid && rxq_full))
    else $error("concentrator: receive queue overflow");

  // ---------------- crossbar ----------------
  logic [4:0] x_in_valid, x_in_ready, x_out_valid, x_out_ready;
  flit_t      x_in_flit [5];
  flit_t      x_out_flit [5];
  logic [2:0] x_in_port [5];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      x_in_valid[i] = core_tx_valid[i];
      x_in_flit[i]  = core_tx_flit[i];
      x_in_port[i]  = (core_tx_flit[i].dst_chip == ME_CHIP && core_tx_flit[i].dst_conc == ME_CONC)
                      ? {1'b0, core_tx_flit[i].dst_core} : 3'd4;
      core_tx_ready[i] = x_in_ready[i];
      core_rx_valid[i] = x_out_valid[i];
      core_rx_flit[i]  = x_out_flit[i];
      x_out_ready[i]   = core_rx_ready[i];
    end
    x_in_valid[4] = !rxq_empty;
    x_in_flit[4]  = rxq_head;
    x_in_port[4]  = {1'b0, rxq_head.dst_core};
    rxq_pop       = x_in_ready[4];
  end

  local_crossbar #(.N(5)) u_xbar (
    .clk, .rst,
    .in_valid(x_in_valid), .in_flit(x_in_flit), .in_port(x_in_port), .in_ready(x_in_ready),
    .out_valid(x_out_valid), .out_flit(x_out_flit), .out_ready(x_out_ready)
  );

  // ---------------- optical transmit ----------------
  typedef enum logic [1:0] { T_IDLE, T_REQ, T_WAIT, T_SEND } tstate_e;
  tstate_e tstate;

  assign x_out_ready[4] = (tstate == T_SEND);
  assign req_valid      = (tstate == T_REQ);

  always_comb begin
    req          = '0;
    req.kind     = (x_out_flit[4].dst_chip == ME_CHIP) ? K_LOCAL : K_OUT;
    req.src_chip = ME_CHIP;
    req.src_conc = ME_CONC;
    req.dst_chip = x_out_flit[4].dst_chip;
    req.dst_conc = x_out_flit[4].dst_conc;
    light_tx       = '0;
    light_tx.valid = (tstate == T_SEND) && x_out_valid[4];
    light_tx.flit  = x_out_flit[4];
  end

  power_ctrl u_pwr (
    .clk, .rst,
    .req_valid(tstate == T_IDLE && x_out_valid[4]),
    .src_chip (ME_CHIP), .src_conc(ME_CONC),
    .dst_chip (x_out_flit[4].dst_chip), .dst_conc(x_out_flit[4].dst_conc),
    .launch_mdbm(laser_mdbm)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      tstate   <= T_IDLE;
      teardown <= 1'b0;
      laser_on <= 1'b0;
    end else begin
      teardown <= 1'b0;
      case (tstate)
        T_IDLE: if (x_out_valid[4]) begin
          tstate   <= T_REQ;
          laser_on <= 1'b1;      // bias the VCSEL during path set-up
        end
        T_REQ:  if (req_ready) tstate <= T_WAIT;
        T_WAIT: if (grant)     tstate <= T_SEND;
        T_SEND: if (x_out_valid[4] && x_out_flit[4].last) begin
          tstate   <= T_IDLE;
          teardown <= 1'b1;
          laser_on <= 1'b0;
        end
        default: tstate <= T_IDLE;
      endcase
    end
  end

  // A grant only comes while waiting for one.
  assert property (@(posedge clk) disable iff (rst) grant |-> (tstate == T_WAIT))
    else $error("concentrator: unexpected grant");
endmodule
