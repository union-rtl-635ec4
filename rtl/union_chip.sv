// union_chip -- the optical network of one chip multiprocessor.
//
// 64 cores in 16 concentrators; the concentrators sit at the leaves of a
// 2-ary, 4-level optical fat tree of 32 turnaround routers (8 per level).
// Router (L, s, p) at level L has subtree number s (4-L bits) and position
// p (L-1 bits); its upward port u leads to router (L+1, s>>1, {u,p}), which
// reaches it through its downward port s[0]. Level-1 routers serve
// concentrators 2s and 2s+1; the two upward ports of top router p attach to
// data-bus channels 8u+p through the interface switches.
// The routers of one subtree at one level form a cluster with one control
// unit (14 clusters on levels 1-3 plus the top cluster). The network
// controller at the top of the tree grants paths, sends path messages to the
// clusters (modelled as one broadcast every cluster decodes), and drives the
// interface switches; it talks to the other chips over the control bus.
// Core ports are flattened: core k is core k%4 of concentrator k/4.
// Structure follows the document; the router-cluster grouping and the channel
// numbering are this design's (see union_pkg). Synchronous active-high reset.
module union_chip
  import union_pkg::*;
#(
  parameter int NUM_CHIPS = 8,
  parameter int CHIP_ID   = 0
) (
  input  logic               clk,
  input  logic               rst,
  // cores
  input  logic [63:0]        core_tx_valid,
  input  flit_t              core_tx_flit [64],
  output logic [63:0]        core_tx_ready,
  output logic [63:0]        core_rx_valid,
  output flit_t              core_rx_flit [64],
  input  logic [63:0]        core_rx_ready,
  // interchip data bus, per channel
  output light_t             bus_tx_light [NUM_CH],
  input  light_t             bus_rx_light [NUM_CH],
  output dir_e               tx_dir [NUM_CH],
  output dir_e               rx_dir [NUM_CH],
  // control bus
  output cmsg_t              ctrl_tx,
  input  cmsg_t              ctrl_rx [NUM_CHIPS],
  // lasers of the concentrators
  output logic [NUM_CONC-1:0] laser_on,
  output logic signed [15:0]  laser_mdbm [NUM_CONC],
  // observation
  output lmask_t             link_state,
  output logic               batch_done,
  output logic [15:0]        batch_refused
);
  localparam int NR = ROUTERS_PER_LV;

  // ---------------- concentrators ----------------
  light_t              c_tx [NUM_CONC];
  light_t              c_rx [NUM_CONC];
  logic [NUM_CONC-1:0] c_req_valid, c_req_ready, c_grant, c_teardown;
  req_t                c_req [NUM_CONC];

  for (genvar c = 0; c < NUM_CONC; c++) begin : g_conc
    logic [3:0] txv, txr, rxv, rxr;
    flit_t      txf [4];
    flit_t      rxf [4];
    always_comb begin
      for (int k = 0; k < 4; k++) begin
        txv[k]                  = core_tx_valid[4*c + k];
        txf[k]                  = core_tx_flit[4*c + k];
        rxr[k]                  = core_rx_ready[4*c + k];
      end
    end
    for (genvar k = 0; k < 4; k++) begin : g_core
      assign core_tx_ready[4*c + k] = txr[k];
      assign core_rx_valid[4*c + k] = rxv[k];
      assign core_rx_flit[4*c + k]  = rxf[k];
    end
    concentrator #(.CHIP_ID(CHIP_ID), .CONC_ID(c)) u_conc (
      .clk, .rst,
      .core_tx_valid(txv), .core_tx_flit(txf), .core_tx_ready(txr),
      .core_rx_valid(rxv), .core_rx_flit(rxf), .core_rx_ready(rxr),
      .req_valid(c_req_valid[c]), .req(c_req[c]), .req_ready(c_req_ready[c]),
      .grant(c_grant[c]), .teardown(c_teardown[c]),
      .light_tx(c_tx[c]), .light_rx(c_rx[c]),
      .laser_on(laser_on[c]), .laser_mdbm(laser_mdbm[c])
    );
  end

  // ---------------- routers ----------------
  // Each level keeps its own light arrays (index router = {s, p}); the
  // upward light of level lv comes from level lv-1, the downward light from
  // level lv+1.
  rcfg_t r_cfg [LEVELS][NR];

  for (genvar lv = 0; lv < LEVELS; lv++) begin : g_lv
    light_t dn_in  [NR][2];
    light_t up_in  [NR][2];
    light_t up_out [NR][2];
    light_t dn_out [NR][2];
    for (genvar r = 0; r < NR; r++) begin : g_rt
      localparam int S = r >> lv;
      localparam int P = r & ((1 << lv) - 1);
      otar_router u_rt (
        .cfg(r_cfg[lv][r]),
        .dn_in(dn_in[r]), .up_in(up_in[r]),
        .up_out(up_out[r]), .dn_out(dn_out[r])
      );
      for (genvar b = 0; b < 2; b++) begin : g_dn
        if (lv == 0) begin : g_leaf
          assign dn_in[r][b] = c_tx[2*S + b];
        end else begin : g_inner
          assign dn_in[r][b] =
            g_lv[lv-1].up_out[((2*S + b) << (lv-1)) | (P & ((1 << (lv-1)) - 1))][(P >> (lv-1)) & 1];
        end
      end
      for (genvar u = 0; u < 2; u++) begin : g_up
        if (lv == LEVELS - 1) begin : g_top
          assign up_in[r][u]         = bus_rx_light[u*NR + P];
          assign bus_tx_light[u*NR + P] = up_out[r][u];
        end else begin : g_inner
          assign up_in[r][u] = g_lv[lv+1].dn_out[((S >> 1) << (lv+1)) | (u << lv) | P][S & 1];
        end
      end
    end
  end

  for (genvar c = 0; c < NUM_CONC; c++) begin : g_leaf_rx
    assign c_rx[c] = g_lv[0].dn_out[c >> 1][c & 1];
  end

  // ---------------- network controller ----------------
  pmsg_t path_msg;

  network_controller #(.NUM_CHIPS(NUM_CHIPS), .CHIP_ID(CHIP_ID), .N_CAND(16)) u_nc (
    .clk, .rst,
    .conc_req_valid(c_req_valid), .conc_req(c_req), .conc_req_ready(c_req_ready),
    .conc_teardown(c_teardown), .conc_grant(c_grant),
    .path_msg, .ctrl_tx, .ctrl_rx, .tx_dir, .rx_dir,
    .link_state, .batch_done, .batch_refused
  );

  // ---------------- router clusters ----------------
  for (genvar lv = 0; lv < LEVELS; lv++) begin : g_cl_lv
    for (genvar sid = 0; sid < (NUM_CONC >> (lv + 1)); sid++) begin : g_cl
      localparam int NRC = 1 << lv;
      rcfg_t cfg [NRC];
      cluster_ctrl #(.LEVEL(lv + 1), .SID(sid)) u_cc (
        .clk, .rst, .msg(path_msg), .cfg(cfg)
      );
      for (genvar p = 0; p < NRC; p++) begin : g_p
        assign r_cfg[lv][(sid << lv) | p] = cfg[p];
      end
    end
  end
endmodule
