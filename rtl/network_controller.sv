// network_controller -- central controller of one chip's optical network.
//
// Sets up every optical path on the chip and takes part in the interchip
// protocol. Units, as in the controller's block diagram:
//   * request buffer: requests from the 16 concentrators and from per-chip
//     queues of inbound interchip transactions, merged into one FIFO;
//   * candidate set ("R" of the arbitration algorithm): N_CAND slots;
//   * path finding unit: in one cycle computes, for every candidate, the link
//     mask of its path under the deterministic shuffle routing (path buffer);
//   * link-state registers: one bit per link, 1 = busy;
//   * path check and path scheduler (path_scheduler): AND the masks with the
//     link state, compare candidates pairwise, pick a non-overlapping set;
//   * link update, path configuration output to the router clusters, grant
//     output to the concentrators;
//   * a bus_arbiter replica and the interchip protocol engine.
//
// Batch timing (one batch at a time): LOAD moves one request per cycle from
// the FIFO into free candidate slots (up to N_CAND cycles, ending after the
// last free slot is filled or when the FIFO runs dry), then FIND, CHECK,
// SCHED and UPDATE take one cycle each. A full batch of 16 requests is thus
// decided in 20 cycles, the figure the document reports. Refused candidates
// keep their slot and are retried in the next batch.
// Granted paths, releases and their messages leave one per cycle through the
// emitter, overlapped with the next batch: the emitter sends the path to the
// router clusters (path_msg) and, for an on-chip path, pulses conc_grant one
// cycle later than the cluster update, so the routers are set before light
// arrives.
//
// Interchip protocol (request kind follows from the destination chip):
//   OUT at the source chip: reserve concentrator -> top router -> bus link,
//       configure it, broadcast CM_TXN_REQ on the control bus;
//   IN at the destination chip: the transaction enters a per-source-chip
//       queue, then the request buffer; reserve bus link -> destination
//       concentrator, configure it, then broadcast CM_BUS_REQ (repeated in
//       free control slots until granted);
//   every controller runs the same bus_arbiter on the broadcast requests; on
//       a grant the source sets its interface switch to transmit and grants
//       the source concentrator, the destination sets its switch to receive;
//   tear-down: the source concentrator pulses conc_teardown; the source
//       releases its path and broadcasts CM_TEARDOWN; the destination then
//       releases its path; every arbiter frees the bus segments.
// Each concentrator has at most one transfer in flight, so the controller
// remembers each transfer's path for the release. ctrl_tx, path_msg,
// conc_grant, tx_dir and rx_dir are registered. Synchronous active-high reset.
// The unit list, the 20-cycle batch and the protocol steps follow the
// document; slot order, retry policy and message timing are this design's.
module network_controller
  import union_pkg::*;
#(
  parameter int NUM_CHIPS = 8,
  parameter int CHIP_ID   = 0,
  parameter int N_CAND    = 16
) (
  input  logic                clk,
  input  logic                rst,
  // concentrator control links (lambda1)
  input  logic [NUM_CONC-1:0] conc_req_valid,
  input  req_t                conc_req [NUM_CONC],
  output logic [NUM_CONC-1:0] conc_req_ready,
  input  logic [NUM_CONC-1:0] conc_teardown,
  output logic [NUM_CONC-1:0] conc_grant,
  // path configuration to the router clusters
  output pmsg_t               path_msg,
  // control bus
  output cmsg_t               ctrl_tx,
  input  cmsg_t               ctrl_rx [NUM_CHIPS],
  // interface switches, one per data-bus channel
  output dir_e                tx_dir [NUM_CH],
  output dir_e                rx_dir [NUM_CH],
  // observation
  output lmask_t              link_state,
  output logic                batch_done,     // pulse in the UPDATE cycle
  output logic [N_CAND-1:0]   batch_refused   // candidates refused by that batch
);
  localparam int N_SRC = NUM_CONC + NUM_CHIPS;
  localparam logic [CHIP_W-1:0] ME = CHIP_W'(CHIP_ID);

  // ------------------------------------------------------------------
  // Inbound interchip transactions: one queue per source chip. A source
  // chip has at most NUM_CONC transfers open, so NUM_CONC entries suffice.
  // ------------------------------------------------------------------
  logic [NUM_CHIPS-1:0] ib_empty, ib_pop;
  req_t                 ib_head [NUM_CHIPS];

  for (genvar k = 0; k < NUM_CHIPS; k++) begin : g_inbound
    req_t ib_in;
    logic ib_push;
    logic ib_full;
    always_comb begin
      ib_in          = '0;
      ib_in.kind     = K_IN;
      ib_in.src_chip = ctrl_rx[k].src_chip;
      ib_in.src_conc = ctrl_rx[k].src_conc;
      ib_in.dst_chip = ctrl_rx[k].dst_chip;
      ib_in.dst_conc = ctrl_rx[k].dst_conc;
      ib_push        = (ctrl_rx[k].typ == CM_TXN_REQ) && (ctrl_rx[k].dst_chip == ME);
    end
    sync_fifo #(.T(req_t), .DEPTH(NUM_CONC)) u_ib (
      .clk, .rst, .push(ib_push), .wr_data(ib_in), .pop(ib_pop[k]),
      .rd_data(ib_head[k]), .empty(ib_empty[k]), .full(ib_full)
    );
    assert property (@(posedge clk) disable iff (rst) !(ib_push && ib_full))
      else $error("network_controller: inbound queue overflow");
  end

  // ------------------------------------------------------------------
  // Request buffer
  // ------------------------------------------------------------------
  logic [N_SRC-1:0] rb_valid, rb_ready;
  req_t             rb_req [N_SRC];
  logic             rb_out_valid, rb_pop;
  req_t             rb_out;

  always_comb begin
    for (int i = 0; i < NUM_CONC; i++) begin
      rb_valid[i]        = conc_req_valid[i];
      rb_req[i]          = conc_req[i];
      rb_req[i].src_chip = ME;
      rb_req[i].src_conc = CONC_W'(i);
      rb_req[i].kind     = (conc_req[i].dst_chip == ME) ? K_LOCAL : K_OUT;
    end
    for (int k = 0; k < NUM_CHIPS; k++) begin
      rb_valid[NUM_CONC + k] = !ib_empty[k];
      rb_req[NUM_CONC + k]   = ib_head[k];
      ib_pop[k]              = rb_ready[NUM_CONC + k];
    end
    conc_req_ready = rb_ready[NUM_CONC-1:0];
  end

  request_buffer #(.N_SRC(N_SRC), .DEPTH(16)) u_rb (
    .clk, .rst,
    .in_valid(rb_valid), .in_req(rb_req), .in_ready(rb_ready),
    .out_valid(rb_out_valid), .out_req(rb_out), .out_pop(rb_pop)
  );

  // ------------------------------------------------------------------
  // Candidate set, path buffer and batch FSM
  // ------------------------------------------------------------------
  typedef enum logic [2:0] { S_LOAD, S_FIND, S_CHECK, S_SCHED, S_UPDATE } state_e;
  state_e state;

  req_t              cand [N_CAND];
  logic [N_CAND-1:0] cvalid;    // waiting for a path
  logic [N_CAND-1:0] cgrant;    // granted, waiting for the emitter
  lmask_t            pmask [N_CAND];

  logic [N_CAND-1:0] free_slots;
  logic              free_any;
  logic [CONC_W-1:0] free_idx;
  logic              load_last;

  always_comb begin
    free_slots = ~(cvalid | cgrant);
    free_any   = |free_slots;
    free_idx   = 0;
    for (int i = N_CAND - 1; i >= 0; i--)
      if (free_slots[i]) free_idx = CONC_W'(i);
    // true when the pop of this cycle fills the last free slot
    load_last = ($countones(free_slots) == 1);
  end

  assign rb_pop = (state == S_LOAD) && rb_out_valid && free_any;

  logic [N_CAND-1:0] avail, grant;
  lmask_t            grant_mask;

  path_scheduler #(.N(N_CAND), .W(NUM_LINKS)) u_sched (
    .clk, .rst,
    .check_en  (state == S_CHECK),
    .sched_en  (state == S_SCHED),
    .cand_valid(cvalid),
    .mask      (pmask),
    .link_state(link_state),
    .avail, .grant, .grant_mask
  );

  // ------------------------------------------------------------------
  // Emitter: one release or one granted path per cycle
  // ------------------------------------------------------------------
  logic [NUM_CONC-1:0] pend_td;      // source tear-downs to process
  logic [NUM_CONC-1:0] pend_in_td;   // inbound releases to process
  kind_e               act_kind     [NUM_CONC];
  logic [CHIP_W-1:0]   act_dst_chip [NUM_CONC];
  logic [CONC_W-1:0]   act_dst_conc [NUM_CONC];
  logic [CHIP_W-1:0]   in_src_chip  [NUM_CONC];
  logic [CONC_W-1:0]   in_src_conc  [NUM_CONC];
  logic [NUM_CONC-1:0] bus_pend;     // inbound paths waiting for the bus
  logic [NUM_CONC-1:0] bus_inflight; // a bus request of ours is on the bus

  typedef enum logic [1:0] { E_NONE, E_TD, E_IN_TD, E_GRANT } emit_e;
  emit_e             emit;
  logic [CONC_W-1:0] e_conc;
  logic [CONC_W-1:0] e_slot;
  lmask_t            rel_mask;

  always_comb begin
    emit     = E_NONE;
    e_conc   = 0;
    e_slot   = 0;
    rel_mask = '0;
    if (|pend_td) begin
      emit = E_TD;
      for (int i = NUM_CONC - 1; i >= 0; i--) if (pend_td[i]) e_conc = CONC_W'(i);
      rel_mask = path_mask(act_kind[e_conc], e_conc, act_dst_conc[e_conc]);
    end else if (|pend_in_td) begin
      emit = E_IN_TD;
      for (int i = NUM_CONC - 1; i >= 0; i--) if (pend_in_td[i]) e_conc = CONC_W'(i);
      rel_mask = path_mask(K_IN, '0, e_conc);
    end else if (|cgrant) begin
      emit = E_GRANT;
      for (int i = N_CAND - 1; i >= 0; i--) if (cgrant[i]) e_slot = CONC_W'(i);
    end
  end

  // ------------------------------------------------------------------
  // Control-bus receive side: bus arbitration replica
  // ------------------------------------------------------------------
  logic [NUM_CHIPS-1:0] bgrant;
  logic [NUM_CH-1:0]    ch_busy;

  bus_arbiter #(.NUM_CHIPS(NUM_CHIPS), .N_CH(NUM_CH)) u_barb (
    .clk, .rst, .rx(ctrl_rx), .grant(bgrant), .busy_any(ch_busy)
  );

  logic [NUM_CONC-1:0] bus_grant_src;   // our concentrators granted the bus now
  always_comb begin
    bus_grant_src = '0;
    for (int k = 0; k < NUM_CHIPS; k++)
      if (bgrant[k] && ctrl_rx[k].src_chip == ME)
        bus_grant_src[ctrl_rx[k].src_conc] = 1'b1;
  end

  // Bus-request repeat: round-robin over waiting inbound paths.
  logic [CONC_W-1:0] br_ptr;
  logic              br_any;
  logic [CONC_W-1:0] br_idx;
  always_comb begin
    logic [CONC_W-1:0] idx;
    br_any = 1'b0;
    br_idx = '0;
    for (int k = 0; k < NUM_CONC; k++) begin
      idx = br_ptr + CONC_W'(k);
      if (!br_any && bus_pend[idx] && !bus_inflight[idx]) begin
        br_any = 1'b1;
        br_idx = idx;
      end
    end
  end

  // ------------------------------------------------------------------
  // Sequential part
  // ------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_LOAD;
      cvalid       <= '0;
      cgrant       <= '0;
      link_state   <= '0;
      pend_td      <= '0;
      pend_in_td   <= '0;
      bus_pend     <= '0;
      bus_inflight <= '0;
      br_ptr       <= '0;
      path_msg     <= '0;
      conc_grant   <= '0;
      ctrl_tx      <= '0;
      batch_done   <= 1'b0;
      batch_refused <= '0;
      for (int i = 0; i < NUM_CONC; i++) begin
        act_kind[i]     <= K_LOCAL;
        act_dst_chip[i] <= '0;
        act_dst_conc[i] <= '0;
        in_src_chip[i]  <= '0;
        in_src_conc[i]  <= '0;
      end
      for (int c = 0; c < NUM_CH; c++) begin
        tx_dir[c] <= DIR_NONE;
        rx_dir[c] <= DIR_NONE;
      end
      for (int i = 0; i < N_CAND; i++) begin
        cand[i]  <= '0;
        pmask[i] <= '0;
      end
    end else begin
      // defaults for pulses
      path_msg     <= '0;
      ctrl_tx      <= '0;
      batch_done   <= 1'b0;
      conc_grant   <= bus_grant_src;

      // ---- batch FSM ----
      case (state)
        S_LOAD: begin
          if (rb_pop) begin
            cand[free_idx]   <= rb_out;
            cvalid[free_idx] <= 1'b1;
          end
          if ((rb_pop && load_last) || (!rb_pop && |cvalid)) state <= S_FIND;
        end
        S_FIND: begin
          for (int i = 0; i < N_CAND; i++)
            pmask[i] <= path_mask(cand[i].kind, cand[i].src_conc, cand[i].dst_conc);
          state <= S_CHECK;
        end
        S_CHECK: state <= S_SCHED;
        S_SCHED: state <= S_UPDATE;
        S_UPDATE: begin
          cvalid        <= cvalid & ~grant;
          batch_done    <= 1'b1;
          batch_refused <= cvalid & ~grant;
          state         <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase

      // ---- link state: new grants in, releases out ----
      link_state <= (link_state & ~rel_mask) |
                    ((state == S_UPDATE) ? grant_mask : '0);

      // ---- emitter ----
      case (emit)
        E_TD: begin
          pend_td[e_conc]   <= 1'b0;
          path_msg.valid    <= 1'b1;
          path_msg.setup    <= 1'b0;
          path_msg.kind     <= act_kind[e_conc];
          path_msg.src_conc <= e_conc;
          path_msg.dst_conc <= act_dst_conc[e_conc];
          if (act_kind[e_conc] == K_OUT) begin
            ctrl_tx.typ      <= CM_TEARDOWN;
            ctrl_tx.src_chip <= ME;
            ctrl_tx.src_conc <= e_conc;
            ctrl_tx.dst_chip <= act_dst_chip[e_conc];
            ctrl_tx.dst_conc <= act_dst_conc[e_conc];
          end
        end
        E_IN_TD: begin
          pend_in_td[e_conc] <= 1'b0;
          path_msg.valid     <= 1'b1;
          path_msg.setup     <= 1'b0;
          path_msg.kind      <= K_IN;
          path_msg.src_conc  <= in_src_conc[e_conc];
          path_msg.dst_conc  <= e_conc;
        end
        E_GRANT: begin
          automatic req_t r = cand[e_slot];
          cgrant[e_slot]    <= 1'b0;
          path_msg.valid    <= 1'b1;
          path_msg.setup    <= 1'b1;
          path_msg.kind     <= r.kind;
          path_msg.src_conc <= r.src_conc;
          path_msg.dst_conc <= r.dst_conc;
          case (r.kind)
            K_LOCAL, K_OUT: begin
              act_kind[r.src_conc]     <= r.kind;
              act_dst_chip[r.src_conc] <= r.dst_chip;
              act_dst_conc[r.src_conc] <= r.dst_conc;
            end
            default: begin
              in_src_chip[r.dst_conc] <= r.src_chip;
              in_src_conc[r.dst_conc] <= r.src_conc;
            end
          endcase
          if (r.kind == K_OUT) begin
            ctrl_tx.typ      <= CM_TXN_REQ;
            ctrl_tx.src_chip <= ME;
            ctrl_tx.src_conc <= r.src_conc;
            ctrl_tx.dst_chip <= r.dst_chip;
            ctrl_tx.dst_conc <= r.dst_conc;
          end
        end
        default: ;
      endcase
      // grant pulse one cycle after the cluster message of an on-chip path
      if (path_msg.valid && path_msg.setup && path_msg.kind == K_LOCAL)
        conc_grant[path_msg.src_conc] <= 1'b1;
      if (state == S_UPDATE) cgrant <= (cgrant | grant) &
                                       ~((emit == E_GRANT) ? (N_CAND'(1) << e_slot) : '0);

      // ---- bus-request repeat in a free control slot ----
      if (!(emit == E_TD && act_kind[e_conc] == K_OUT) &&
          !(emit == E_GRANT && cand[e_slot].kind == K_OUT) && br_any) begin
        ctrl_tx.typ         <= CM_BUS_REQ;
        ctrl_tx.src_chip    <= in_src_chip[br_idx];
        ctrl_tx.src_conc    <= in_src_conc[br_idx];
        ctrl_tx.dst_chip    <= ME;
        ctrl_tx.dst_conc    <= CONC_W'(br_idx);
        bus_inflight[br_idx] <= 1'b1;
        br_ptr              <= CONC_W'(br_idx + 1);
      end

      // ---- control-bus receive ----
      for (int k = 0; k < NUM_CHIPS; k++) begin
        automatic cmsg_t m = ctrl_rx[k];
        if (m.typ == CM_BUS_REQ && m.dst_chip == ME) begin
          bus_inflight[m.dst_conc] <= 1'b0;
          if (bgrant[k]) begin
            bus_pend[m.dst_conc] <= 1'b0;
            rx_dir[m.dst_conc]   <= (int'(m.src_chip) > CHIP_ID) ? DIR_RIGHT : DIR_LEFT;
          end
        end
        if (m.typ == CM_BUS_REQ && bgrant[k] && m.src_chip == ME)
          tx_dir[m.dst_conc] <= (int'(m.dst_chip) > CHIP_ID) ? DIR_RIGHT : DIR_LEFT;
        if (m.typ == CM_TEARDOWN) begin
          if (m.dst_chip == ME) begin
            pend_in_td[m.dst_conc] <= 1'b1;
            rx_dir[m.dst_conc]     <= DIR_NONE;
          end
          if (m.src_chip == ME) tx_dir[m.dst_conc] <= DIR_NONE;
        end
      end
      // a newly configured inbound path starts asking for the bus
      if (emit == E_GRANT && cand[e_slot].kind == K_IN)
        bus_pend[cand[e_slot].dst_conc] <= 1'b1;

      // ---- tear-down pulses from the concentrators ----
      for (int i = 0; i < NUM_CONC; i++)
        if (conc_teardown[i]) pend_td[i] <= 1'b1;
    end
  end

  // A concentrator never tears down twice before the first is processed.
  assert property (@(posedge clk) disable iff (rst) (conc_teardown & pend_td) == '0)
    else $error("network_controller: tear-down while one is pending");
  // A granted set never uses a busy link.
  assert property (@(posedge clk) disable iff (rst)
                   (state == S_UPDATE) |-> ((grant_mask & link_state & ~rel_mask) == '0))
    else $error("network_controller: granted path collides with a busy link");
  // Consistency: only available candidates are granted (checked in the
  // cycle the grants are used), and an interface
  // switch is on only while its channel carries a granted transfer.
  assert property (@(posedge clk) disable iff (rst)
                   (state == S_UPDATE) |-> (grant & ~avail) == '0)
    else $error("network_controller: grant of an unavailable candidate");
  for (genvar c = 0; c < NUM_CH; c++) begin : g_dir_chk
    assert property (@(posedge clk) disable iff (rst)
                     (tx_dir[c] == DIR_NONE && rx_dir[c] == DIR_NONE) || ch_busy[c])
      else $error("network_controller: interface switch %0d on without a bus grant", c);
  end
endmodule
