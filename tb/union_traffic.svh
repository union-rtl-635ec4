// union_traffic.svh -- body shared by the system testbenches tb_union_top
// and tb_union_top_full. The including module defines NC (number of chips),
// PKTS (packets per core), P_REMOTE (percent of packets sent to another
// chip), WATCHDOG (cycles) and instantiates union_top as dut with these
// signals. Every core sends PKTS packets of 1..8 flits to random cores;
// receivers apply random back-pressure. A scoreboard checks that each flit
// arrives exactly once at the right core of the right chip, and that the
// flits of a packet arrive in order and back to back. The mechanisms of the
// network are counted and each one has to happen at least once:
// crossbar-only delivery, on-chip optical delivery, interchip delivery,
// refused path requests, denied (and so repeated) bus requests, two
// transfers at the same time on one bus channel, and all three kinds of
// control-bus message. The launch power is checked: equal for equal
// distance, rising with the turn level on chip and with the chip distance
// off chip, and higher for any interchip path than for any on-chip path.
// At the end every chip's links must be free.
  import union_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [63:0] core_tx_valid [NC];
  flit_t       core_tx_flit  [NC][64];
  logic [63:0] core_tx_ready [NC];
  logic [63:0] core_rx_valid [NC];
  flit_t       core_rx_flit  [NC][64];
  logic [63:0] core_rx_ready [NC];
  logic [NUM_CONC-1:0] laser_on [NC];
  logic signed [15:0]  laser_mdbm [NC][NUM_CONC];
  logic [NC-1:0] batch_done, links_idle;
  logic [15:0]   batch_refused [NC];

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- traffic ----
  // data = {src chip 3, src core 6, packet 5, flit 4, length 4, dst core 6,
  //         dst chip 3, 1'b0}
  flit_t txq [NC][64][$];
  int expected [int];
  int sent_pkts = 0, n_xbar = 0, n_onchip = 0, n_inter = 0;
  initial begin
    for (int k = 0; k < NC; k++)
      for (int s = 0; s < 64; s++)
        for (int p = 0; p < PKTS; p++) begin
          int dc, d, len;
          dc  = ($urandom_range(0, 99) < P_REMOTE) ? $urandom_range(0, NC - 1) : k;
          d   = $urandom_range(0, 63);
          len = $urandom_range(1, 8);
          if (dc != k) n_inter++;
          else if (d / 4 == s / 4) n_xbar++;
          else n_onchip++;
          for (int f = 0; f < len; f++) begin
            flit_t fl;
            fl = '0;
            fl.last     = (f == len - 1);
            fl.dst_chip = 3'(dc);
            fl.dst_conc = 4'(d / 4);
            fl.dst_core = 2'(d % 4);
            fl.data     = {3'(k), 6'(s), 5'(p), 4'(f), 4'(len), 6'(d), 3'(dc), 1'b0};
            txq[k][s].push_back(fl);
            expected[int'(fl.data)] = 1;
          end
          sent_pkts++;
        end
  end

  always @(posedge clk) if (!rst)
    for (int k = 0; k < NC; k++)
      for (int s = 0; s < 64; s++)
        if (core_tx_valid[k][s] && core_tx_ready[k][s]) void'(txq[k][s].pop_front());
  always @(posedge clk) begin
    #1;
    for (int k = 0; k < NC; k++)
      for (int s = 0; s < 64; s++) begin
        core_tx_valid[k][s] = !rst && txq[k][s].size() > 0;
        core_tx_flit[k][s]  = txq[k][s].size() > 0 ? txq[k][s][0] : '0;
        core_rx_ready[k][s] = ($urandom_range(0, 9) < 8);
      end
  end

  // ---- receive scoreboard ----
  int got = 0, bad = 0, order_bad = 0, pkts_done = 0;
  int cur_src [NC][64], cur_flit [NC][64];
  initial for (int k = 0; k < NC; k++) for (int d = 0; d < 64; d++) cur_src[k][d] = -1;
  always @(posedge clk) if (!rst)
    for (int k = 0; k < NC; k++)
      for (int d = 0; d < 64; d++) if (core_rx_valid[k][d] && core_rx_ready[k][d]) begin
        int key, src, f, len;
        key = int'(core_rx_flit[k][d].data);
        src = (key >> 23) & 511;          // src chip and core
        f   = (key >> 14) & 15;
        len = (key >> 10) & 15;
        if (!expected.exists(key) || ((key >> 4) & 63) != d || ((key >> 1) & 7) != k) bad++;
        else expected.delete(key);
        got++;
        if (f == 0) begin
          if (cur_src[k][d] != -1) order_bad++;
        end else if (cur_src[k][d] != src || cur_flit[k][d] != f - 1) order_bad++;
        cur_src[k][d]  = src;
        cur_flit[k][d] = f;
        if (core_rx_flit[k][d].last != (f == len - 1)) order_bad++;
        if (core_rx_flit[k][d].last) begin cur_src[k][d] = -1; pkts_done++; end
      end

  // ---- mechanisms ----
  int refused = 0, bus_denied = 0, bus_granted = 0, shared_ch = 0;
  int n_txn = 0, n_busreq = 0, n_td = 0;
  int mdbm [int];                 // distance class -> launch power
  int mdbm_bad = 0;

  always @(posedge clk) if (!rst) begin
    for (int k = 0; k < NC; k++) if (batch_done[k] && batch_refused[k] != 0) refused++;
    // the arbiter replica of chip 0 sees every slot
    for (int k = 0; k < NC; k++) begin
      cmsg_t m;
      m = dut.ctrl_rx[k];
      if (m.typ == CM_TXN_REQ)  n_txn++;
      if (m.typ == CM_TEARDOWN) n_td++;
      if (m.typ == CM_BUS_REQ) begin
        n_busreq++;
        if (dut.g_chip[0].u_chip.u_nc.bgrant[k]) bus_granted++; else bus_denied++;
      end
    end
    for (int c = 0; c < NUM_CH; c++) begin
      int n;
      n = 0;
      for (int k = 0; k < NC; k++) if (dut.txd[k][c] != DIR_NONE) n++;
      if (n >= 2) shared_ch++;
    end
  end

  for (genvar k = 0; k < NC; k++) begin : g_mon
    always @(posedge clk) if (!rst)
      for (int c = 0; c < NUM_CONC; c++) begin
        light_t l;
        l = dut.g_chip[k].u_chip.c_tx[c];
        if (l.valid) begin
          int cdist, cls;
          cdist = (int'(l.flit.dst_chip) > k) ? int'(l.flit.dst_chip) - k : k - int'(l.flit.dst_chip);
          cls  = (cdist == 0) ? turn_level(4'(c), l.flit.dst_conc) : 8 + cdist;
          if (!laser_on[k][c]) mdbm_bad++;
          if (!mdbm.exists(cls)) mdbm[cls] = laser_mdbm[k][c];
          else if (mdbm[cls] != laser_mdbm[k][c]) mdbm_bad++;
        end
      end
  end

  initial begin
    int prev;
    for (int k = 0; k < NC; k++) begin core_tx_valid[k] = '0; core_rx_ready[k] = '0; end
    repeat (3) @(posedge clk); #1 rst = 0;
    wait (pkts_done == sent_pkts);
    repeat (30) @(posedge clk); #1;
    $display("packets %0d: crossbar only %0d, on-chip optical %0d, interchip %0d; flits %0d",
             pkts_done, n_xbar, n_onchip, n_inter, got);
    $display("refused batches %0d, bus requests %0d granted %0d denied %0d, shared-channel cycles %0d",
             refused, n_busreq, bus_granted, bus_denied, shared_ch);
    foreach (mdbm[c]) $display("  distance class %0d: launch %0d mdBm", c, mdbm[c]);
    chk(expected.size() == 0, $sformatf("every flit delivered (%0d missing)", expected.size()));
    chk(bad == 0, $sformatf("%0d flits unexpected or at the wrong core", bad));
    chk(order_bad == 0, $sformatf("%0d ordering errors", order_bad));
    chk(n_xbar > 0, "crossbar-only delivery happened");
    chk(n_onchip > 0, "on-chip optical delivery happened");
    chk(n_inter > 0, "interchip delivery happened");
    chk(refused > 0, "refused path requests happened");
    chk(bus_denied > 0, "denied bus requests happened");
    chk(bus_granted == n_inter, $sformatf("one bus grant per interchip packet (%0d)", bus_granted));
    chk(n_txn == n_inter && n_td == n_inter, "one transaction request and one tear-down per interchip packet");
    chk(shared_ch > 0, "two transfers shared a channel");
    chk(mdbm_bad == 0, "same launch power for the same distance, laser on while sending");
    prev = -100000;
    for (int h = 1; h <= 4; h++) if (mdbm.exists(h)) begin
      chk(mdbm[h] > prev, $sformatf("on-chip power rises at turn level %0d", h));
      prev = mdbm[h];
    end
    for (int d = 1; d < NC; d++) if (mdbm.exists(8 + d)) begin
      chk(mdbm[8 + d] > prev, $sformatf("interchip power rises at distance %0d", d));
      prev = mdbm[8 + d];
    end
    chk(mdbm.exists(1) && mdbm.exists(4) && mdbm.exists(9), "short, long and interchip paths used");
    chk(links_idle == '1, "all links free at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
