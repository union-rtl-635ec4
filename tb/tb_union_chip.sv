// tb_union_chip -- one chip (chip 0 of a 2-chip system, control bus looped
// back, data bus dark) under random on-chip traffic.
// Every core sends 8 packets of 1..8 flits to random cores of the same chip;
// receivers take flits with random back-pressure. A scoreboard checks that
// every flit arrives exactly once, at the right core, and that the flits of
// one packet arrive in order and back to back. Counted and checked: packets
// that only crossed the local crossbar, packets that crossed the optical
// tree, refused path requests (contention), and the launch power chosen for
// each path length (turn level 1..4): equal for equal length and rising
// with length. At the end all links must be free again.
module tb_union_chip;
  import union_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  localparam int PKTS = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [63:0] core_tx_valid, core_tx_ready, core_rx_valid, core_rx_ready;
  flit_t core_tx_flit [64];
  flit_t core_rx_flit [64];
  light_t bus_tx_light [NUM_CH];
  light_t bus_rx_light [NUM_CH];
  dir_e tx_dir [NUM_CH], rx_dir [NUM_CH];
  cmsg_t ctrl_tx, ctrl_rx [2];
  logic [NUM_CONC-1:0] laser_on;
  logic signed [15:0] laser_mdbm [NUM_CONC];
  lmask_t link_state;
  logic batch_done;
  logic [15:0] batch_refused;

  union_chip #(.NUM_CHIPS(2), .CHIP_ID(0)) dut (.*);

  always_ff @(posedge clk) ctrl_rx[0] <= rst ? '0 : ctrl_tx;
  assign ctrl_rx[1] = '0;
  always_comb foreach (bus_rx_light[c]) bus_rx_light[c] = '0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- traffic ----
  // data = {src core 6, packet no. 8, flit no. 4, length 4, dst core 6, 4'h0}
  flit_t txq [64][$];
  int expected [int];            // data -> dst core
  int sent_pkts = 0, local_pkts = 0, optical_pkts = 0;
  initial begin
    for (int s = 0; s < 64; s++)
      for (int p = 0; p < PKTS; p++) begin
        int d, len;
        d   = $urandom_range(0, 63);
        len = $urandom_range(1, 8);
        if (d / 4 == s / 4) local_pkts++; else optical_pkts++;
        for (int f = 0; f < len; f++) begin
          flit_t fl;
          fl = '0;
          fl.last     = (f == len - 1);
          fl.dst_chip = 0;
          fl.dst_conc = 4'(d / 4);
          fl.dst_core = 2'(d % 4);
          fl.data     = {6'(s), 8'(p), 4'(f), 4'(len), 6'(d), 4'h0};
          txq[s].push_back(fl);
          expected[int'(fl.data)] = d;
        end
        sent_pkts++;
      end
  end

  always @(posedge clk) if (!rst) begin
    for (int s = 0; s < 64; s++)
      if (core_tx_valid[s] && core_tx_ready[s]) void'(txq[s].pop_front());
  end
  always @(posedge clk) begin
    #1;
    for (int s = 0; s < 64; s++) begin
      core_tx_valid[s] = !rst && txq[s].size() > 0;
      core_tx_flit[s]  = txq[s].size() > 0 ? txq[s][0] : '0;
      core_rx_ready[s] = ($urandom_range(0, 9) < 8);
    end
  end

  // ---- receive scoreboard ----
  int got = 0, bad = 0, order_bad = 0, pkts_done = 0;
  int cur_src [64], cur_flit [64];
  initial foreach (cur_src[i]) cur_src[i] = -1;
  always @(posedge clk) if (!rst) begin
    for (int d = 0; d < 64; d++) if (core_rx_valid[d] && core_rx_ready[d]) begin
      int key, s, f, len;
      key = int'(core_rx_flit[d].data);
      s   = (key >> 26) & 63;
      f   = (key >> 14) & 15;
      len = (key >> 10) & 15;
      if (!expected.exists(key) || expected[key] != d) bad++;
      else expected.delete(key);
      got++;
      // back to back and in order
      if (f == 0) begin
        if (cur_src[d] != -1) order_bad++;
      end else if (cur_src[d] != s || cur_flit[d] != f - 1) order_bad++;
      cur_src[d]  = s;
      cur_flit[d] = f;
      if (core_rx_flit[d].last != (f == len - 1)) order_bad++;
      if (core_rx_flit[d].last) begin cur_src[d] = -1; pkts_done++; end
    end
  end

  // ---- mechanisms ----
  int refused = 0;
  int mdbm_by_h [5];
  int mdbm_bad = 0;
  initial foreach (mdbm_by_h[i]) mdbm_by_h[i] = 0;
  always @(posedge clk) if (!rst) begin
    if (batch_done && batch_refused != 0) refused++;
    for (int c = 0; c < NUM_CONC; c++)
      if (dut.c_tx[c].valid) begin
        int h;
        h = turn_level(4'(c), dut.c_tx[c].flit.dst_conc);
        if (!laser_on[c]) mdbm_bad++;
        if (mdbm_by_h[h] == 0) mdbm_by_h[h] = laser_mdbm[c];
        else if (mdbm_by_h[h] != laser_mdbm[c]) mdbm_bad++;
      end
  end

  initial begin
    core_tx_valid = '0; core_rx_ready = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    wait (pkts_done == sent_pkts);
    repeat (20) @(posedge clk); #1;
    $display("packets %0d (crossbar only %0d, optical %0d), flits %0d, refused batches %0d",
             pkts_done, local_pkts, optical_pkts, got, refused);
    chk(expected.size() == 0, "every flit delivered");
    chk(bad == 0, $sformatf("%0d flits unexpected or at the wrong core", bad));
    chk(order_bad == 0, $sformatf("%0d ordering errors", order_bad));
    chk(local_pkts > 0, "crossbar-only packets happened");
    chk(optical_pkts > 0, "optical packets happened");
    chk(refused > 0, "path requests were refused under contention");
    chk(mdbm_bad == 0, "same power for same path length, laser on while sending");
    for (int h = 1; h <= 4; h++) chk(mdbm_by_h[h] != 0, $sformatf("turn level %0d used", h));
    for (int h = 2; h <= 4; h++)
      chk(mdbm_by_h[h] > mdbm_by_h[h-1], $sformatf("power rises from level %0d to %0d (%0d, %0d)",
                                                   h - 1, h, mdbm_by_h[h-1], mdbm_by_h[h]));
    chk(link_state == '0, "all links free at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
