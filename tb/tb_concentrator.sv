// tb_concentrator -- concentrator 5 of chip 0.
//  1. core 0 -> core 2 of the same concentrator: crosses only the crossbar,
//     no request to the controller;
//  2. core 1 -> concentrator 9: a request with the right destination, laser
//     biased at the launch power of a 4-level path (-3.261 dBm, worked out by
//     hand from the loss figures), no light before the grant, then the four
//     flits as light starting the cycle after the grant, and one tear-down
//     pulse right after the last flit;
//  3. light arriving for core 3 is queued and delivered to core 3.
module tb_concentrator;
  import union_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [3:0] core_tx_valid, core_tx_ready, core_rx_valid, core_rx_ready;
  flit_t core_tx_flit [4], core_rx_flit [4];
  logic req_valid, req_ready, grant, teardown, laser_on;
  req_t req;
  light_t light_tx, light_rx;
  logic signed [15:0] laser_mdbm;
  concentrator #(.CHIP_ID(0), .CONC_ID(5)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rx_data [4][$];
  int light_data [$];
  int light_cyc [$];
  int td_cnt = 0, td_cyc = 0, cyc = 0, grant_cyc = 0;
  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    for (int k = 0; k < 4; k++)
      if (core_rx_valid[k] && core_rx_ready[k]) rx_data[k].push_back(int'(core_rx_flit[k].data));
    if (light_tx.valid) begin light_data.push_back(int'(light_tx.flit.data)); light_cyc.push_back(cyc); end
    if (teardown) begin td_cnt <= td_cnt + 1; td_cyc <= cyc; end
  end

  task automatic send_pkt(int core, int conc, int dcore, int n, int base);
    for (int i = 0; i < n; i++) begin
      core_tx_flit[core] = '0;
      core_tx_flit[core].dst_chip = 0; core_tx_flit[core].dst_conc = 4'(conc);
      core_tx_flit[core].dst_core = 2'(dcore);
      core_tx_flit[core].data = 32'(base + i); core_tx_flit[core].last = (i == n - 1);
      core_tx_valid[core] = 1;
      do @(posedge clk); while (!core_tx_ready[core]);
      #1;
    end
    core_tx_valid[core] = 0;
  endtask

  initial begin
    core_tx_valid = '0; core_rx_ready = '1; req_ready = 0; grant = 0; light_rx = '0;
    for (int k = 0; k < 4; k++) core_tx_flit[k] = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    // 1. local
    send_pkt(0, 5, 2, 3, 100);
    repeat (2) @(posedge clk);
    chk(rx_data[2].size() == 3 && rx_data[2][0] == 100 && rx_data[2][2] == 102, "local packet via crossbar");
    chk(!req_valid, "no request for local traffic");
    // 2. optical
    fork
      send_pkt(1, 9, 1, 4, 200);
      begin
        wait (req_valid); #1;
        chk(req.dst_chip == 0 && req.dst_conc == 9 && req.src_conc == 5 && req.kind == K_LOCAL, "request fields");
        @(posedge clk); #1;
        chk(laser_on && laser_mdbm == -16'sd3261, $sformatf("launch power %0d", laser_mdbm));
        repeat (2) @(posedge clk); #1 req_ready = 1;
        @(posedge clk); #1 req_ready = 0;
        repeat (3) @(posedge clk); #1;
        chk(light_data.size() == 0, "no light before grant");
        grant = 1; grant_cyc = cyc; @(posedge clk); #1 grant = 0;
      end
    join
    repeat (3) @(posedge clk);
    chk(light_data.size() == 4 && light_data[0] == 200 && light_data[3] == 203, "four flits as light");
    chk(light_cyc.size() > 0 && light_cyc[0] == grant_cyc + 1, "light starts the cycle after the grant");
    chk(td_cnt == 1 && td_cyc == light_cyc[3] + 1, "one tear-down after the last flit");
    chk(!laser_on, "laser off after the packet");
    // 3. receive
    #1;
    for (int i = 0; i < 3; i++) begin
      light_rx = '0; light_rx.valid = 1; light_rx.flit.dst_core = 3; light_rx.flit.data = 32'(300 + i);
      light_rx.flit.last = (i == 2);
      @(posedge clk); #1;
    end
    light_rx = '0;
    repeat (4) @(posedge clk);
    chk(rx_data[3].size() == 3 && rx_data[3][0] == 300 && rx_data[3][2] == 302, "optical packet to core 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
