// tb_cluster_ctrl -- level-2 cluster of subtree 1 (routers (2,1,0) and
// (2,1,1), serving concentrators 4-7). Path messages are sent and the router
// selects compared with settings worked out by hand from the routing rule;
// paths that do not cross the cluster must change nothing, releases clear.
module tb_cluster_ctrl;
  import union_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic  clk = 0, rst = 1;
  pmsg_t msg;
  rcfg_t cfg [2];
  always #5 clk = ~clk;
  cluster_ctrl #(.LEVEL(2), .SID(1)) dut (.clk, .rst, .msg, .cfg);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(bit setup, kind_e k, int s, int d);
    msg = '{valid: 1'b1, setup: setup, kind: k, src_conc: 4'(s), dst_conc: 4'(d)};
    @(posedge clk); #1;
    msg = '0;
  endtask

  initial begin
    msg = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    chk(cfg[0] == '0 && cfg[1] == '0, "reset clears");
    send(1, K_LOCAL, 4, 7);     // turnaround here: router p=1, out down-right from lower-left
    chk(cfg[1][3] == SEL_DN0, "local 4->7 turn");
    send(1, K_OUT, 5, 2);       // up through router p=0 toward up-right
    chk(cfg[0][1] == SEL_DN0, "out 5->2");
    send(1, K_IN, 0, 6);        // down through router p=0 from up-right to down-right
    chk(cfg[0][3] == SEL_UP1, "in ->6");
    send(1, K_LOCAL, 0, 5);     // descends here: router p=1, from up-left to down-left
    chk(cfg[1][2] == SEL_UP0, "local 0->5 down");
    send(1, K_LOCAL, 0, 1);     // does not reach level 2
    send(1, K_LOCAL, 8, 12);    // another subtree
    chk(cfg[0] == '{SEL_UP1, SEL_NONE, SEL_DN0, SEL_NONE} &&
        cfg[1] == '{SEL_DN0, SEL_UP0, SEL_NONE, SEL_NONE}, "no side effects");
    send(0, K_LOCAL, 4, 7);
    chk(cfg[1][3] == SEL_NONE, "release");
    send(0, K_IN, 0, 6);
    chk(cfg[0][3] == SEL_NONE && cfg[0][1] == SEL_DN0, "release in");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
