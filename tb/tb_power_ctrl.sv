// tb_power_ctrl -- the launch power for on-chip paths of every turnaround level
// and interchip paths over 1..7 chips is compared with the loss budget
// recomputed here in real arithmetic (device losses and sensitivity from the
// document, geometry as documented in the module), within 3 milli-dB of
// rounding. Also checks the one-cycle latency and that the power rises with
// path length (the point of adaptive control: short paths get less light).
module tb_power_ctrl;
  import union_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic req_valid;
  logic [2:0] src_chip, dst_chip;
  logic [3:0] src_conc, dst_conc;
  logic signed [15:0] launch_mdbm;
  power_ctrl dut (.clk, .rst, .req_valid, .src_chip, .src_conc, .dst_chip, .dst_conc, .launch_mdbm);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real len_mm [5] = '{1.25, 2.5, 5.0, 10.0, 5.0};
  function automatic real link_db(int l); return 0.12 + 0.17 * len_mm[l]; endfunction
  function automatic real expect_dbm(int h, int d);
    real loss = 0.0;
    if (d == 0) begin
      loss = (2 * h - 1) * 0.515;
      for (int l = 0; l < h; l++) loss += 2 * link_db(l);
    end else begin
      real half = 4 * 0.515;
      for (int l = 0; l <= 4; l++) half += link_db(l);
      loss = 2 * half + 2 * 0.45 + d * 10 * 0.035 + (d - 1) * 0.01;
    end
    return -14.2 + loss;
  endfunction

  task automatic ask(int sc, int so, int dc, int dd, real exp_dbm, string what);
    real diff;
    src_chip = 3'(sc); src_conc = 4'(so); dst_chip = 3'(dc); dst_conc = 4'(dd);
    req_valid = 1; @(posedge clk); #1 req_valid = 0;
    diff = real'(launch_mdbm) - exp_dbm * 1000.0;
    chk(diff < 3.0 && diff > -3.0, $sformatf("%s: %0d vs %f", what, launch_mdbm, exp_dbm * 1000.0));
  endtask

  initial begin
    int prev;
    req_valid = 0; src_chip = 0; dst_chip = 0; src_conc = 0; dst_conc = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    ask(0, 6, 0, 7,  expect_dbm(1, 0), "h1");
    ask(0, 4, 0, 6,  expect_dbm(2, 0), "h2");
    ask(0, 9, 0, 12, expect_dbm(3, 0), "h3");
    ask(0, 0, 0, 15, expect_dbm(4, 0), "h4");
    prev = launch_mdbm;
    for (int d = 1; d < 8; d++) begin
      ask(0, 3, d, 5, expect_dbm(0, d), $sformatf("interchip d=%0d", d));
      chk(int'(launch_mdbm) > prev, "power grows with distance");
      prev = launch_mdbm;
    end
    ask(7, 3, 2, 5, expect_dbm(0, 5), "interchip leftward");
    // holds its value without a request
    prev = launch_mdbm;
    src_chip = 0; dst_chip = 0; src_conc = 1; dst_conc = 0;
    @(posedge clk); #1 chk(int'(launch_mdbm) == prev, "holds without a request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
