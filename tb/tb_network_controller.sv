// tb_network_controller -- controller of chip 1 in a 3-chip system; this
// testbench plays the control bus (own messages come back one cycle later)
// and chips 0 and 2.
//  1. all 16 concentrators request a path to their neighbour (c -> c^1):
//     from the first request taken out of the buffer to the update of the
//     link state must take 20 cycles (16 requests in 20 cycles), all 16 are
//     granted, 32 links become busy; tear-downs free them all;
//  2. concentrators 0 and 1 both ask for concentrator 5: one is granted, the
//     other refused and granted only after the first tears down;
//  3. outbound: concentrator 3 -> chip 2 concentrator 9: a transaction
//     request goes on the control bus; when chip 2's bus request is granted
//     the controller grants concentrator 3 and points interface switch 9 to
//     the right; the tear-down is broadcast and the switch turned off;
//  4. inbound with a busy bus: while chips 0 -> 2 hold channel 2, chip 2
//     sends a transaction for concentrator 2; the controller reserves the
//     downward path, repeats its bus request until the segment is freed, then
//     turns interface switch 2 to receive from the right.
module tb_network_controller;
  import union_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  localparam int NCH = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [15:0] conc_req_valid, conc_req_ready, conc_teardown, conc_grant;
  req_t conc_req [16];
  pmsg_t path_msg;
  cmsg_t ctrl_tx, ctrl_rx [NCH], slot0, slot2;
  dir_e tx_dir [16], rx_dir [16];
  lmask_t link_state;
  logic batch_done;
  logic [15:0] batch_refused;

  network_controller #(.NUM_CHIPS(NCH), .CHIP_ID(1)) dut (.*);

  always_ff @(posedge clk) begin
    ctrl_rx[1] <= rst ? '0 : ctrl_tx;
    ctrl_rx[0] <= rst ? '0 : slot0;
    ctrl_rx[2] <= rst ? '0 : slot2;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, grants [16], first_pop = -1, update_cyc = -1, bus_req_sent = 0, refused_seen = 0;
  cmsg_t sent [$];
  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    for (int i = 0; i < 16; i++) if (conc_grant[i]) grants[i]++;
    if (dut.rb_pop && first_pop < 0) first_pop = cyc;
    if (dut.state == 3'd4 && update_cyc < 0) update_cyc = cyc;
    if (ctrl_tx.typ != CM_NONE) sent.push_back(ctrl_tx);
    if (ctrl_tx.typ == CM_BUS_REQ) bus_req_sent++;
    if (batch_done && batch_refused != 0) refused_seen++;
  end
  // concentrators hold a request until accepted
  always @(posedge clk)
    for (int i = 0; i < 16; i++) if (conc_req_ready[i]) conc_req_valid[i] <= 1'b0;

  task automatic ask(int c, int chip, int d);
    conc_req[c] = '0; conc_req[c].dst_chip = 3'(chip); conc_req[c].dst_conc = 4'(d);
    conc_req_valid[c] = 1'b1;
  endtask
  task automatic td(logic [15:0] v);
    conc_teardown = v; @(posedge clk); #1 conc_teardown = '0;
  endtask
  function automatic cmsg_t cm(cmsg_e t, int sc, int so, int dc, int dd);
    cmsg_t m = '0;
    m.typ = t; m.src_chip = 3'(sc); m.src_conc = 4'(so); m.dst_chip = 3'(dc); m.dst_conc = 4'(dd);
    return m;
  endfunction
  function automatic bit was_sent(cmsg_t m);
    foreach (sent[i]) if (sent[i] == m) return 1;
    return 0;
  endfunction

  initial begin
    int n, first;
    conc_req_valid = '0; conc_teardown = '0; slot0 = '0; slot2 = '0;
    for (int i = 0; i < 16; i++) begin conc_req[i] = '0; grants[i] = 0; end
    repeat (3) @(posedge clk); #1 rst = 0;

    // ---- 1. sixteen requests in one batch ----
    for (int c = 0; c < 16; c++) ask(c, 1, c ^ 1);
    repeat (45) @(posedge clk); #1;
    chk(update_cyc - first_pop + 1 == 20, $sformatf("16 requests decided in %0d cycles", update_cyc - first_pop + 1));
    n = 0; for (int c = 0; c < 16; c++) n += grants[c];
    chk(n == 16, $sformatf("all 16 granted (%0d)", n));
    chk($countones(link_state) == 32, "32 links busy");
    td('1);
    repeat (20) @(posedge clk); #1;
    chk(link_state == '0, "all links free after tear-down");

    // ---- 2. collision ----
    for (int i = 0; i < 16; i++) grants[i] = 0;
    ask(0, 1, 5); ask(1, 1, 5);
    repeat (20) @(posedge clk); #1;
    chk(grants[0] + grants[1] == 1, "one of two colliding requests granted");
    chk(refused_seen > 0, "the other was refused");
    first = (grants[0] != 0) ? 0 : 1;
    td(16'(1 << first));
    repeat (20) @(posedge clk); #1;
    chk(grants[0] == 1 && grants[1] == 1, "refused request granted after release");
    td(16'(1 << (1 - first)));
    repeat (10) @(posedge clk); #1;
    chk(link_state == '0, "links free");

    // ---- 3. outbound ----
    for (int i = 0; i < 16; i++) grants[i] = 0;
    ask(3, 2, 9);
    repeat (15) @(posedge clk); #1;
    chk(was_sent(cm(CM_TXN_REQ, 1, 3, 2, 9)), "transaction request broadcast");
    chk(grants[3] == 0, "no grant before the bus is reserved");
    slot2 = cm(CM_BUS_REQ, 1, 3, 2, 9); @(posedge clk); #1 slot2 = '0;
    repeat (3) @(posedge clk); #1;
    chk(grants[3] == 1, "source granted after bus grant");
    chk(tx_dir[9] == DIR_RIGHT, "interface switch transmits right");
    td(16'h0008);
    repeat (6) @(posedge clk); #1;
    chk(was_sent(cm(CM_TEARDOWN, 1, 3, 2, 9)), "tear-down broadcast");
    chk(tx_dir[9] == DIR_NONE && link_state == '0, "switch off, links free");

    // ---- 4. inbound, bus busy ----
    slot0 = cm(CM_BUS_REQ, 0, 7, 2, 2); @(posedge clk); #1 slot0 = '0;   // 0 -> 2 on channel 2
    slot2 = cm(CM_TXN_REQ, 2, 4, 1, 2); @(posedge clk); #1 slot2 = '0;
    bus_req_sent = 0;
    repeat (20) @(posedge clk); #1;
    chk(bus_req_sent >= 2, $sformatf("bus request repeated while busy (%0d)", bus_req_sent));
    chk(rx_dir[2] == DIR_NONE, "not receiving yet");
    chk($countones(link_state) == 5, "downward path reserved");
    slot0 = cm(CM_TEARDOWN, 0, 7, 2, 2); @(posedge clk); #1 slot0 = '0;
    repeat (6) @(posedge clk); #1;
    chk(rx_dir[2] == DIR_RIGHT, "receiving from the right after grant");
    slot2 = cm(CM_TEARDOWN, 2, 4, 1, 2); @(posedge clk); #1 slot2 = '0;
    repeat (6) @(posedge clk); #1;
    chk(rx_dir[2] == DIR_NONE && link_state == '0, "inbound released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
