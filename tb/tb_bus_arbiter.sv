// tb_bus_arbiter -- 5 chips, 2 channels. Directed part: on one channel the
// requests 0->1, 1->2, 2->3 and 3->4 all fit at once (the best case of a
// segmented bus) and are granted in one slot; 0->3 then waits until a
// tear-down frees segments 0-2; opposite directions over one segment
// collide. Random part: requests and tear-downs against a reference model of
// the segment occupancy and greedy scan kept here.
module tb_bus_arbiter;
  import union_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  localparam int NC = 5, NCH = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  cmsg_t rx [NC];
  logic [NC-1:0] grant;
  logic [NCH-1:0] busy_any;
  bus_arbiter #(.NUM_CHIPS(NC), .N_CH(NCH)) dut (.clk, .rst, .rx, .grant, .busy_any);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cmsg_t m(cmsg_e t, int a, int b, int ch);
    cmsg_t x = '0;
    x.typ = t; x.src_chip = 3'(a); x.dst_chip = 3'(b); x.dst_conc = 4'(ch);
    return x;
  endfunction
  task automatic clear(); for (int k = 0; k < NC; k++) rx[k] = '0; endtask

  // reference
  logic [NC-2:0] occ [NCH];
  int ptr;
  function automatic logic [NC-2:0] segs(int a, int b);
    logic [NC-2:0] s = '0;
    for (int i = 0; i < NC - 1; i++) if (i >= (a < b ? a : b) && i < (a < b ? b : a)) s[i] = 1;
    return s;
  endfunction

  initial begin
    logic [NC-1:0] exp_g;
    logic [NC-2:0] tk [NCH];
    logic [NC-2:0] fr [NCH];
    bit any;
    clear();
    repeat (2) @(posedge clk); #1 rst = 0;
    // four neighbour transfers on channel 0, all in one slot
    rx[0] = m(CM_BUS_REQ, 0, 1, 0); rx[1] = m(CM_BUS_REQ, 1, 2, 0);
    rx[2] = m(CM_BUS_REQ, 2, 3, 0); rx[3] = m(CM_BUS_REQ, 3, 4, 0);
    #1 chk(grant == 5'b01111, "four disjoint transfers share one channel");
    @(posedge clk); #1 clear();
    rx[4] = m(CM_BUS_REQ, 0, 3, 0);
    #1 chk(grant == 5'b00000, "0->3 blocked while segments busy");
    @(posedge clk); #1 clear();
    rx[0] = m(CM_TEARDOWN, 0, 1, 0); rx[1] = m(CM_TEARDOWN, 1, 2, 0); rx[2] = m(CM_TEARDOWN, 2, 3, 0);
    @(posedge clk); #1 clear();
    rx[4] = m(CM_BUS_REQ, 0, 3, 0); rx[1] = m(CM_BUS_REQ, 4, 3, 1);
    #1 chk(grant == 5'b10010, "0->3 after tear-down; other channel independent");
    @(posedge clk); #1 clear();
    rx[2] = m(CM_BUS_REQ, 4, 3, 0);     // segment 3 still busy (3->4)
    #1 chk(grant == 5'b00000, "opposite direction on a busy segment collides");
    @(posedge clk); #1 clear();
    rx[0] = m(CM_TEARDOWN, 0, 3, 0); rx[1] = m(CM_TEARDOWN, 3, 4, 0); rx[2] = m(CM_TEARDOWN, 4, 3, 1);
    @(posedge clk); #1 clear();
    #1 chk(busy_any == '0, "all free again");
    // random against the reference; reference pointer follows the same rule
    ptr = 0;
    for (int c = 0; c < NCH; c++) occ[c] = '0;
    // bring the DUT pointer to a known value: it advanced once per slot with requests (4 slots)
    ptr = 4 % NC;
    for (int t = 0; t < 400; t++) begin
      for (int c = 0; c < NCH; c++) begin tk[c] = '0; fr[c] = '0; end
      exp_g = '0; any = 0;
      for (int k = 0; k < NC; k++) begin
        int a, b, ch, r;
        a = $urandom_range(NC-1); b = (a + 1 + $urandom_range(NC-2)) % NC; ch = $urandom_range(NCH-1);
        r = $urandom_range(3);
        rx[k] = (r < 2) ? m(CM_BUS_REQ, a, b, ch) : '0;
      end
      // tear down one random busy interval occasionally: free a segment range fully inside occ
      for (int k = 0; k < NC; k++) begin
        int idx; idx = (ptr + k) % NC;
        if (rx[idx].typ == CM_BUS_REQ) begin
          logic [NC-2:0] s; s = segs(rx[idx].src_chip, rx[idx].dst_chip);
          any = 1;
          if (((occ[rx[idx].dst_conc] | tk[rx[idx].dst_conc]) & s) == 0) begin
            exp_g[idx] = 1; tk[rx[idx].dst_conc] |= s;
          end
        end
      end
      #1 chk(grant == exp_g, $sformatf("random grant %b vs %b", grant, exp_g));
      @(posedge clk); #1;
      for (int c = 0; c < NCH; c++) occ[c] |= tk[c];
      if (any) ptr = (ptr + 1) % NC;
      clear();
      // free everything granted so far with tear-downs of whole-bus intervals
      if (t % 3 == 2) begin
        for (int c = 0; c < NCH; c++) rx[c] = m(CM_TEARDOWN, 0, NC - 1, c);
        @(posedge clk); #1;
        for (int c = 0; c < NCH; c++) occ[c] = '0;
        clear();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
