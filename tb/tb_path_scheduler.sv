// tb_path_scheduler -- random candidate sets (8 candidates over 24 links)
// against a reference written here: a candidate is available when none of its
// links is busy, and the granted set is built by taking available candidates in
// slot order unless they share a link with one already taken (Algorithm 1).
// Also checks the two-cycle check/schedule timing and that the granted links
// are disjoint from each other and from the busy links.
module tb_path_scheduler;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  localparam int N = 8, W = 24;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic check_en, sched_en;
  logic [N-1:0] cand_valid, avail, grant;
  logic [W-1:0] mask [N];
  logic [W-1:0] link_state, grant_mask;
  path_scheduler #(.N(N), .W(W)) dut (.clk, .rst, .check_en, .sched_en, .cand_valid, .mask,
                                      .link_state, .avail, .grant, .grant_mask);
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [N-1:0] ref_av, ref_gr;
    logic [W-1:0] used, ref_gm;
    check_en = 0; sched_en = 0; cand_valid = '0; link_state = '0;
    for (int i = 0; i < N; i++) mask[i] = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++) begin
        mask[i] = '0;
        for (int k = 0; k < 3; k++) mask[i][$urandom_range(W-1)] = 1'b1;
      end
      cand_valid = N'($urandom);
      link_state = W'($urandom) & W'($urandom) & W'($urandom);
      ref_gr = '0; used = '0; ref_gm = '0;
      for (int i = 0; i < N; i++) begin
        ref_av[i] = cand_valid[i] && ((mask[i] & link_state) == 0);
        if (ref_av[i] && ((mask[i] & used) == 0)) begin
          ref_gr[i] = 1; used |= mask[i]; ref_gm |= mask[i];
        end
      end
      check_en = 1; @(posedge clk); #1 check_en = 0;
      chk(avail == ref_av, "avail after check");
      sched_en = 1; @(posedge clk); #1 sched_en = 0;
      chk(grant == ref_gr, $sformatf("grant %b vs %b", grant, ref_gr));
      chk(grant_mask == ref_gm && (grant_mask & link_state) == 0, "grant mask");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
