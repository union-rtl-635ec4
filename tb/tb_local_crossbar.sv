// tb_local_crossbar -- 5 x 5 crossbar. Inputs 0 and 2 both send 4-flit
// packets to output 3 while input 1 sends to output 0: output 3 must carry one
// whole packet then the other (no interleaving, round-robin order), output 0
// runs in parallel, and a stalled output (ready low) holds its flit. Every
// flit is compared with a scoreboard of what was sent.
module tb_local_crossbar;
  import union_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [4:0] in_valid, in_ready, out_valid, out_ready;
  flit_t in_flit [5], out_flit [5];
  logic [2:0] in_port [5];
  local_crossbar #(.N(5)) dut (.clk, .rst, .in_valid, .in_flit, .in_port, .in_ready,
                               .out_valid, .out_flit, .out_ready);
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sent_cnt [5];
  int got [5][$];
  // sources: input i sends 4 flits with data = 16*i + n
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < 5; i++)
      if (in_valid[i] && in_ready[i]) sent_cnt[i] <= sent_cnt[i] + 1;
    for (int o = 0; o < 5; o++)
      if (out_valid[o] && out_ready[o]) got[o].push_back(int'(out_flit[o].data));
  end
  always_comb
    for (int i = 0; i < 5; i++) begin
      in_flit[i]      = '0;
      in_flit[i].data = 32'(16 * i + sent_cnt[i]);
      in_flit[i].last = (sent_cnt[i] == 3);
      in_valid[i]     = (i == 0 || i == 1 || i == 2) && (sent_cnt[i] < 4);
      in_port[i]      = (i == 1) ? 3'd0 : 3'd3;
    end

  initial begin
    for (int i = 0; i < 5; i++) sent_cnt[i] = 0;
    out_ready = 5'b11111;
    repeat (2) @(posedge clk); #1 rst = 0;
    @(posedge clk); #1 out_ready[3] = 0;       // stall output 3 mid-packet
    repeat (3) @(posedge clk); #1 out_ready[3] = 1;
    repeat (12) @(posedge clk);
    chk(got[3].size() == 8, "eight flits on output 3");
    chk(got[0].size() == 4, "four flits on output 0");
    for (int n = 0; n < 4; n++) begin
      chk(got[3][n] == n, "first packet from input 0 whole");
      chk(got[3][4 + n] == 32 + n, "second packet from input 2 whole");
      chk(got[0][n] == 16 + n, "parallel packet on output 0");
    end
    chk(got[1].size() == 0 && got[2].size() == 0 && got[4].size() == 0, "no stray flits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
