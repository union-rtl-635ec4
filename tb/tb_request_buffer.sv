// tb_request_buffer -- four sources, four-entry queue. All sources offer a
// request at once: they must be accepted one per cycle in round-robin order
// starting at source 0, the queue must refuse a fifth while full, and the
// requests must come out in acceptance order. A later round checks that the
// pointer moved on (source 1 first after source 0 won last), and two
// sources that never stop asking must take turns.
module tb_request_buffer;
  import union_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [3:0] in_valid, in_ready;
  req_t       in_req [4];
  logic       out_valid, out_pop;
  req_t       out_req;
  request_buffer #(.N_SRC(4), .DEPTH(4)) dut (.clk, .rst, .in_valid, .in_req, .in_ready,
                                              .out_valid, .out_req, .out_pop);
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int order [$];
  initial begin
    in_valid = '0; out_pop = 0;
    for (int i = 0; i < 4; i++) begin
      in_req[i] = '0; in_req[i].src_conc = 4'(i); in_req[i].dst_conc = 4'(i + 8);
    end
    repeat (2) @(posedge clk); #1 rst = 0;
    in_valid = 4'b1111;
    for (int n = 0; n < 4; n++) begin
      #1;
      chk($countones(in_ready) == 1, "one accept per cycle");
      for (int i = 0; i < 4; i++) if (in_ready[i]) begin order.push_back(i); end
      @(posedge clk); #1;
      in_valid[order[order.size()-1]] = 1'b0;
    end
    chk(order.size() == 4 && order[0] == 0 && order[1] == 1 && order[2] == 2 && order[3] == 3,
        "round-robin order");
    in_valid = 4'b0001;
    #1 chk(in_ready == 4'b0000, "full queue refuses");
    in_valid = 4'b0000;
    @(posedge clk); #1;
    for (int n = 0; n < 4; n++) begin
      chk(out_valid && out_req.src_conc == 4'(order[n]) && out_req.dst_conc == 4'(order[n] + 8),
          "FIFO order and content");
      out_pop = 1; @(posedge clk); #1; out_pop = 0;
    end
    chk(!out_valid, "empty after four pops");
    // pointer is past source 3 -> source 0 wins; then 1 before 2
    in_valid = 4'b0111;
    #1 chk(in_ready == 4'b0001, "source 0 after wrap");
    @(posedge clk); #1 in_valid[0] = 0;
    #1 chk(in_ready == 4'b0010, "then source 1");
    // two sources that keep asking must take turns
    @(posedge clk); #1 in_valid = 4'b0000; out_pop = 1;
    repeat (6) @(posedge clk); #1;
    in_valid = 4'b0101;
    order.delete();
    for (int n = 0; n < 6; n++) begin
      #1;
      for (int i = 0; i < 4; i++) if (in_ready[i]) order.push_back(i);
      @(posedge clk);
    end
    for (int n = 1; n < order.size(); n++) chk(order[n] != order[n-1], "persistent sources alternate");
    chk(order.size() == 6, "one accept per cycle while draining");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
