// tb_union_pkg -- checks the routing functions of union_pkg.
// Turnaround levels and the link sets of a few paths are compared with values
// worked out by hand; then, over all pairs, the path length must be
// 2*turnaround level (at most 8 = 2*log2(16) links), and on-chip paths to
// different destinations must never share a downward link (the point of the
// shuffle routing).
module tb_union_pkg;
  import union_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic lmask_t bits(int ids[]);
    lmask_t m = '0;
    foreach (ids[i]) m[ids[i]] = 1'b1;
    return m;
  endfunction

  initial begin
    lmask_t m, a, b;
    chk(turn_level(4'd0, 4'd15) == 4, "turn 0->15");
    chk(turn_level(4'd4, 4'd6)  == 2, "turn 4->6");
    chk(turn_level(4'd6, 4'd7)  == 1, "turn 6->7");
    chk(turn_level(4'd9, 4'd12) == 3, "turn 9->12");
    chk(path_mask(K_LOCAL, 4'd0, 4'd15) == bits('{0, 17, 35, 55, 95, 111, 127, 143}), "local 0->15");
    chk(path_mask(K_LOCAL, 4'd6, 4'd7)  == bits('{6, 87}), "local 6->7");
    chk(path_mask(K_OUT, 4'd5, 4'd9)    == bits('{5, 21, 37, 49, 73}), "out 5->9");
    chk(path_mask(K_IN, 4'd0, 4'd9)     == bits('{89, 105, 121, 137, 153}), "in ->9");
    for (int s = 0; s < 16; s++)
      for (int d = 0; d < 16; d++) if (s != d) begin
        m = path_mask(K_LOCAL, 4'(s), 4'(d));
        chk($countones(m) == 2 * turn_level(4'(s), 4'(d)) && $countones(m) <= 8, "path length");
        for (int d2 = 0; d2 < 16; d2++) if (d2 != d && d2 != s) begin
          a = m & {80'hFFFF_FFFF_FFFF_FFFF_FFFF, 80'h0};
          b = path_mask(K_LOCAL, 4'(s), 4'(d2)) & {80'hFFFF_FFFF_FFFF_FFFF_FFFF, 80'h0};
          if ((a & b) != '0) chk(0, $sformatf("down links shared %0d->%0d/%0d", s, d, d2));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
