// tb_otar_router -- drives the four inputs of the router model with distinct
// light words and checks, for several switch settings, that every output shows
// exactly the selected input or darkness.
module tb_otar_router;
  import union_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  rcfg_t  cfg;
  light_t dn_in [2], up_in [2], up_out [2], dn_out [2];
  otar_router dut (.cfg, .dn_in, .up_in, .up_out, .dn_out);

  function automatic light_t lit(int v);
    light_t l = '0;
    l.valid = 1'b1; l.flit.data = 32'(v);
    return l;
  endfunction

  initial begin
    dn_in[0] = lit(10); dn_in[1] = lit(11); up_in[0] = lit(20); up_in[1] = lit(21);
    // turnaround from lower-left to lower-right, up-right fed from lower-right
    cfg = '{SEL_DN0, SEL_NONE, SEL_DN1, SEL_NONE};   // [3]=DN0 [2]=NONE [1]=DN1 [0]=NONE
    #1;
    chk(up_out[0] == '0, "up0 dark");
    chk(up_out[1] == lit(11), "up1 from dn1");
    chk(dn_out[0] == '0, "dn0 dark");
    chk(dn_out[1] == lit(10), "dn1 from dn0");
    // downward traffic from both parents
    cfg = '{SEL_UP0, SEL_UP1, SEL_DN1, SEL_DN0};
    #1;
    chk(up_out[0] == lit(10) && up_out[1] == lit(11), "both up");
    chk(dn_out[0] == lit(21) && dn_out[1] == lit(20), "both down");
    // dark inputs give dark outputs
    up_in[1] = '0;
    #1;
    chk(dn_out[0] == '0, "dark passes dark");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
