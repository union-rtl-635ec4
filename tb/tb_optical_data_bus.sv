// tb_optical_data_bus -- 5 chips, 2 channels. Checks that light reaches the
// receiving chip across chips whose switches are off, that a channel carries
// several transfers on disjoint stretches at once (0->1, 1->2 and 4->3,
// with chip 1 receiving and sending together), that a chip diverting light
// shields the chips beyond it, and that nothing arrives at a chip not set to
// receive.
module tb_optical_data_bus;
  import union_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  localparam int NC = 5, NCH = 2;
  light_t tx_light [NC][NCH], rx_light [NC][NCH];
  dir_e   tx_dir [NC][NCH], rx_dir [NC][NCH];
  optical_data_bus #(.NUM_CHIPS(NC), .N_CH(NCH)) dut (.tx_light, .tx_dir, .rx_dir, .rx_light);

  function automatic light_t lit(int v);
    light_t l = '0; l.valid = 1; l.flit.data = 32'(v); return l;
  endfunction
  task automatic off();
    for (int j = 0; j < NC; j++) for (int c = 0; c < NCH; c++) begin
      tx_light[j][c] = lit(100 * j + c); tx_dir[j][c] = DIR_NONE; rx_dir[j][c] = DIR_NONE;
    end
  endtask

  initial begin
    off();
    tx_dir[0][1] = DIR_RIGHT; rx_dir[3][1] = DIR_LEFT;          // 0 -> 3 passes 1 and 2
    #1 chk(rx_light[3][1] == lit(1), "0->3 across idle chips");
    chk(rx_light[1][1] == '0 && rx_light[2][1] == '0, "idle chips see nothing");
    off();
    tx_dir[0][0] = DIR_RIGHT; rx_dir[1][0] = DIR_LEFT;          // 0 -> 1
    tx_dir[1][0] = DIR_RIGHT; rx_dir[2][0] = DIR_LEFT;          // 1 -> 2
    tx_dir[4][0] = DIR_LEFT;  rx_dir[3][0] = DIR_RIGHT;         // 4 -> 3
    #1 chk(rx_light[1][0] == lit(0) && rx_light[2][0] == lit(100) && rx_light[3][0] == lit(400),
           "three transfers on one channel");
    off();
    tx_dir[0][0] = DIR_RIGHT; rx_dir[1][0] = DIR_LEFT; rx_dir[3][0] = DIR_LEFT;
    #1 chk(rx_light[1][0] == lit(0) && rx_light[3][0] == '0, "diverted light does not go on");
    off();
    tx_dir[2][1] = DIR_LEFT; rx_dir[0][1] = DIR_RIGHT; rx_dir[4][1] = DIR_LEFT;
    #1 chk(rx_light[0][1] == lit(201) && rx_light[4][1] == '0, "direction matters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
