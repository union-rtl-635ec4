// optical_data_bus -- behavioural model of the interface switches and the
// segmented interchip optical data bus.
//
// This models photonic parts (microresonators, silicon and board waveguides),
// not logic. Chips 0..NUM_CHIPS-1 sit in a row along N_CH bidirectional
// channels. Per chip and channel the interface switch has a transmit MR
// (inject the top router's upward light toward lower chip numbers, DIR_LEFT,
// or higher ones, DIR_RIGHT) and a receive MR (divert light arriving from the
// left or the right into the top router). Light passes a chip whose MRs are
// off. A chip receiving from the left therefore sees the nearest chip on its
// left that transmits to the right, unless a chip in between diverts that
// light first; the same holds mirrored. Propagation takes no time.
// Ports are per [chip][channel]: tx_light from the top routers, tx_dir and
// rx_dir from the network controllers, rx_light to the top routers.
module optical_data_bus
  import union_pkg::*;
#(
  parameter int NUM_CHIPS = 8,
  parameter int N_CH      = 16
) (
  input  light_t tx_light [NUM_CHIPS][N_CH],
  input  dir_e   tx_dir   [NUM_CHIPS][N_CH],
  input  dir_e   rx_dir   [NUM_CHIPS][N_CH],
  output light_t rx_light [NUM_CHIPS][N_CH]
);
  always_comb begin
    logic stop;
    for (int j = 0; j < NUM_CHIPS; j++) begin
      for (int c = 0; c < N_CH; c++) begin
        rx_light[j][c] = '0;
        stop = 1'b0;
        if (rx_dir[j][c] == DIR_LEFT) begin
          for (int i = j - 1; i >= 0; i--) begin
            if (!stop && tx_dir[i][c] == DIR_RIGHT) begin
              rx_light[j][c] = tx_light[i][c];
              stop = 1'b1;
            end else if (!stop && rx_dir[i][c] == DIR_LEFT) begin
              stop = 1'b1;
            end
          end
        end else if (rx_dir[j][c] == DIR_RIGHT) begin
          for (int i = j + 1; i < NUM_CHIPS; i++) begin
            if (!stop && tx_dir[i][c] == DIR_LEFT) begin
              rx_light[j][c] = tx_light[i][c];
              stop = 1'b1;
            end else if (!stop && rx_dir[i][c] == DIR_RIGHT) begin
              stop = 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
