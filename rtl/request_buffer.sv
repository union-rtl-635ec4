// request_buffer -- request buffer unit of the network controller.
//
// Collects path requests from N_SRC sources (the concentrators of the chip and
// the per-chip queues of inbound interchip transactions) and stores them in a
// FIFO of DEPTH entries from which the controller takes one per cycle.
// Sources use a valid/ready handshake: a source holds in_valid and in_req
// until it sees in_ready. At most one source is accepted per cycle, chosen by
// a round-robin pointer that moves past the last winner, so every source is
// served within N_SRC cycles while the FIFO has room.
// The document names this unit and its job; merging order, depth and the
// handshake are this design's choices. Synchronous active-high reset.
module request_buffer
  import union_pkg::*;
#(
  parameter int N_SRC = 24,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N_SRC-1:0] in_valid,
  input  req_t             in_req [N_SRC],
  output logic [N_SRC-1:0] in_ready,
  output logic             out_valid,
  output req_t             out_req,
  input  logic             out_pop
);
  localparam int SW = $clog2(N_SRC);

  logic [SW-1:0] rr_ptr;
  logic          win_valid;
  logic [SW-1:0] win;
  logic          empty, full;

  // Round-robin choice: first valid source at or after rr_ptr.
  always_comb begin
    logic [SW:0] idx;
    win_valid = 1'b0;
    win       = '0;
    for (int k = 0; k < N_SRC; k++) begin
      idx = {1'b0, rr_ptr} + (SW+1)'(k);
      if (int'(idx) >= N_SRC) idx = idx - (SW+1)'(N_SRC);
      if (!win_valid && in_valid[idx[SW-1:0]]) begin
        win_valid = 1'b1;
        win       = idx[SW-1:0];
      end
    end
  end

  always_comb begin
    in_ready = '0;
    if (win_valid && !full) in_ready[win] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) rr_ptr <= '0;
    else if (win_valid && !full)
      rr_ptr <= (int'(win) == N_SRC - 1) ? '0 : win + 1'b1;
  end

  sync_fifo #(.T(req_t), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .push   (win_valid && !full),
    .wr_data(in_req[win]),
    .pop    (out_pop),
    .rd_data(out_req),
    .empty, .full
  );

  assign out_valid = !empty;
endmodule
