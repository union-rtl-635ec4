// bus_arbiter -- interchip data-bus arbitration (Algorithm 2), one replica per
// network controller.
//
// Every data-bus channel is a waveguide passing chips 0..NUM_CHIPS-1 in order;
// segment k lies between chips k and k+1. A transfer from chip a to chip b
// on a channel occupies segments min(a,b) .. max(a,b)-1, so transfers on
// disjoint stretches of one channel run at the same time.
// Each cycle the arbiter sees every message broadcast on the control bus in
// the previous slot (one per chip). Bus requests are scanned starting at a
// rotating pointer; a request is granted when its segments are free in the
// occupancy register and unused by requests granted earlier in the scan
// (the greedy interval partitioning of the document, first group only).
// Granted segments are marked busy at the clock edge; tear-down messages free
// theirs. Because every controller sees the same messages in the same order
// and starts from the same reset state, all replicas reach the same grants
// without exchanging anything further.
// grant[k] (combinational) says that the bus request from chip k in this slot
// is granted. Channel = destination concentrator (see union_pkg).
// Synchronous active-high reset frees all segments.
module bus_arbiter
  import union_pkg::*;
#(
  parameter int NUM_CHIPS = 8,
  parameter int N_CH      = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  cmsg_t                rx [NUM_CHIPS],
  output logic [NUM_CHIPS-1:0] grant,
  output logic [N_CH-1:0]    busy_any   // a channel has any segment busy
);
  localparam int NSEG = (NUM_CHIPS > 1) ? NUM_CHIPS - 1 : 1;
  localparam int PW   = (NUM_CHIPS > 1) ? $clog2(NUM_CHIPS) : 1;

  logic [NSEG-1:0] occ [N_CH];
  logic [NSEG-1:0] taken [N_CH];
  logic [NSEG-1:0] freed [N_CH];
  logic [PW-1:0]   rr_ptr;
  logic            any_req;

  function automatic logic [NSEG-1:0] seg_mask(logic [CHIP_W-1:0] a, logic [CHIP_W-1:0] b);
    logic [NSEG-1:0] m;
    int lo, hi;
    lo = (a < b) ? int'(a) : int'(b);
    hi = (a < b) ? int'(b) : int'(a);
    m  = '0;
    for (int s = 0; s < NSEG; s++)
      if (s >= lo && s < hi) m[s] = 1'b1;
    return m;
  endfunction

  always_comb begin
    logic [PW:0] idx;
    logic [PW-1:0] ix;
    logic [NSEG-1:0] m;
    grant   = '0;
    any_req = 1'b0;
    for (int c = 0; c < N_CH; c++) begin
      taken[c] = '0;
      freed[c] = '0;
    end
    for (int k = 0; k < NUM_CHIPS; k++) begin
      idx = {1'b0, rr_ptr} + (PW+1)'(k);
      if (int'(idx) >= NUM_CHIPS) idx = idx - (PW+1)'(NUM_CHIPS);
      ix  = idx[PW-1:0];
      m   = seg_mask(rx[ix].src_chip, rx[ix].dst_chip);
      if (rx[ix].typ == CM_BUS_REQ) begin
        any_req = 1'b1;
        if (((occ[rx[ix].dst_conc] | taken[rx[ix].dst_conc]) & m) == '0) begin
          grant[ix] = 1'b1;
          taken[rx[ix].dst_conc] |= m;
        end
      end
      if (rx[ix].typ == CM_TEARDOWN)
        freed[rx[ix].dst_conc] |= m;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rr_ptr <= '0;
      for (int c = 0; c < N_CH; c++) occ[c] <= '0;
    end else begin
      for (int c = 0; c < N_CH; c++) occ[c] <= (occ[c] & ~freed[c]) | taken[c];
      if (any_req) rr_ptr <= (int'(rr_ptr) == NUM_CHIPS - 1) ? '0 : rr_ptr + 1'b1;
    end
  end

  always_comb
    for (int c = 0; c < N_CH; c++) busy_any[c] = |occ[c];
endmodule
