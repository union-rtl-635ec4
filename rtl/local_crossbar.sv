// local_crossbar -- the electrical crossbar inside a concentrator.
//
// N x N switch (5 x 5: four cores plus the optical side) carrying flits with
// valid/ready flow control on every port. Each input names the output its
// head flit wants (in_port). Every output runs its own round-robin arbiter;
// once an input is chosen (its head flit shown on the output) it keeps the
// output until the flit marked last has passed, so packets are never
// interleaved and a waiting head flit never changes. Inputs must hold valid
// until ready. A flit moves when its output's
// ready is high, with no register in the path (zero-cycle crossing).
// The crossbar itself is the document's; arbitration and packet locking are
// this design's choices. Synchronous active-high reset.
module local_crossbar
  import union_pkg::*;
#(
  parameter int N = 5
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [N-1:0]          in_valid,
  input  flit_t                 in_flit [N],
  input  logic [$clog2(N)-1:0]  in_port [N],
  output logic [N-1:0]          in_ready,
  output logic [N-1:0]          out_valid,
  output flit_t                 out_flit [N],
  input  logic [N-1:0]          out_ready
);
  localparam int PW = $clog2(N);

  logic [N-1:0]  locked;
  logic [PW-1:0] owner  [N];
  logic [PW-1:0] rr_ptr [N];
  logic [PW-1:0] cur    [N];
  logic [N-1:0]  active;

  always_comb begin
    int i;
    i         = 0;
    in_ready  = '0;
    out_valid = '0;
    for (int o = 0; o < N; o++) begin
      out_flit[o] = '0;
    end
    for (int o = 0; o < N; o++) begin
      active[o] = 1'b0;
      cur[o]    = owner[o];
      if (locked[o]) begin
        active[o] = 1'b1;
      end else begin
        for (int k = 0; k < N; k++) begin
          i = int'(rr_ptr[o]) + k;
          if (i >= N) i = i - N;
          if (!active[o] && in_valid[i] && int'(in_port[i]) == o) begin
            active[o] = 1'b1;
            cur[o]    = PW'(i);
          end
        end
      end
      out_valid[o] = active[o] && in_valid[cur[o]] && int'(in_port[cur[o]]) == o;
      out_flit[o]  = in_flit[cur[o]];
      if (out_valid[o]) in_ready[cur[o]] = out_ready[o];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      locked <= '0;
      for (int o = 0; o < N; o++) begin
        owner[o]  <= '0;
        rr_ptr[o] <= '0;
      end
    end else begin
      for (int o = 0; o < N; o++) begin
        if (out_valid[o] && out_ready[o] && out_flit[o].last) begin
          locked[o] <= 1'b0;
          rr_ptr[o] <= (int'(cur[o]) == N - 1) ? '0 : cur[o] + 1'b1;
        end else if (out_valid[o]) begin
          locked[o] <= 1'b1;
          owner[o]  <= cur[o];
        end
      end
    end
  end
endmodule
