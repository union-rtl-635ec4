// path_scheduler -- path check and path scheduler of the network controller
// (Algorithm 1 of the arbitration).
//
// Works on N candidate paths, each a mask over the link-state register
// (1 = link used by the path). Two registered steps, each started by an
// enable from the controller:
//   check_en: for every candidate, AND its mask with the busy links to decide
//             whether the path is free (avail), and compare every pair of
//             candidates in parallel for shared links (collision matrix);
//   sched_en: walk the candidates in slot order and grant each free one that
//             shares no link with a candidate granted before it.
// grant holds the chosen non-overlapping set; grant_mask is the OR of the
// granted masks (combinational from the masks held by the caller), which the
// controller ORs into the link-state register.
// The check by AND gates and the parallel pairwise comparison follow the
// document; the slot-order priority chain is this design's choice.
// Synchronous active-high reset clears avail and grant.
module path_scheduler
  import union_pkg::*;
#(
  parameter int N = 16,
  parameter int W = NUM_LINKS
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         check_en,
  input  logic         sched_en,
  input  logic [N-1:0] cand_valid,
  input  logic [W-1:0] mask [N],
  input  logic [W-1:0] link_state,
  output logic [N-1:0] avail,
  output logic [N-1:0] grant,
  output logic [W-1:0] grant_mask
);
  logic [N-1:0] coll [N];     // coll[i][j]: paths i and j share a link
  logic [N-1:0] grant_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      avail <= '0;
      for (int i = 0; i < N; i++) coll[i] <= '0;
    end else if (check_en) begin
      for (int i = 0; i < N; i++) begin
        avail[i] <= cand_valid[i] && ((mask[i] & link_state) == '0);
        for (int j = 0; j < N; j++)
          coll[i][j] <= (i != j) && ((mask[i] & mask[j]) != '0);
      end
    end
  end

  always_comb begin
    grant_d = '0;
    for (int i = 0; i < N; i++)
      grant_d[i] = avail[i] && ((coll[i] & grant_d) == '0);
  end

  always_ff @(posedge clk) begin
    if (rst)           grant <= '0;
    else if (sched_en) grant <= grant_d;
  end

  always_comb begin
    grant_mask = '0;
    for (int i = 0; i < N; i++)
      if (grant[i]) grant_mask |= mask[i];
  end
endmodule
