// cluster_ctrl -- electronic control unit of one router cluster.
//
// A cluster is every router of one subtree at one fat-tree level: at level
// LEVEL the cluster with subtree number SID holds the 2**(LEVEL-1) routers
// (SID, p), p = 0 .. 2**(LEVEL-1)-1 (two routers at level 2, as in the
// document's example; the top cluster holds all 8 top routers).
// The network controller sends a path message (set up or release; kind,
// source and destination concentrator) to each cluster on a path; the
// control receiver of the cluster decodes it with the same deterministic
// routing as the controller: it finds the router of this cluster the path
// crosses, the input the light enters by and the output it must leave by,
// and sets (or clears) that output's select. The selects drive the router's
// microresonators and hold until changed.
// Timing: a message in cycle t changes cfg at the edge ending cycle t.
// Grouping routers by subtree, and sending paths instead of raw MR bits, are
// this design's choices. Synchronous active-high reset turns all MRs off.
module cluster_ctrl
  import union_pkg::*;
#(
  parameter int LEVEL = 2,
  parameter int SID   = 0,
  localparam int NR   = 1 << (LEVEL - 1)
) (
  input  logic  clk,
  input  logic  rst,
  input  pmsg_t msg,
  output rcfg_t cfg [NR]
);
  // Hop of a path at this level: hit, router position, output, input select.
  logic           hit;
  int             pos;
  int             oport;
  sel_t           isel;

  always_comb begin
    int  h;
    logic [CONC_W-1:0] s, d;
    logic up_hit, dn_hit, turn_hit;
    s = msg.src_conc;
    d = msg.dst_conc;
    h = turn_level(s, d);
    up_hit   = 1'b0;
    dn_hit   = 1'b0;
    turn_hit = 1'b0;
    case (msg.kind)
      K_LOCAL: begin
        up_hit   = (LEVEL < h)  && ((int'(s) >> LEVEL) == SID);
        dn_hit   = (LEVEL < h)  && ((int'(d) >> LEVEL) == SID);
        turn_hit = (LEVEL == h) && ((int'(s) >> LEVEL) == SID);
      end
      K_OUT:   up_hit = ((int'(s) >> LEVEL) == SID);
      K_IN:    dn_hit = ((int'(d) >> LEVEL) == SID);
      default: ;
    endcase
    pos   = int'(d) & (NR - 1);                  // dst[LEVEL-2:0]
    hit   = msg.valid && (up_hit || dn_hit || turn_hit);
    oport = 0;
    isel  = SEL_NONE;
    if (up_hit) begin
      oport = d[LEVEL-1] ? 1 : 0;                // up-left / up-right
      isel  = s[LEVEL-1] ? SEL_DN1 : SEL_DN0;
    end else if (turn_hit) begin
      oport = d[LEVEL-1] ? 3 : 2;
      isel  = s[LEVEL-1] ? SEL_DN1 : SEL_DN0;
    end else if (dn_hit) begin
      oport = d[LEVEL-1] ? 3 : 2;
      isel  = d[LEVEL-1] ? SEL_UP1 : SEL_UP0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < NR; r++) cfg[r] <= '{default: SEL_NONE};
    end else if (hit) begin
      cfg[pos][oport] <= msg.setup ? isel : SEL_NONE;
    end
  end

  // Legal turns only: an upper output takes light from a lower input, and a
  // lower output never sends light back down the port it entered by.
  for (genvar r = 0; r < NR; r++) begin : g_legal
    assert property (@(posedge clk) disable iff (rst)
      cfg[r][0] <= SEL_DN1 &&
      cfg[r][1] <= SEL_DN1 &&
      cfg[r][2] != SEL_DN0 && cfg[r][2] <= SEL_UP1 &&
      cfg[r][3] != SEL_DN1 && cfg[r][3] <= SEL_UP1)
      else $error("cluster_ctrl: illegal turn in router %0d", r);
  end
endmodule
