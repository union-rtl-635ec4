// power_ctrl -- adaptive laser power control of a concentrator.
//
// Because routing is deterministic, the optical loss of a path depends only on
// where it goes: for an on-chip path on its turnaround level h (1..4), for an
// interchip path on the number of chips it spans. A table of the minimum
// launch power (detector sensitivity + path loss) for every such case is
// computed at elaboration from the loss figures below and looked up when a
// transfer is requested; the result sets the VCSEL drive while the controller
// is still setting the path up.
// Loss model per path: one MR drop plus three MR passes in every router
// crossed, one waveguide crossing and the waveguide length of every link
// crossed (a link at boundary l is 1.25*2**l mm long, 5 mm from a top router
// to the board coupler); interchip paths add two chip-to-board couplings,
// CHIP_PITCH_CM of board waveguide per chip spanned and two MR passes in the
// interface switch of every chip passed on the way.
// The device loss values and the sensitivity are the document's; the
// geometry (lengths, one crossing per link) is this design's assumption.
// Units: milli-dB and milli-dBm, signed 16 bit. One cycle from req_valid to
// launch_mdbm (registered). Synchronous active-high reset.
module power_ctrl
  import union_pkg::*;
#(
  parameter int SENS_MDB         = -14200,  // detector sensitivity, mdBm
  parameter int MR_DROP_MDB      = 500,
  parameter int MR_PASS_MDB      = 5,
  parameter int CROSS_MDB        = 120,
  parameter int PROP_MDB_PER_MM  = 170,
  parameter int COUPLE_MDB       = 450,
  parameter int PCB_MDB_PER_CM   = 35,
  parameter int CHIP_PITCH_CM    = 10
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               req_valid,
  input  logic [CHIP_W-1:0]  src_chip,
  input  logic [CONC_W-1:0]  src_conc,
  input  logic [CHIP_W-1:0]  dst_chip,
  input  logic [CONC_W-1:0]  dst_conc,
  output logic signed [15:0] launch_mdbm
);
  localparam int NENT = LEVELS + MAX_CHIPS;   // [1..LEVELS] on chip, [LEVELS+d] interchip

  // link length of boundary l in micrometres
  function automatic int link_um(int l);
    return (l == LEVELS) ? 5000 : (1250 << l);
  endfunction

  function automatic int router_mdb();
    return MR_DROP_MDB + 3 * MR_PASS_MDB;
  endfunction

  function automatic int link_mdb(int l);
    return CROSS_MDB + (PROP_MDB_PER_MM * link_um(l)) / 1000;
  endfunction

  function automatic int onchip_mdb(int h);   // both directions, turnaround level h
    int s;
    s = (2 * h - 1) * router_mdb();
    for (int l = 0; l < h; l++) s += 2 * link_mdb(l);
    return s;
  endfunction

  function automatic int half_to_bus_mdb();   // concentrator up to the board, one side
    int s;
    s = LEVELS * router_mdb();
    for (int l = 0; l <= LEVELS; l++) s += link_mdb(l);
    return s;
  endfunction

  function automatic int interchip_mdb(int d);
    return 2 * half_to_bus_mdb() + 2 * COUPLE_MDB + d * CHIP_PITCH_CM * PCB_MDB_PER_CM
           + (d - 1) * 2 * MR_PASS_MDB;
  endfunction

  typedef logic signed [15:0] tbl_t [NENT];

  function automatic tbl_t build_table();
    tbl_t t;
    for (int i = 0; i < NENT; i++) t[i] = '0;
    for (int h = 1; h <= LEVELS; h++)   t[h]          = 16'(SENS_MDB + onchip_mdb(h));
    for (int d = 1; d < MAX_CHIPS; d++) t[LEVELS + d] = 16'(SENS_MDB + interchip_mdb(d));
    return t;
  endfunction

  localparam tbl_t TABLE = build_table();

  logic [3:0] idx;
  always_comb begin
    int d;
    d = (src_chip > dst_chip) ? int'(src_chip) - int'(dst_chip)
                              : int'(dst_chip) - int'(src_chip);
    if (d == 0) idx = 4'(turn_level(src_conc, dst_conc));
    else        idx = 4'(LEVELS + d);
  end

  always_ff @(posedge clk) begin
    if (rst)            launch_mdbm <= '0;
    else if (req_valid) launch_mdbm <= TABLE[idx];
  end
endmodule
