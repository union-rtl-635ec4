// union_pkg -- shared sizes, types and routing functions of the UNION
// inter/intrachip optical network.
//
// Each chip carries a 2-ary, 4-level optical fat tree: 16 concentrators
// (4 cores each, 64 cores per chip) hang off 8 level-1 routers; every level
// has 8 routers, each with two parent and two child ports. The 16 upward
// ports of the 8 top routers reach 16 interchip data-bus channels.
//
// Link numbering (this design's own): there are LEVELS+1 link boundaries,
// boundary 0 between concentrators and level 1, boundary LEVELS between the
// top routers and the data bus. Each boundary holds 16 upward and 16
// downward links. With the deterministic shuffle routing (a router at level i
// sends a packet to its left parent when bit i-1 of the destination is 0,
// else to its right parent):
//   * the up link crossing boundary l is named {src >> l, dst[l-1:0]},
//   * every down link toward destination d is named d at every boundary,
// so the link set of a path follows from (kind, source, destination) alone.
// Link-state bit index: up links at l*16 + name, down links at 80 + l*16 + name.
//
// An interchip packet climbs to the top level with the same rule, so the bus
// channel it uses equals the destination concentrator number (this design's
// own reading of "each upward port of the top-level router would access a
// separate bus channel").
package union_pkg;

  localparam int LEVELS         = 4;
  localparam int NUM_CONC       = 16;          // 2**LEVELS concentrators per chip
  localparam int CONC_W         = 4;
  localparam int CORES_PER_CONC = 4;
  localparam int CORE_W         = 2;
  localparam int FLIT_W         = 32;
  localparam int MAX_CHIPS      = 8;
  localparam int CHIP_W         = 3;
  localparam int NUM_CH         = NUM_CONC;    // data-bus channels
  localparam int ROUTERS_PER_LV = NUM_CONC / 2;
  localparam int NUM_LINKS      = 2 * (LEVELS + 1) * NUM_CONC;   // 160
  localparam int DOWN_BASE      = (LEVELS + 1) * NUM_CONC;       // 80

  typedef logic [NUM_LINKS-1:0] lmask_t;

  // One flit; the destination rides as side-band bits next to the payload.
  typedef struct packed {
    logic              last;
    logic [CHIP_W-1:0] dst_chip;
    logic [CONC_W-1:0] dst_conc;
    logic [CORE_W-1:0] dst_core;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Light on a data waveguide (wavelength lambda0): dark when valid = 0.
  typedef struct packed {
    logic  valid;
    flit_t flit;
  } light_t;

  typedef enum logic [1:0] {
    K_LOCAL = 2'd0,   // both ends on this chip
    K_OUT   = 2'd1,   // source concentrator up to the data bus
    K_IN    = 2'd2    // data bus down to the destination concentrator
  } kind_e;

  typedef struct packed {
    kind_e             kind;
    logic [CHIP_W-1:0] src_chip;
    logic [CONC_W-1:0] src_conc;
    logic [CHIP_W-1:0] dst_chip;
    logic [CONC_W-1:0] dst_conc;
  } req_t;

  // Control-bus messages (16 bits; one per chip per slot).
  typedef enum logic [1:0] {
    CM_NONE     = 2'd0,
    CM_TXN_REQ  = 2'd1,   // source controller reserved its upward path
    CM_BUS_REQ  = 2'd2,   // destination controller reserved its downward path
    CM_TEARDOWN = 2'd3    // transfer finished, release everything
  } cmsg_e;

  typedef struct packed {
    cmsg_e             typ;
    logic [CHIP_W-1:0] src_chip;
    logic [CONC_W-1:0] src_conc;
    logic [CHIP_W-1:0] dst_chip;
    logic [CONC_W-1:0] dst_conc;
  } cmsg_t;

  // Path message from the network controller to a router cluster.
  typedef struct packed {
    logic              valid;
    logic              setup;    // 1: set the path up, 0: release it
    kind_e             kind;
    logic [CONC_W-1:0] src_conc;
    logic [CONC_W-1:0] dst_conc;
  } pmsg_t;

  // Router output selects. Outputs: 0 = up-left, 1 = up-right,
  // 2 = down-left, 3 = down-right. Inputs named by where the light enters.
  typedef logic [2:0] sel_t;
  localparam sel_t SEL_NONE = 3'd0;
  localparam sel_t SEL_DN0  = 3'd1;   // from lower-left (child 0)
  localparam sel_t SEL_DN1  = 3'd2;   // from lower-right (child 1)
  localparam sel_t SEL_UP0  = 3'd3;   // from upper-left (parent 0)
  localparam sel_t SEL_UP1  = 3'd4;   // from upper-right (parent 1)
  typedef sel_t [3:0] rcfg_t;

  // Interface-switch settings per bus channel.
  typedef enum logic [1:0] { DIR_NONE = 2'd0, DIR_LEFT = 2'd1, DIR_RIGHT = 2'd2 } dir_e;

  // Lowest level whose subtree holds both concentrators (1..LEVELS).
  function automatic int turn_level(logic [CONC_W-1:0] src, logic [CONC_W-1:0] dst);
    int h;
    h = LEVELS;
    for (int l = LEVELS; l >= 1; l--)
      if ((src >> l) == (dst >> l)) h = l;
    return h;
  endfunction

  function automatic int up_link(int l, logic [CONC_W-1:0] src, logic [CONC_W-1:0] dst);
    return l * NUM_CONC + ((int'(src) >> l) << l) + (int'(dst) & ((1 << l) - 1));
  endfunction

  function automatic int down_link(int l, logic [CONC_W-1:0] dst);
    return DOWN_BASE + l * NUM_CONC + int'(dst);
  endfunction

  // Link set of a path under the deterministic shuffle routing.
  function automatic lmask_t path_mask(kind_e kind, logic [CONC_W-1:0] src,
                                       logic [CONC_W-1:0] dst);
    lmask_t m;
    int h;
    m = '0;
    h = turn_level(src, dst);
    for (int l = 0; l <= LEVELS; l++) begin
      case (kind)
        K_LOCAL: if (l < h) begin
          m[up_link(l, src, dst)] = 1'b1;
          m[down_link(l, dst)]    = 1'b1;
        end
        K_OUT:   m[up_link(l, src, dst)] = 1'b1;
        K_IN:    m[down_link(l, dst)]    = 1'b1;
        default: ;
      endcase
    end
    return m;
  endfunction

endpackage
