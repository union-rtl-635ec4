// otar_router -- behavioural model of the optical turnaround router (OTAR).
//
// This is a model of a photonic part, not logic to synthesize as such: the
// real router is a 4x4 switch of waveguides and microresonators (MRs) for the
// data wavelength, set by its cluster's control unit. Here light is a
// light_t word (valid = lit) and each output simply shows the input that its
// select names, or darkness; propagation takes no time.
// Ports: two lower ports toward the children (index 0 = left, 1 = right)
// and two upper ports toward the parents. cfg[o] selects the source of output
// o (0 up-left, 1 up-right, 2 down-left, 3 down-right).
// Allowed turns follow the document: lower to upper, lower to the other lower
// port, upper to lower; no U-turns and no turn between the two upper ports.
// cluster_ctrl asserts that only these selects are ever set. The MR-level layout is not modelled.
module otar_router
  import union_pkg::*;
(
  input  rcfg_t  cfg,
  input  light_t dn_in [2],    // from children (travelling up)
  input  light_t up_in [2],    // from parents (travelling down)
  output light_t up_out [2],
  output light_t dn_out [2]
);
  function automatic light_t pick(sel_t s, light_t d0, light_t d1, light_t u0, light_t u1);
    case (s)
      SEL_DN0: return d0;
      SEL_DN1: return d1;
      SEL_UP0: return u0;
      SEL_UP1: return u1;
      default: return '0;
    endcase
  endfunction

  // Upper outputs can only be fed from below; kept separate from the lower
  // outputs so that upward light never depends on downward light.
  always_comb begin
    for (int o = 0; o < 2; o++)
      up_out[o] = (cfg[o] == SEL_DN0) ? dn_in[0] :
                  (cfg[o] == SEL_DN1) ? dn_in[1] : '0;
  end

  always_comb begin
    for (int o = 0; o < 2; o++)
      dn_out[o] = pick(cfg[o + 2], dn_in[0], dn_in[1], up_in[0], up_in[1]);
  end
endmodule
