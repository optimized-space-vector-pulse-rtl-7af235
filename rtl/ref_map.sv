// ref_map - maps the five-level reference onto the selected two-level hexagon.
//
// The reference V_ref5 is re-expressed about the centre of the two-level
// hexagon chosen by hex_select: V_ref2 = V_ref5 - C, where C is the
// hexagon's centre (3E on the 0, 60, ... degree axes for the corner outer
// hexagons, sqrt(7)E at +-19.1 degrees from them for the edge outer
// hexagons, E on the axes for the inner hexagons). The subtraction of a
// centre vector is the document's mapping; the centres are taken at the
// lattice points of the space-vector diagram (see svpwm_pkg), which the
// hexagon vertices require. Also passes on the lower zero-vector state of
// the hexagon, from which the sequencer builds every switching state.
//
// Purely combinational. Coordinates are (alpha, betap) in Q.12 units of E.
module ref_map
  import svpwm_pkg::*;
(
  input  hex_t    hex,
  input  coord_t  alpha5,
  input  coord_t  betap5,
  output coord_t  alpha2,
  output coord_t  betap2,
  output state_t  base
);

  lattice_t c;
  coord_t   ca, cb;

  always_comb begin
    c      = hex_center(hex);
    ca     = coord_t'(c.a2) <<< (FRAC - 1);     // a2 is twice alpha
    cb     = coord_t'(c.bp) <<< FRAC;
    alpha2 = alpha5 - ca;
    betap2 = betap5 - cb;
    base   = hex_base(c);
  end

endmodule
