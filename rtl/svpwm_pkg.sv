// svpwm_pkg - shared types, fixed-point formats and geometry of the
// optimized space-vector PWM (OSVPWM / FOSVPWM) modulator for a five-level
// cascaded H-bridge inverter.
//
// Geometry. A phase of the inverter takes one of five levels L in -2..+2
// (N2, N1, O, P1, P2), in units of the H-bridge supply E. A switching state
// (a,b,c) maps to the space-vector plane as
//     alpha = a - (b+c)/2,    beta = (sqrt(3)/2)(b - c)
// so the smallest triangles of the five-level diagram have side E, the
// diagram's outer corners lie at 4E and the outer hexagon centres at 3E and
// sqrt(7)E. All datapath coordinates use the oblique pair (alpha, betap)
// with betap = 2*beta/sqrt(3) = b - c: in it every lattice point has an
// integer betap and a half-integer alpha, and the dwell-time equations need
// no irrational constants.
//
// Fixed point: coordinates are signed Q(COORD_W-1-FRAC).FRAC in units of E
// (FRAC = 12, so E = 4096). Angles are unsigned, in 1/16 degree, 0..5759,
// which makes every 15-degree selection boundary of the hexagon tables an
// exact integer. Dwell fractions are in the same Q.12 format (1.0 = Ts).
//
// The hexagon centres follow the lattice points of the space-vector diagram;
// the selection ranges are those of the OSVPWM and FOSVPWM selection tables.
package svpwm_pkg;

  localparam int unsigned FRAC     = 12;          // fraction bits of coordinates
  localparam int unsigned COORD_W  = 18;          // signed coordinate width
  localparam int unsigned ANG_W    = 13;          // angle width, 1/16 degree
  localparam int unsigned ANG_FULL = 5760;        // 360 degrees
  localparam int unsigned MA_W     = 16;          // modulation index, Q1.15
  localparam int unsigned MA_FRAC  = 15;

  typedef logic signed [COORD_W-1:0] coord_t;
  typedef logic        [ANG_W-1:0]   angle_t;
  typedef logic signed [2:0]         level_t;     // phase level -2..+2

  // Degrees to angle units.
  function automatic angle_t deg(input int unsigned d);
    return angle_t'(d * 16);
  endfunction

  // Two-level hexagons: OH1..OH18 of the outer region, IH1..IH6 of the inner.
  typedef enum logic [4:0] {
    OH1 = 5'd0,  OH2,  OH3,  OH4,  OH5,  OH6,  OH7,  OH8,  OH9,
    OH10, OH11, OH12, OH13, OH14, OH15, OH16, OH17, OH18,
    IH1 = 5'd18, IH2, IH3, IH4, IH5, IH6
  } hex_t;

  // Modulation technique.
  typedef enum logic {
    MODE_OSVPWM  = 1'b0,   // 18 outer + 6 inner hexagons
    MODE_FOSVPWM = 1'b1    // 12 outer + 6 inner hexagons
  } mode_t;

  // Lattice coordinates of a hexagon centre: a2 = 2*alpha/E, bp = betap/E.
  typedef struct packed {
    logic signed [3:0] a2;
    logic signed [3:0] bp;
  } lattice_t;

  // A five-level switching state, one level per phase.
  typedef struct packed {
    level_t a;
    level_t b;
    level_t c;
  } state_t;

  // Centre of each two-level hexagon. Corner hexagons (OH1, OH4, ...) sit at
  // 3E on the 0, 60, ... degree axes; the edge hexagons at sqrt(7)E, 19.1
  // degrees either side of them; the inner hexagons at E on the axes.
  function automatic lattice_t hex_center(input hex_t h);
    case (h)
      OH1:  return '{a2:  4'sd6, bp:  4'sd0};
      OH2:  return '{a2:  4'sd5, bp:  4'sd1};
      OH3:  return '{a2:  4'sd4, bp:  4'sd2};
      OH4:  return '{a2:  4'sd3, bp:  4'sd3};
      OH5:  return '{a2:  4'sd1, bp:  4'sd3};
      OH6:  return '{a2: -4'sd1, bp:  4'sd3};
      OH7:  return '{a2: -4'sd3, bp:  4'sd3};
      OH8:  return '{a2: -4'sd4, bp:  4'sd2};
      OH9:  return '{a2: -4'sd5, bp:  4'sd1};
      OH10: return '{a2: -4'sd6, bp:  4'sd0};
      OH11: return '{a2: -4'sd5, bp: -4'sd1};
      OH12: return '{a2: -4'sd4, bp: -4'sd2};
      OH13: return '{a2: -4'sd3, bp: -4'sd3};
      OH14: return '{a2: -4'sd1, bp: -4'sd3};
      OH15: return '{a2:  4'sd1, bp: -4'sd3};
      OH16: return '{a2:  4'sd3, bp: -4'sd3};
      OH17: return '{a2:  4'sd4, bp: -4'sd2};
      OH18: return '{a2:  4'sd5, bp: -4'sd1};
      IH1:  return '{a2:  4'sd2, bp:  4'sd0};
      IH2:  return '{a2:  4'sd1, bp:  4'sd1};
      IH3:  return '{a2: -4'sd1, bp:  4'sd1};
      IH4:  return '{a2: -4'sd2, bp:  4'sd0};
      IH5:  return '{a2: -4'sd1, bp: -4'sd1};
      IH6:  return '{a2:  4'sd1, bp: -4'sd1};
      default: return '{a2: 4'sd0, bp: 4'sd0};
    endcase
  endfunction

  // Lower zero-vector state of a hexagon: the state (a,b,c) of its centre
  // such that (a,b,c) and (a+1,b+1,c+1) are both valid. With c = t the
  // centre's states are (t+(a2+bp)/2, t+bp, t); t is taken in the middle of
  // its valid range (rounded down), which gives the only choice for the outer
  // hexagons and the most balanced one for the inner hexagons.
  function automatic state_t hex_base(input lattice_t p);
    int s, mn, mx, t;
    s  = (int'(p.a2) + int'(p.bp)) / 2;
    mn = 0; mx = 0;
    if (int'(p.bp) < mn) mn = int'(p.bp);
    if (int'(p.bp) > mx) mx = int'(p.bp);
    if (s < mn) mn = s;
    if (s > mx) mx = s;
    // valid t: -2 - mn <= t <= 1 - mx
    t = ((-2 - mn) + (1 - mx));
    t = (t < 0) ? -((1 - t) / 2) : t / 2;   // floor of the midpoint
    return '{a: level_t'(t + s), b: level_t'(t + int'(p.bp)), c: level_t'(t)};
  endfunction

  // Two-level switching pattern of the hexagon vertex at k*60 degrees
  // (bit 2 = phase a): 0:100 1:110 2:010 3:011 4:001 5:101.
  function automatic logic [2:0] vertex_code(input logic [2:0] k);
    case (k)
      3'd0: return 3'b100;
      3'd1: return 3'b110;
      3'd2: return 3'b010;
      3'd3: return 3'b011;
      3'd4: return 3'b001;
      3'd5: return 3'b101;
      default: return 3'b000;
    endcase
  endfunction

endpackage
