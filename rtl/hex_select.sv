// hex_select - region and two-level hexagon selection.
//
// Decides which two-level hexagon of the five-level space-vector diagram
// synthesizes the reference vector V_ref5. The region follows the magnitude:
// below 2E the inner region (hexagons IH1..IH6), otherwise the outer region.
// The hexagon within the region follows the angle theta:
//   inner, both techniques:  60-degree slices centred on 0, 60, ... degrees,
//                            IH1 for -30..+30, IH2 for +30..+90, and so on;
//   outer, OSVPWM:           per 60-degree slice starting at -15 degrees, a
//                            corner hexagon for 30 degrees then two edge
//                            hexagons for 15 degrees each (OH1 -15..+15,
//                            OH2 +15..+30, OH3 +30..+45, OH4 +45..+75 ...);
//   outer, FOSVPWM:          only the twelve edge hexagons, 30 degrees each
//                            (OH2 0..30, OH3 30..60, OH5 60..90, ...).
// These ranges and the 2E threshold are the document's selection tables.
// A range includes its lower bound and excludes its upper bound, and a
// magnitude of exactly 2E counts as outer: those two points are this
// design's choice.
//
// Purely combinational. theta in 1/16 degree (0..5759), mag in Q.12 units of E.
module hex_select
  import svpwm_pkg::*;
(
  input  mode_t   mode,
  input  angle_t  theta,
  input  coord_t  mag,
  output hex_t    hex,
  output logic    outer
);

  localparam int unsigned SLICE = 960;           // 60 degrees
  localparam int unsigned HALF  = 480;           // 30 degrees
  localparam coord_t      TWO_E = coord_t'(2 << FRAC);

  logic [ANG_W:0] t15, t30;
  logic [2:0]     k15, k30, k0;
  logic [ANG_W:0] r15;
  logic [3:0]     k_half;
  logic [4:0]     idx;

  always_comb begin
    outer = (mag >= TWO_E);
    // rotate by +15 and +30 degrees, modulo 360
    t15 = (ANG_W+1)'(theta) + (ANG_W+1)'(deg(15));
    if (t15 >= (ANG_W+1)'(ANG_FULL)) t15 = t15 - (ANG_W+1)'(ANG_FULL);
    t30 = (ANG_W+1)'(theta) + (ANG_W+1)'(deg(30));
    if (t30 >= (ANG_W+1)'(ANG_FULL)) t30 = t30 - (ANG_W+1)'(ANG_FULL);
    k15    = 3'(t15 / SLICE);
    r15    = t15 - (ANG_W+1)'(32'(k15) * SLICE);
    k30    = 3'(t30 / SLICE);
    k_half = 4'(32'(theta) / HALF);
    k0     = 3'(k_half >> 1);

    if (!outer) begin
      idx = 5'(IH1) + 5'(k30);
    end else if (mode == MODE_OSVPWM) begin
      if (r15 < (ANG_W+1)'(deg(30)))      idx = 5'(3 * k15);        // corner
      else if (r15 < (ANG_W+1)'(deg(45))) idx = 5'(3 * k15 + 1);    // edge
      else                                idx = 5'(3 * k15 + 2);    // edge
    end else begin
      idx = 5'(3 * k0 + 1) + 5'(k_half[0]);
    end
    hex = hex_t'(idx);
  end

endmodule
