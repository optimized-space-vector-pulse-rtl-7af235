// chb_gate_drive - phase level to H-bridge gate signals.
//
// Each phase of the five-level inverter is two H-bridges in series, H1 and
// H2, each with its own supply E and four switches S1..S4 (S1/S3 one leg,
// S2/S4 the other, S1 and S2 on the positive rail). A bridge gives +E with
// S1 and S4 on, -E with S2 and S3 on, and 0 with S1 and S2 on. A phase level
// L in -2..+2 is split as H1 = sign(L) for L /= 0 and H2 = sign(L) for
// |L| = 2, so H1 supplies the first step of E and H2 the second. The cell
// structure and switch names are the document's; the polarity convention,
// the zero state on the upper switches and the fixed split between H1 and
// H2 are this design's choices. Both switches of a leg are always
// complementary; dead time is left to the gate-driver hardware.
//
// Purely combinational. gate[p][h][s]: phase p (0 = A, 1 = B, 2 = C),
// bridge h (0 = H1, 1 = H2), switch s (0 = S1 .. 3 = S4), 1 = on.
module chb_gate_drive
  import svpwm_pkg::*;
(
  input  state_t                 levels,
  output logic [2:0][1:0][3:0]   gate
);

  // Gate pattern {S4,S3,S2,S1} for a bridge output of +E, 0 and -E.
  localparam logic [3:0] G_POS  = 4'b1001;
  localparam logic [3:0] G_ZERO = 4'b0011;
  localparam logic [3:0] G_NEG  = 4'b0110;

  level_t lv [3];

  always_comb begin
    lv[0] = levels.a;
    lv[1] = levels.b;
    lv[2] = levels.c;
    for (int p = 0; p < 3; p++) begin
      if (lv[p] >= 3'sd1)       gate[p][0] = G_POS;
      else if (lv[p] <= -3'sd1) gate[p][0] = G_NEG;
      else                      gate[p][0] = G_ZERO;
      if (lv[p] >= 3'sd2)       gate[p][1] = G_POS;
      else if (lv[p] <= -3'sd2) gate[p][1] = G_NEG;
      else                      gate[p][1] = G_ZERO;
    end
  end

endmodule
