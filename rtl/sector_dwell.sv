// sector_dwell - sector identification and dwell-time calculation.
//
// Works on the reference V_ref2 expressed about the centre of a two-level
// hexagon whose vertices lie at distance E. The hexagon is split into six
// 60-degree sectors (sector I from 0 to 60 degrees, counter-clockwise). In a
// sector bounded by the vertices V_a (at its start) and V_b (at its end),
// volt-second balance V_ref2*Ts = V_a*Ta + V_b*Tb + V_0*T0 gives
//     Ta = Ts*m*sin(60deg - th),  Tb = Ts*m*sin(th),  T0 = Ts - Ta - Tb
// with th the angle inside the sector and m = 2|V_ref2|/(sqrt(3)E). In the
// oblique coordinates (alpha, betap = 2*beta/sqrt(3)) these are linear:
//     sector I   Ta =  a - b/2   Tb =  b
//     sector II  Ta =  a + b/2   Tb =  b/2 - a
//     sector III Ta =  b         Tb = -a - b/2
//     sector IV  Ta = -a + b/2   Tb = -b
//     sector V   Ta = -a - b/2   Tb =  a - b/2
//     sector VI  Ta = -b         Tb =  a + b/2      (fractions of Ts)
// and the sector itself follows from the signs of betap, betap - 2a and
// betap + 2a, so neither an angle nor a sine table is needed. The
// volt-second balance and the sine formulas are the document's; their
// linear form is an exact rewriting of them.
//
// A reference outside the hexagon would need Ta + Tb > Ts (or a negative
// time); this design clamps each time to 0..Ts, then cuts Tb so that
// Ta + Tb = Ts, and raises `clamped`.
//
// Purely combinational. Times are in clock cycles of a sampling interval of
// TS_CYCLES cycles; `sector` is 0..5 for sectors I..VI.
module sector_dwell
  import svpwm_pkg::*;
#(
  parameter int unsigned TS_CYCLES = 33333,
  parameter int unsigned TW = $clog2(TS_CYCLES + 1)
) (
  input  coord_t         alpha2,
  input  coord_t         betap2,
  output logic [2:0]     sector,
  output logic [TW-1:0]  ta,
  output logic [TW-1:0]  tb,
  output logic [TW-1:0]  t0,
  output logic           clamped
);

  localparam int unsigned FW = COORD_W + 2;    // fraction width with headroom
  localparam logic signed [FW-1:0] ONE = FW'(1 << FRAC);

  logic signed [FW-1:0] a, b, bh, fa, fb, fa_c, fb_c;
  logic [TW+FRAC:0]     pa, pb;
  logic [TW:0]          ca, cb;
  logic                 clamp_a, clamp_b;

  always_comb begin
    a  = FW'(alpha2);
    b  = FW'(betap2);
    bh = b >>> 1;
    if (b >= 0) begin
      if (b <= (a <<< 1))        sector = 3'd0;
      else if (b >= -(a <<< 1))  sector = 3'd1;
      else                       sector = 3'd2;
    end else begin
      if (b >= (a <<< 1))        sector = 3'd3;
      else if (b >= -(a <<< 1))  sector = 3'd5;
      else                       sector = 3'd4;
    end
    case (sector)
      3'd0:    begin fa =  a - bh; fb =  b;      end
      3'd1:    begin fa =  a + bh; fb =  bh - a; end
      3'd2:    begin fa =  b;      fb = -a - bh; end
      3'd3:    begin fa = -a + bh; fb = -b;      end
      3'd4:    begin fa = -a - bh; fb =  a - bh; end
      default: begin fa = -b;      fb =  a + bh; end
    endcase
    // clamp each fraction to 0..1
    clamp_a = 1'b0;
    clamp_b = 1'b0;
    fa_c = fa;
    fb_c = fb;
    if (fa < 0)        begin fa_c = '0;  clamp_a = 1'b1; end
    else if (fa > ONE) begin fa_c = ONE; clamp_a = 1'b1; end
    if (fb < 0)        begin fb_c = '0;  clamp_b = 1'b1; end
    else if (fb > ONE) begin fb_c = ONE; clamp_b = 1'b1; end
    // fractions of Ts to clock cycles, rounded
    pa = (TW+FRAC+1)'(fa_c) * (TW+FRAC+1)'(TS_CYCLES) + (TW+FRAC+1)'(1 << (FRAC-1));
    pb = (TW+FRAC+1)'(fb_c) * (TW+FRAC+1)'(TS_CYCLES) + (TW+FRAC+1)'(1 << (FRAC-1));
    ca = (TW+1)'(pa >> FRAC);
    cb = (TW+1)'(pb >> FRAC);
    clamped = clamp_a | clamp_b;
    if (ca + cb > (TW+1)'(TS_CYCLES)) begin
      cb      = (TW+1)'(TS_CYCLES) - ca;
      clamped = clamped | (fa_c + fb_c > ONE);
    end
    ta = TW'(ca);
    tb = TW'(cb);
    t0 = TW'((TW+1)'(TS_CYCLES) - ca - cb);
  end

endmodule
