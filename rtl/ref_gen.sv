// ref_gen - reference vector generator of the SVPWM modulator.
//
// Produces the rotating reference vector V_ref5 once per sampling interval:
// its angle theta, its magnitude |V_ref5| and its components alpha and
// betap = 2*beta/sqrt(3) (see svpwm_pkg for the coordinate system).
//
// How it works. An angle accumulator in 1/16 degree advances by PHASE_STEP
// on every `step` pulse; the default 192 (12 degrees) is the output
// frequency of 50 Hz sampled at 1.5 kHz, i.e. 30 samples, 6N with N = 5, per
// period. The magnitude follows the modulation-index definition of the
// five-level diagram: Ma = 1 is the radius of the largest inscribed circle,
// 2*sqrt(3)*E, so |V_ref5| = Ma * 2*sqrt(3) * E. The components are found
// by a 16-iteration CORDIC in rotation mode with the angle folded into
// -90..+90 degrees; the CORDIC gain is removed by pre-scaling the magnitude.
// The sample rate, the 50 Hz output and the Ma definition are the document's;
// the accumulator, the fixed-point formats and the CORDIC are this design's
// own choices.
//
// Interface and timing. `step` starts a new sample; the angle used is the
// accumulator value before the step (the first sample after reset is at 0
// degrees). `valid` pulses 18 clock cycles after `step`, with theta, mag,
// alpha and betap held until the next result. `ma` is Q1.15 (32768 = 1.0)
// and is sampled at `step`. A `step` arriving while a conversion is running
// restarts it.
module ref_gen
  import svpwm_pkg::*;
#(
  parameter int unsigned F_OUT_HZ = 50,
  parameter int unsigned FS_HZ    = 1500,
  parameter int unsigned PHASE_STEP = (ANG_FULL * F_OUT_HZ) / FS_HZ
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                step,
  input  logic [MA_W-1:0]     ma,
  output angle_t              theta,
  output coord_t              mag,
  output coord_t              alpha,
  output coord_t              betap,
  output logic                valid
);

  localparam int unsigned ITER = 16;
  localparam int unsigned CW   = 26;             // CORDIC datapath width
  localparam int unsigned GUARD = 4;             // extra fraction bits
  // 2*sqrt(3) in Q.12, CORDIC gain prod(1/sqrt(1+2^-2i)) in Q.12,
  // 2/sqrt(3) in Q.12.
  localparam logic [15:0] TWO_SQRT3 = 16'd14189;
  localparam logic [15:0] K_GAIN    = 16'd2487;
  localparam logic [15:0] TWO_BY_SQRT3 = 16'd4730;

  // atan(2^-i) in units of 1/4096 degree: round(atan(2^-i)*180/pi*4096).
  function automatic logic signed [CW-1:0] atan_lut(input logic [3:0] i);
    case (i)
      4'd0:  return CW'(184320);
      4'd1:  return CW'(108810);
      4'd2:  return CW'(57492);
      4'd3:  return CW'(29184);
      4'd4:  return CW'(14649);
      4'd5:  return CW'(7331);
      4'd6:  return CW'(3667);
      4'd7:  return CW'(1833);
      4'd8:  return CW'(917);
      4'd9:  return CW'(458);
      4'd10: return CW'(229);
      4'd11: return CW'(115);
      4'd12: return CW'(57);
      4'd13: return CW'(29);
      4'd14: return CW'(14);
      default: return CW'(7);
    endcase
  endfunction

  angle_t acc;
  logic signed [CW-1:0] x, y, z;
  logic [4:0]  iter;
  logic        busy, neg, fin;

  // Start values of a conversion.
  logic [31:0]          mag_full;
  coord_t               mag_new;
  logic [31:0]          x0_full;
  logic signed [CW-1:0] z0;
  logic                 neg0;

  always_comb begin
    mag_full = 32'(ma) * 32'(TWO_SQRT3);
    mag_new  = coord_t'(mag_full >> MA_FRAC);
    x0_full  = 32'(mag_new) * 32'(K_GAIN);           // Q.24
    // fold the angle into -90..+90 degrees
    if (acc > deg(90) && acc < deg(270)) begin
      z0   = (CW'(acc) - CW'(deg(180))) <<< 8;
      neg0 = 1'b1;
    end else if (acc >= deg(270)) begin
      z0   = (CW'(acc) - CW'(deg(360))) <<< 8;
      neg0 = 1'b0;
    end else begin
      z0   = CW'(acc) <<< 8;
      neg0 = 1'b0;
    end
  end

  // Output scaling: x -> alpha, y * 2/sqrt(3) -> betap, then drop the guard
  // bits with rounding and undo the angle fold.
  logic signed [CW+16:0] yb_full;
  logic signed [CW-1:0]  a_r, b_r;
  always_comb begin
    yb_full = (CW+17)'(y) * $signed({1'b0, TWO_BY_SQRT3});
    a_r = (x + CW'(1 << (GUARD-1))) >>> GUARD;
    b_r = CW'((yb_full + (CW+17)'(1 << (GUARD+FRAC-1))) >>> (GUARD+FRAC));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      theta <= '0;
      mag   <= '0;
      alpha <= '0;
      betap <= '0;
      valid <= 1'b0;
      x <= '0; y <= '0; z <= '0;
      iter <= '0; busy <= 1'b0; neg <= 1'b0; fin <= 1'b0;
    end else begin
      valid <= 1'b0;
      fin   <= 1'b0;
      if (step) begin
        theta <= acc;
        mag   <= mag_new;
        acc   <= (32'(acc) + PHASE_STEP >= ANG_FULL) ?
                 angle_t'(32'(acc) + PHASE_STEP - ANG_FULL) :
                 angle_t'(32'(acc) + PHASE_STEP);
        x     <= CW'(x0_full >> (FRAC - GUARD));      // Q.24 -> Q.16
        y     <= '0;
        z     <= z0;
        neg   <= neg0;
        iter  <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        if (z >= 0) begin
          x <= x - (y >>> iter);
          y <= y + (x >>> iter);
          z <= z - atan_lut(iter[3:0]);
        end else begin
          x <= x + (y >>> iter);
          y <= y - (x >>> iter);
          z <= z + atan_lut(iter[3:0]);
        end
        iter <= iter + 5'd1;
        if (iter == 5'(ITER - 1)) begin
          busy <= 1'b0;
          fin  <= 1'b1;
        end
      end else if (fin) begin
        alpha <= neg ? coord_t'(-a_r) : coord_t'(a_r);
        betap <= neg ? coord_t'(-b_r) : coord_t'(b_r);
        valid <= 1'b1;
      end
    end
  end

endmodule
