// svpwm_top - optimized space-vector PWM modulator for a five-level
// cascaded H-bridge inverter (OSVPWM and FOSVPWM).
//
// The five-level space-vector diagram is never handled as a whole. Once per
// sampling interval the reference vector V_ref5 (ref_gen) is placed in the
// inner region (|V_ref5| < 2E, six inner two-level hexagons) or the outer
// region (eighteen outer hexagons for OSVPWM, twelve for FOSVPWM), and one
// two-level hexagon is chosen from its angle (hex_select). The reference is
// re-expressed about that hexagon's centre (ref_map), and from there on the
// problem is ordinary two-level SVPWM: sector and dwell times (sector_dwell)
// and a seven-segment sequence (seq_gen) whose states are the hexagon's
// five-level switching states. chb_gate_drive turns the three phase levels
// into the gate signals of the two H-bridges per phase.
//
// Interface. `ma` is the modulation index in Q1.15 (32768 = 1.0, the
// largest circle inside the five-level diagram); `mode` selects OSVPWM or
// FOSVPWM. Both are sampled at the start of each interval. gate[p][h][s]
// drives phase p, bridge h (H1, H2), switch S1..S4. `levels` are the phase
// levels -2..+2 behind the gates; `hex`, `outer`, `sector` and `clamped`
// describe the sample being computed, `step` marks the start of each
// sampling interval, `seg` is the segment (0..6) of the seven-segment
// sequence being output and `running` rises once the first sample is out.
//
// Timing. The sampling interval is TS_CYCLES = CLK_HZ / FS_HZ clock cycles
// (33333 at the default 50 MHz clock and the document's 1.5 kHz sampling
// rate; the clock frequency is this design's choice). A sample is taken at
// the start of interval k, computed within 19 cycles and applied during
// interval k+1. The default output frequency is the document's 50 Hz.
module svpwm_top
  import svpwm_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned FS_HZ     = 1500,
  parameter int unsigned F_OUT_HZ  = 50,
  parameter int unsigned TS_CYCLES = CLK_HZ / FS_HZ,
  parameter int unsigned TW        = $clog2(TS_CYCLES + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  mode_t                mode,
  input  logic [MA_W-1:0]      ma,
  output logic [2:0][1:0][3:0] gate,
  output state_t               levels,
  output logic                 step,
  output hex_t                 hex,
  output logic                 outer,
  output logic [2:0]           sector,
  output logic                 clamped,
  output logic [2:0]           seg,
  output logic                 running
);

  // The reference must be ready before its interval ends.
  initial assert (TS_CYCLES > 24)
    else $error("svpwm_top: TS_CYCLES must exceed the 19-cycle sample latency");

  angle_t  theta;
  coord_t  mag, alpha5, betap5, alpha2, betap2;
  logic    ref_valid;
  mode_t   mode_q;

  hex_t          hex_c;
  logic          outer_c;
  state_t        base_c;
  logic [2:0]    sector_c;
  logic [TW-1:0] ta_c, tb_c, t0_c;
  logic          clamped_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    mode_q <= MODE_OSVPWM;
    else if (step) mode_q <= mode;
  end

  ref_gen #(
    .F_OUT_HZ (F_OUT_HZ),
    .FS_HZ    (FS_HZ)
  ) u_ref (
    .clk   (clk),
    .rst_n (rst_n),
    .step  (step),
    .ma    (ma),
    .theta (theta),
    .mag   (mag),
    .alpha (alpha5),
    .betap (betap5),
    .valid (ref_valid)
  );

  hex_select u_sel (
    .mode  (mode_q),
    .theta (theta),
    .mag   (mag),
    .hex   (hex_c),
    .outer (outer_c)
  );

  ref_map u_map (
    .hex    (hex_c),
    .alpha5 (alpha5),
    .betap5 (betap5),
    .alpha2 (alpha2),
    .betap2 (betap2),
    .base   (base_c)
  );

  sector_dwell #(
    .TS_CYCLES (TS_CYCLES),
    .TW        (TW)
  ) u_dwell (
    .alpha2  (alpha2),
    .betap2  (betap2),
    .sector  (sector_c),
    .ta      (ta_c),
    .tb      (tb_c),
    .t0      (t0_c),
    .clamped (clamped_c)
  );

  seq_gen #(
    .TS_CYCLES (TS_CYCLES),
    .TW        (TW)
  ) u_seq (
    .clk         (clk),
    .rst_n       (rst_n),
    .next_valid  (ref_valid),
    .next_ta     (ta_c),
    .next_tb     (tb_c),
    .next_t0     (t0_c),
    .next_sector (sector_c),
    .next_base   (base_c),
    .step        (step),
    .levels      (levels),
    .seg         (seg),
    .running     (running)
  );

  chb_gate_drive u_gate (
    .levels (levels),
    .gate   (gate)
  );

  // Status of the most recent sample.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hex     <= OH1;
      outer   <= 1'b0;
      sector  <= '0;
      clamped <= 1'b0;
    end else if (ref_valid) begin
      hex     <= hex_c;
      outer   <= outer_c;
      sector  <= sector_c;
      clamped <= clamped_c;
    end
  end

endmodule
