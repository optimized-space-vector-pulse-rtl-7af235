// seq_gen - sampling-interval timer and seven-segment switching sequencer.
//
// Counts the sampling interval Ts (TS_CYCLES clock cycles) and, within it,
// applies the seven-segment sequence of the selected two-level hexagon:
//     V0L, first, second, V0U, second, first, V0L
// where V0L and V0U are the two zero-vector states at the hexagon centre
// (the lower state `base` and base + (1,1,1)) and first/second are the two
// active vertices of the sector. Each step of the sequence moves exactly one
// phase by one level: in sectors I, III and V the order is V_a then V_b, in
// sectors II, IV and VI it is V_b then V_a. The zero time is split
// T0/4, T0/2, T0/4 and each active time in two equal halves, which makes the
// pattern symmetric about the middle of the interval. The seven-segment
// sequence and the one-leg-per-step rule are the document's; the split of
// the times and the double buffering are this design's choices.
//
// Timing. `step` pulses in the first cycle of every interval; the dwell
// times, sector and base state offered on the `next_*` inputs with
// `next_valid` during interval k are applied in interval k+1 (one interval
// of latency). Until the first set has been applied the outputs hold every
// phase at level 0. The phase levels are registered: they follow the
// segment boundaries by one clock cycle. Assertions check that each offered
// set fills exactly one interval and that within an interval no phase moves
// by more than one level per step.
module seq_gen
  import svpwm_pkg::*;
#(
  parameter int unsigned TS_CYCLES = 33333,
  parameter int unsigned TW = $clog2(TS_CYCLES + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           next_valid,
  input  logic [TW-1:0]  next_ta,
  input  logic [TW-1:0]  next_tb,
  input  logic [TW-1:0]  next_t0,
  input  logic [2:0]     next_sector,
  input  state_t         next_base,
  output logic           step,
  output state_t         levels,
  output logic [2:0]     seg,
  output logic           running
);

  logic [TW-1:0] cnt;
  logic [TW-1:0] ta, tb, t0, p_ta, p_tb, p_t0;
  logic [2:0]    sec, p_sec;
  state_t        base, p_base;
  logic          p_full;
  logic          last;

  assign last = (cnt == TW'(TS_CYCLES - 1));
  assign step = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      ta      <= '0; tb <= '0; t0 <= TW'(TS_CYCLES);
      sec     <= '0; base <= '0;
      p_ta    <= '0; p_tb <= '0; p_t0 <= TW'(TS_CYCLES);
      p_sec   <= '0; p_base <= '0; p_full <= 1'b0;
      running <= 1'b0;
    end else begin
      cnt <= last ? '0 : cnt + TW'(1);
      if (next_valid) begin
        p_ta   <= next_ta;
        p_tb   <= next_tb;
        p_t0   <= next_t0;
        p_sec  <= next_sector;
        p_base <= next_base;
        p_full <= 1'b1;
      end
      if (last && p_full) begin
        ta      <= p_ta;
        tb      <= p_tb;
        t0      <= p_t0;
        sec     <= p_sec;
        base    <= p_base;
        running <= 1'b1;
      end
    end
  end

  // Segment boundaries within the interval.
  logic [TW-1:0] q, ha, hb, mid, d1, d2;
  logic [TW+2:0] b1, b2, b3, b4, b5, b6;
  logic [2:0]    va, vb, v1, v2, code;
  logic          even_sec;
  logic [2:0]    seg_c;

  always_comb begin
    q        = t0 >> 2;
    mid      = t0 - (q << 1);
    ha       = ta >> 1;
    hb       = tb >> 1;
    even_sec = sec[0];                       // sectors II, IV, VI
    va       = vertex_code(sec);
    vb       = vertex_code((sec == 3'd5) ? 3'd0 : sec + 3'd1);
    v1       = even_sec ? vb : va;
    v2       = even_sec ? va : vb;
    d1       = even_sec ? hb : ha;
    d2       = even_sec ? ha : hb;
    b1 = (TW+3)'(q);
    b2 = b1 + (TW+3)'(d1);
    b3 = b2 + (TW+3)'(d2);
    b4 = b3 + (TW+3)'(mid);
    b5 = b4 + (TW+3)'(d2);
    b6 = b5 + (TW+3)'(d1);
    if      ((TW+3)'(cnt) < b1) seg_c = 3'd0;
    else if ((TW+3)'(cnt) < b2) seg_c = 3'd1;
    else if ((TW+3)'(cnt) < b3) seg_c = 3'd2;
    else if ((TW+3)'(cnt) < b4) seg_c = 3'd3;
    else if ((TW+3)'(cnt) < b5) seg_c = 3'd4;
    else if ((TW+3)'(cnt) < b6) seg_c = 3'd5;
    else                        seg_c = 3'd6;
    case (seg_c)
      3'd1, 3'd5: code = v1;
      3'd2, 3'd4: code = v2;
      3'd3:       code = 3'b111;
      default:    code = 3'b000;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      levels <= '0;
      seg    <= '0;
    end else begin
      seg <= seg_c;
      if (running) begin
        levels.a <= base.a + level_t'({2'b00, code[2]});
        levels.b <= base.b + level_t'({2'b00, code[1]});
        levels.c <= base.c + level_t'({2'b00, code[0]});
      end else begin
        levels <= '0;
      end
    end
  end

  // Rules of the interface and of the sequence.
  // A set offered for the next interval must fill exactly one interval.
  assert property (@(posedge clk) disable iff (!rst_n)
    next_valid |-> (32'(next_ta) + 32'(next_tb) + 32'(next_t0) == TS_CYCLES))
    else $error("seq_gen: Ta + Tb + T0 differs from TS_CYCLES");
  // Inside an interval every switching step moves a phase by at most one
  // level (the one-leg-per-step rule of the seven-segment sequence).
  logic step_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) step_q <= 1'b0;
    else        step_q <= step;
  end
  assert property (@(posedge clk) disable iff (!rst_n)
    (running && !step_q && !$past(step_q)) |->
      ((levels.a - $past(levels.a) <= 3'sd1) && ($past(levels.a) - levels.a <= 3'sd1) &&
       (levels.b - $past(levels.b) <= 3'sd1) && ($past(levels.b) - levels.b <= 3'sd1) &&
       (levels.c - $past(levels.c) <= 3'sd1) && ($past(levels.c) - levels.c <= 3'sd1)))
    else $error("seq_gen: a phase moved by more than one level");

endmodule
