// tb_seq_gen - drives the sequencer with random dwell times, sectors and
// base states (TS_CYCLES = 200) and checks every sampling interval:
//   * the set applied in interval k is the one offered in interval k-1;
//   * the state sequence is V0L, first, second, V0U, second, first, V0L,
//     i.e. symmetric, with every step moving one phase by one level;
//   * the states are the base, base+(1,1,1) and the two sector vertices,
//     whose space vectors relative to the centre lie at the sector's start
//     and end angles (checked in real arithmetic);
//   * time at each vertex equals its dwell time, and the total zero time the
//     zero dwell time, within the rounding of halving.
module tb_seq_gen;
  import svpwm_pkg::*;

  localparam int unsigned TS = 200;
  localparam int unsigned TW = $clog2(TS + 1);
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic next_valid = 0;
  logic [TW-1:0] next_ta, next_tb, next_t0;
  logic [2:0] next_sector;
  state_t next_base, levels;
  logic step, running;
  logic [2:0] seg;
  int checks = 0, failures = 0;

  seq_gen #(.TS_CYCLES(TS)) dut (
    .clk(clk), .rst_n(rst_n), .next_valid(next_valid), .next_ta(next_ta),
    .next_tb(next_tb), .next_t0(next_t0), .next_sector(next_sector),
    .next_base(next_base), .step(step), .levels(levels), .seg(seg),
    .running(running));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sets offered per interval
  int o_ta [$], o_tb [$], o_sec [$];
  state_t o_base [$];
  state_t win [$];
  int n_int = 0;

  function automatic int lv(input state_t s, input int p);
    return (p == 0) ? int'(s.a) : (p == 1) ? int'(s.b) : int'(s.c);
  endfunction

  // vector of state s relative to base, as an angle in degrees (-1 if zero)
  function automatic real rel_angle(input state_t s, input state_t b);
    real da, db, dc, al, be;
    da = lv(s, 0) - lv(b, 0); db = lv(s, 1) - lv(b, 1); dc = lv(s, 2) - lv(b, 2);
    al = da - (db + dc) / 2.0;
    be = $sqrt(3.0) / 2.0 * (db - dc);
    if (al * al + be * be < 1e-6) return -1.0;
    return ($atan2(be, al) * 180.0 / PI < -0.5) ? $atan2(be, al) * 180.0 / PI + 360.0
                                                : $atan2(be, al) * 180.0 / PI;
  endfunction

  task automatic analyse(input int k);
    state_t b, up, seqs [$];
    int dur [$], ta, tb, t0, sec, zero, tva, tvb, last, diff;
    real aa, ab, ang;
    ta = o_ta[k]; tb = o_tb[k]; sec = o_sec[k]; b = o_base[k];
    t0 = TS - ta - tb;
    up = '{a: b.a + 3'sd1, b: b.b + 3'sd1, c: b.c + 3'sd1};
    // run-length encode the window
    foreach (win[i]) begin
      if (seqs.size() == 0 || seqs[$] != win[i]) begin
        seqs.push_back(win[i]); dur.push_back(1);
      end else dur[$]++;
    end
    // one leg, one level per step (when no segment is empty)
    if (ta >= 2 && tb >= 2 && t0 >= 4)
    for (int i = 1; i < seqs.size(); i++) begin
      diff = 0;
      for (int p = 0; p < 3; p++) diff += (lv(seqs[i], p) - lv(seqs[i-1], p)) ** 2;
      checks++;
      if (diff != 1) begin failures++; $display("FAIL interval %0d: step %0d moves %0d", k, i, diff); end
    end
    // symmetric sequence
    if (t0 >= 4) checks++;
    if (t0 >= 4)
    for (int i = 0; i < seqs.size(); i++)
      if (seqs[i] != seqs[seqs.size() - 1 - i]) begin
        failures++; $display("FAIL interval %0d: sequence not symmetric", k); break;
      end
    // time per state
    zero = 0; tva = 0; tvb = 0;
    aa = 60.0 * sec; ab = 60.0 * ((sec + 1) % 6);
    foreach (seqs[i]) begin
      ang = rel_angle(seqs[i], b);
      if (seqs[i] == b || seqs[i] == up) zero += dur[i];
      else if (rabs(ang - aa) < 0.5) tva += dur[i];
      else if (rabs(ang - ab) < 0.5 || rabs(ang - ab - 360.0) < 0.5) tvb += dur[i];
      else begin failures++; $display("FAIL interval %0d: foreign state", k); end
    end
    checks++;
    if (rabs(real'(tva - ta)) > 1.0 || rabs(real'(tvb - tb)) > 1.0 || rabs(real'(zero - t0)) > 2.0) begin
      failures++;
      $display("FAIL interval %0d sec %0d: times a=%0d b=%0d 0=%0d exp %0d %0d %0d",
               k, sec, tva, tvb, zero, ta, tb, t0);
    end
    // starts and ends at the lower zero state when there is zero time
    if (t0 >= 4) begin
      checks++;
      if (seqs[0] != b || seqs[$] != b) begin failures++; $display("FAIL interval %0d: not V0L at ends", k); end
    end
  endtask

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // collect the phase levels of each interval and analyse it at its end
  always @(posedge clk) begin
    if (running) win.push_back(levels);
    if (step && rst_n) begin
      if (running && n_int >= 2) analyse(n_int - 2);
      win.delete();
      n_int++;
    end
  end

  initial begin
    int ta, tb, l0;
    next_ta = '0; next_tb = '0; next_t0 = '0; next_sector = '0; next_base = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (n_int < 80) begin
      @(posedge clk);
      if (step) begin
        // offer a new random set a few cycles into the interval
        @(negedge clk);
        repeat ($urandom_range(30)) @(negedge clk);
        ta = $urandom_range(TS);
        tb = $urandom_range(TS - ta);
        if (n_int % 7 == 0) begin ta = 0; tb = 0; end
        if (n_int % 11 == 0) begin ta = TS / 2; tb = TS - TS / 2; end
        l0 = $urandom_range(3);
        next_ta = TW'(ta); next_tb = TW'(tb); next_t0 = TW'(TS - ta - tb);
        next_sector = 3'($urandom_range(5));
        next_base = '{a: level_t'(int'($urandom_range(3)) - 2),
                      b: level_t'(int'($urandom_range(3)) - 2),
                      c: level_t'(int'(l0) - 2)};
        o_ta.push_back(ta); o_tb.push_back(tb); o_sec.push_back(int'(next_sector));
        o_base.push_back(next_base);
        next_valid = 1;
        @(negedge clk) next_valid = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
