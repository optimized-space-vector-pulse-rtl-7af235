// tb_svpwm_top - end-to-end test of the SVPWM modulator,
// with a 450 kHz clock so that a sampling interval is 300 cycles instead
// of 33333 (the switching pattern per interval is the same, only finer
// grained at full size). It covers every modulation index of the
// evaluation, 0.2 to 1.0, with both techniques.
//
// For every configuration in the schedule (technique, modulation index) the
// modulator runs 32 sampling intervals. The gate signals drive a
// behavioural model of the five-level CHB power stage, and for every
// sampling interval the testbench averages the space vector of the three
// phase voltages, alpha = va - (vb+vc)/2 and betap = vb - vc, and compares
// it with the reference of the sample applied in that interval,
// Ma*2*sqrt(3)*E at 12 degrees per sample (volt-second balance), unless the
// modulator reported a clamped (out-of-hexagon) sample. It also checks the
// sampling rate (one step every TS cycles), the absence of shoot-through,
// that every switching change moves one phase by at most one level, and it
// measures over one full output period the peak fundamental V1m and the
// THD of the line voltage v_ab, in volts for E = 600 V. V1m must match
// 4*Ma*E within 3 % for configurations without clamped samples.
// Mechanisms counted: inner and outer region, each hexagon, each sector,
// clamped samples, technique switches.
module tb_svpwm_top;
  import svpwm_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real E_VOLTS = 600.0;
  localparam int unsigned CLK = 450000;
  localparam int unsigned TS = CLK / 1500;
  localparam int unsigned SPP = 30;               // samples per 50 Hz period
  localparam int NRUN = 10;
  localparam int RUNLEN = 32;

  logic clk = 0, rst_n = 0;
  mode_t mode = MODE_OSVPWM;
  logic [MA_W-1:0] ma = '0;
  logic [2:0][1:0][3:0] gate;
  state_t levels;
  logic step, outer, clamped, running;
  hex_t hex;
  logic [2:0] sector, seg;
  int vphase [3];
  logic pfault;
  int checks = 0, failures = 0;

  svpwm_top #(.CLK_HZ(CLK)) dut (
    .clk(clk), .rst_n(rst_n), .mode(mode), .ma(ma), .gate(gate),
    .levels(levels), .step(step), .hex(hex), .outer(outer),
    .sector(sector), .clamped(clamped), .seg(seg), .running(running));

  chb_inverter_model pwr (.gate(gate), .vphase(vphase), .fault(pfault));

  always #5 clk = ~clk;

  // schedule
  real    run_ma   [NRUN] = '{0.2, 0.4, 0.6, 0.8, 1.0, 0.2, 0.4, 0.6, 0.8, 1.0};
  mode_t  run_mode [NRUN] = '{MODE_OSVPWM, MODE_OSVPWM, MODE_OSVPWM, MODE_OSVPWM, MODE_OSVPWM, MODE_FOSVPWM, MODE_FOSVPWM, MODE_FOSVPWM, MODE_FOSVPWM, MODE_FOSVPWM};

  initial begin
    #(64'd20 * (64'(TS) * (NRUN * RUNLEN + 8) + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // per-step records
  real   ma_at     [int];
  int    mode_at   [int];
  int    hex_at    [int];
  bit    outer_at  [int], clamp_at [int];
  int    sector_at [int];
  int    run_at    [int];
  int    cur_run = -1;

  // coverage
  int n_inner = 0, n_outer = 0, n_clamped = 0, n_switch = 0;
  int hex_osv [24], hex_fosv [24], sec_seen [6];
  int n_vec = 0, n_vec_ok = 0;

  // measurement state
  int    n = 0;                   // steps seen before this edge
  int    last_step_cyc = -1, cyc = 0;
  real   sa = 0.0, sb = 0.0;      // per-interval sums
  int    wcnt = 0;
  int    prev_v [3] = '{0, 0, 0};
  real   dc, ds, sq;              // DFT and RMS sums of v_ab
  int    mcnt = 0;
  int    run_clamps [NRUN];
  real   res_v1 [NRUN], res_thd [NRUN];

  always @(posedge clk) begin
    int j, k, r, rs;
    real ea, eb, ang, vab, th;
    if (rst_n) begin
      cyc++;
      j = n - 1;                               // interval of the levels seen now
      // power stage and switching rules
      checks++;
      if (pfault) begin failures++; $display("FAIL shoot-through or open bridge"); end
      for (int p = 0; p < 3; p++)
        if (vphase[p] - prev_v[p] > 1 || prev_v[p] - vphase[p] > 1) begin
          failures++; $display("FAIL phase %0d jumps %0d -> %0d", p, prev_v[p], vphase[p]);
        end
      prev_v = vphase;
      if (j >= 0) begin
        sa += real'(vphase[0]) - real'(vphase[1] + vphase[2]) / 2.0;
        sb += real'(vphase[1] - vphase[2]);
        wcnt++;
        // line-voltage measurement over one period of the current run
        r = run_at.exists(j - 1) ? run_at[j - 1] : -1;
        if (r >= 0) begin
          rs = 0;
          while (run_at.exists(j - 1 - rs - 1) && run_at[j - 1 - rs - 1] == r) rs++;
          // rs = samples of this run before sample j-1
          if (rs >= 1 && rs < 1 + SPP) begin
            vab = E_VOLTS * real'(vphase[0] - vphase[1]);
            th  = 2.0 * PI * real'(mcnt) / real'(SPP * TS);
            dc += vab * $cos(th);
            ds += vab * $sin(th);
            sq += vab * vab;
            mcnt++;
            if (mcnt == SPP * TS) begin
              real v1, vrms, v1rms;
              v1    = 2.0 * $sqrt(dc * dc + ds * ds) / real'(mcnt);
              vrms  = $sqrt(sq / real'(mcnt));
              v1rms = v1 / $sqrt(2.0);
              res_v1[r]  = v1;
              res_thd[r] = 100.0 * $sqrt((vrms * vrms > v1rms * v1rms) ?
                                         vrms * vrms - v1rms * v1rms : 0.0) / v1rms;
              $display("%s Ma=%4.2f: V1m(line) = %7.1f V  THD = %5.2f %%  clamped samples = %0d",
                       (run_mode[r] == MODE_OSVPWM) ? "OSVPWM " : "FOSVPWM",
                       run_ma[r], v1, res_thd[r], run_clamps[r]);
              if (run_clamps[r] == 0) begin
                checks++;
                if (rabs(v1 - 4.0 * run_ma[r] * E_VOLTS) > 0.03 * 4.0 * run_ma[r] * E_VOLTS) begin
                  failures++;
                  $display("FAIL V1m %f, expected %f", v1, 4.0 * run_ma[r] * E_VOLTS);
                end
              end
              dc = 0.0; ds = 0.0; sq = 0.0; mcnt = 0;
            end
          end
        end
      end
      if (step) begin
        // sampling rate
        if (last_step_cyc >= 0) begin
          checks++;
          if (cyc - last_step_cyc != int'(TS)) begin
            failures++; $display("FAIL step spacing %0d, expected %0d", cyc - last_step_cyc, TS);
          end
        end
        last_step_cyc = cyc;
        // status of sample n-1 is complete now
        if (n >= 1) begin
          k = n - 1;
          hex_at[k] = int'(hex); outer_at[k] = outer; clamp_at[k] = clamped;
          sector_at[k] = int'(sector);
          if (outer) n_outer++; else n_inner++;
          if (clamped) begin n_clamped++; if (run_at[k] >= 0) run_clamps[run_at[k]]++; end
          sec_seen[sector]++;
          if (mode_at[k] == int'(MODE_OSVPWM)) hex_osv[hex]++; else hex_fosv[hex]++;
          if (k >= 1 && mode_at[k] != mode_at[k - 1]) n_switch++;
        end
        // interval j = n-1 just ended; it applied sample j-1
        k = n - 2;
        if (k >= 0 && running && run_at[k] >= 0 && wcnt == int'(TS)) begin
          ang = real'((k * 12) % 360) * PI / 180.0;
          ea  = ma_at[k] * 2.0 * $sqrt(3.0) * $cos(ang);
          eb  = ma_at[k] * 2.0 * $sqrt(3.0) * $sin(ang) * 2.0 / $sqrt(3.0);
          n_vec++;
          if (!clamp_at[k]) begin
            checks++;
            if (rabs(sa / wcnt - ea) > 0.02 || rabs(sb / wcnt - eb) > 0.02) begin
              failures++;
              $display("FAIL sample %0d (Ma %f, hex %0d, sector %0d): mean (%f,%f), ref (%f,%f)",
                       k, ma_at[k], hex_at[k], sector_at[k], sa / wcnt, sb / wcnt, ea, eb);
            end else n_vec_ok++;
          end
        end
        sa = 0.0; sb = 0.0; wcnt = 0;
        // record what the DUT samples at this step
        ma_at[n] = real'(ma) / 32768.0;
        mode_at[n] = int'(mode);
        run_at[n] = cur_run;
        n++;
      end
    end
  end

  initial begin
    dc = 0.0; ds = 0.0; sq = 0.0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < NRUN; r++) begin
      // change the inputs just after a step; they are sampled at the next
      @(posedge clk iff step);
      @(negedge clk);
      ma = 16'($rtoi(run_ma[r] * 32768.0 + 0.5));
      mode = run_mode[r];
      cur_run = r;
      repeat (RUNLEN) @(posedge clk iff step);
    end
    repeat (3) @(posedge clk iff step);
    // coverage of the mechanisms
    $display("samples: inner %0d outer %0d clamped %0d, technique switches %0d, vectors checked %0d of %0d",
             n_inner, n_outer, n_clamped, n_switch, n_vec_ok, n_vec);
    checks++; if (n_inner == 0)   begin failures++; $display("FAIL inner region never used"); end
    checks++; if (n_outer == 0)   begin failures++; $display("FAIL outer region never used"); end
    checks++; if (n_clamped == 0) begin failures++; $display("FAIL no clamped sample"); end
    checks++; if (n_switch == 0 && NRUN > 1) begin failures++; $display("FAIL no technique switch"); end
    for (int s = 0; s < 6; s++) begin
      checks++; if (sec_seen[s] == 0) begin failures++; $display("FAIL sector %0d never used", s + 1); end
    end
    for (int h = 0; h < 24; h++) begin
      bit corner;
      corner = (h < 18) && (h % 3 == 0);
      if (1) begin
        checks++;
        if (hex_osv[h] == 0) begin failures++; $display("FAIL OSVPWM never used hexagon %0d", h); end
        if (!corner) begin
          checks++;
          if (hex_fosv[h] == 0) begin failures++; $display("FAIL FOSVPWM never used hexagon %0d", h); end
        end
      end
      if (corner) begin
        checks++;
        if (hex_fosv[h] != 0) begin failures++; $display("FAIL FOSVPWM used corner hexagon %0d", h); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
