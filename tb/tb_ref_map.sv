// tb_ref_map - checks the origin shift of the reference for all 24
// hexagons against centres computed from polar geometry (3E on the axes,
// sqrt(7)E at atan(sqrt(3)/5) from them, E for the inner hexagons), and
// checks that the lower zero-vector state lies on the centre with room for
// the upper state (every level of base and base+1 within -2..+2).
module tb_ref_map;
  import svpwm_pkg::*;

  hex_t   hex;
  coord_t alpha5, betap5, alpha2, betap2;
  state_t base;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  ref_map dut (.hex(hex), .alpha5(alpha5), .betap5(betap5),
               .alpha2(alpha2), .betap2(betap2), .base(base));

  localparam real PI = 3.14159265358979;

  task automatic centre(input int h, output real ca, output real cb);
    real r, ang;
    if (h >= 18) begin
      r = 1.0; ang = 60.0 * (h - 18);
    end else if (h % 3 == 0) begin
      r = 3.0; ang = 20.0 * h;
    end else begin
      r = $sqrt(7.0);
      ang = 60.0 * (h / 3) + ((h % 3 == 1) ? 1.0 : -1.0) * $atan($sqrt(3.0) / 5.0) * 180.0 / PI
            + ((h % 3 == 2) ? 60.0 : 0.0);
    end
    ca = r * $cos(ang * PI / 180.0);
    cb = r * $sin(ang * PI / 180.0);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ca, cb, ea, eb, ba, bb;
    int  la, lb, lc;
    for (int h = 0; h < 24; h++) begin
      hex = hex_t'(h);
      centre(h, ca, cb);
      for (int n = 0; n < 20; n++) begin
        alpha5 = coord_t'($signed($urandom_range(32768)) - 16384);
        betap5 = coord_t'($signed($urandom_range(40000)) - 20000);
        #1;
        ea = real'(alpha5) / 4096.0 - ca;
        eb = real'(betap5) / 4096.0 - cb * 2.0 / $sqrt(3.0);
        checks++;
        if (rabs(real'(alpha2) / 4096.0 - ea) > 1e-3 || rabs(real'(betap2) / 4096.0 - eb) > 1e-3) begin
          failures++;
          $display("FAIL hex %0d: got (%f,%f) exp (%f,%f)", h,
                   real'(alpha2) / 4096.0, real'(betap2) / 4096.0, ea, eb);
        end
      end
      la = int'(base.a); lb = int'(base.b); lc = int'(base.c);
      ba = real'(la) - real'(lb + lc) / 2.0;
      bb = $sqrt(3.0) / 2.0 * real'(lb - lc);
      checks++;
      if (rabs(ba - ca) > 1e-6 || rabs(bb - cb) > 1e-6 ||
          la < -2 || lb < -2 || lc < -2 || la > 1 || lb > 1 || lc > 1) begin
        failures++;
        $display("FAIL hex %0d base (%0d,%0d,%0d) at (%f,%f), centre (%f,%f)",
                 h, la, lb, lc, ba, bb, ca, cb);
      end
    end
    // the OH1 zero states printed for sector I: P1N2N2 and P2N1N1
    hex = OH1; #1;
    checks++;
    if (base != '{a: 3'sd1, b: -3'sd2, c: -3'sd2}) begin
      failures++;
      $display("FAIL OH1 base");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
