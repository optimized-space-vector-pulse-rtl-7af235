// tb_sector_dwell - random two-level references, inside and outside the
// hexagon, against the sine form of the dwell times:
//   Ta = Ts*m*sin(60deg - th), Tb = Ts*m*sin(th), T0 = Ts - Ta - Tb,
// with th the angle within the sector and m = 2|V|/(sqrt(3)E), evaluated in
// real arithmetic from the polar form of the reference. Out-of-hexagon
// references must be flagged and still give Ta + Tb + T0 = Ts.
module tb_sector_dwell;
  import svpwm_pkg::*;

  localparam int unsigned TS = 33333;
  localparam int unsigned TW = $clog2(TS + 1);
  localparam real PI = 3.14159265358979;

  coord_t alpha2, betap2;
  logic [2:0] sector;
  logic [TW-1:0] ta, tb, t0;
  logic clamped;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  int seen_sector [6];
  int n_clamped = 0;

  sector_dwell #(.TS_CYCLES(TS)) dut (
    .alpha2(alpha2), .betap2(betap2), .sector(sector),
    .ta(ta), .tb(tb), .t0(t0), .clamped(clamped));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r, ang, al, be, th, m, eta, etb;
    int  es;
    for (int n = 0; n < 4000; n++) begin
      r   = real'($urandom_range(1300)) / 1000.0;       // 0 .. 1.3 E
      ang = real'($urandom_range(359999)) / 1000.0;
      al  = r * $cos(ang * PI / 180.0);
      be  = r * $sin(ang * PI / 180.0);
      alpha2 = coord_t'($rtoi($floor(al * 4096.0 + 0.5)));
      betap2 = coord_t'($rtoi($floor(be * 2.0 / $sqrt(3.0) * 4096.0 + 0.5)));
      #1;
      // expected values from the quantized inputs
      al  = real'(alpha2) / 4096.0;
      be  = real'(betap2) / 4096.0 * $sqrt(3.0) / 2.0;
      ang = $atan2(be, al) * 180.0 / PI;
      if (ang < 0.0) ang += 360.0;
      es  = int'($floor(ang / 60.0)) % 6;
      th  = (ang - 60.0 * es) * PI / 180.0;
      m   = 2.0 * $sqrt(al * al + be * be) / $sqrt(3.0);
      eta = real'(TS) * m * $sin(PI / 3.0 - th);
      etb = real'(TS) * m * $sin(th);
      // skip exact sector boundaries where rounding may pick either side
      if (rabs(ang - 60.0 * $floor(ang / 60.0 + 0.5)) < 0.01) continue;
      seen_sector[es]++;
      checks++;
      if (int'(sector) != es) begin
        failures++;
        $display("FAIL sector: ang=%f got %0d exp %0d", ang, sector, es);
      end
      checks++;
      if (32'(ta) + 32'(tb) + 32'(t0) != TS) begin
        failures++;
        $display("FAIL sum %0d+%0d+%0d", ta, tb, t0);
      end
      if (eta + etb <= real'(TS) - 20.0) begin
        checks++;
        if (clamped || rabs(real'(ta) - eta) > 20.0 || rabs(real'(tb) - etb) > 20.0) begin
          failures++;
          $display("FAIL dwell ang=%f m=%f: got ta=%0d tb=%0d exp %f %f clamped=%0b",
                   ang, m, ta, tb, eta, etb, clamped);
        end
      end else if (eta + etb > real'(TS) + 20.0) begin
        n_clamped++;
        checks++;
        if (!clamped || t0 != 0) begin
          failures++;
          $display("FAIL overrange ang=%f m=%f not clamped (ta=%0d tb=%0d t0=%0d)",
                   ang, m, ta, tb, t0);
        end
      end
    end
    // a reference at a vertex: all time on that vertex
    alpha2 = coord_t'(4096); betap2 = '0; #1;
    checks++;
    if (ta != TW'(TS) || tb != 0 || t0 != 0 || sector != 0) begin
      failures++; $display("FAIL vertex 0");
    end
    // the hexagon centre: all zero time
    alpha2 = '0; betap2 = '0; #1;
    checks++;
    if (t0 != TW'(TS)) begin failures++; $display("FAIL centre"); end
    for (int s = 0; s < 6; s++) begin
      checks++;
      if (seen_sector[s] == 0) begin failures++; $display("FAIL sector %0d never hit", s); end
    end
    checks++;
    if (n_clamped == 0) begin failures++; $display("FAIL no clamped case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
