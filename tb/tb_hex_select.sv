// tb_hex_select - sweeps every angle step of a full turn, for a magnitude
// inside and outside the 2E circle and for both techniques, and compares
// the selected hexagon with the selection tables written out as lists of
// ranges in degrees. Also checks the region threshold at and around 2E.
module tb_hex_select;
  import svpwm_pkg::*;

  mode_t  mode;
  angle_t theta;
  coord_t mag;
  hex_t   hex;
  logic   outer;
  int checks = 0, failures = 0;

  hex_select dut (.mode(mode), .theta(theta), .mag(mag), .hex(hex), .outer(outer));

  // Outer hexagons, OSVPWM: upper bounds (degrees) of OH1..OH18 from -15.
  int osv_hi [18] = '{15, 30, 45, 75, 90, 105, 135, 150, 165, 195, 210, 225,
                      255, 270, 285, 315, 330, 345};
  // Outer hexagons, FOSVPWM: hexagon number per 30-degree range from 0.
  int fosv_hex [12] = '{2, 3, 5, 6, 8, 9, 11, 12, 14, 15, 17, 18};

  function automatic int expect_hex(input int m, input real d, input bit out);
    real dd;
    if (!out) begin
      dd = d + 30.0;
      if (dd >= 360.0) dd -= 360.0;
      return 18 + int'($floor(dd / 60.0));          // IH1 = 18
    end
    if (m == 0) begin
      dd = d + 15.0;                               // make OH1 start at 0
      if (dd >= 360.0) dd -= 360.0;
      for (int i = 0; i < 18; i++)
        if (dd < real'(osv_hi[i] + 15)) return i;
      return 0;
    end
    return fosv_hex[int'($floor(d / 30.0))] - 1;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int m = 0; m < 2; m++) begin
      mode = mode_t'(m);
      for (int r = 0; r < 2; r++) begin
        mag = (r == 0) ? coord_t'(8191) : coord_t'(8192 + 4000);
        for (int t = 0; t < 5760; t++) begin
          theta = angle_t'(t);
          #1;
          e = expect_hex(m, real'(t) / 16.0, r == 1);
          checks++;
          if (int'(hex) != e || outer != (r == 1)) begin
            failures++;
            if (failures < 20)
              $display("FAIL mode=%0d mag=%0d theta=%0d/16: hex=%0d outer=%0b exp=%0d",
                       m, mag, t, hex, outer, e);
          end
        end
      end
    end
    // region threshold
    mode = MODE_OSVPWM; theta = '0;
    mag = coord_t'(8192); #1; checks++; if (!outer) failures++;
    mag = coord_t'(0);    #1; checks++; if (outer)  failures++;
    mag = coord_t'(14189);#1; checks++; if (!outer) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
