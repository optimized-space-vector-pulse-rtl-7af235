// tb_ref_gen - steps the reference generator through two output periods at
// several modulation indices and checks the angle sequence (12 degrees per
// sample at 50 Hz / 1.5 kHz), the magnitude Ma*2*sqrt(3)*E and the alpha
// and betap components against real-valued cosine and sine, and the
// 18-cycle latency from step to valid.
module tb_ref_gen;
  import svpwm_pkg::*;

  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, step = 0;
  logic [MA_W-1:0] ma;
  angle_t theta;
  coord_t mag, alpha, betap;
  logic valid;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  ref_gen dut (.clk(clk), .rst_n(rst_n), .step(step), .ma(ma), .theta(theta),
               .mag(mag), .alpha(alpha), .betap(betap), .valid(valid));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real mas [5] = '{0.2, 0.4, 0.6, 0.8, 1.0};

  initial begin
    int lat, k;
    real r, ea, eb;
    k = 0;
    ma = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mi = 0; mi < 5; mi++) begin
      ma = 16'($rtoi(mas[mi] * 32768.0));
      for (int s = 0; s < 60; s++) begin
        @(negedge clk) step = 1;
        @(negedge clk) step = 0;
        lat = 1;
        while (!valid && lat < 40) begin
          @(negedge clk);
          lat++;
        end
        checks++;
        if (lat != 18) begin
          failures++; $display("FAIL latency %0d", lat);
        end
        checks++;
        if (int'(theta) != (k * 192) % 5760) begin
          failures++; $display("FAIL theta %0d exp %0d", theta, (k * 192) % 5760);
        end
        r  = real'(ma) / 32768.0 * 2.0 * $sqrt(3.0);
        ea = r * $cos(real'(k * 12) * PI / 180.0);
        eb = r * $sin(real'(k * 12) * PI / 180.0) * 2.0 / $sqrt(3.0);
        checks++;
        if (rabs(real'(mag) / 4096.0 - r) > 2e-3 ||
            rabs(real'(alpha) / 4096.0 - ea) > 2e-3 ||
            rabs(real'(betap) / 4096.0 - eb) > 2e-3) begin
          failures++;
          $display("FAIL k=%0d ma=%f: mag=%f alpha=%f betap=%f exp %f %f %f", k,
                   mas[mi], real'(mag) / 4096.0, real'(alpha) / 4096.0,
                   real'(betap) / 4096.0, r, ea, eb);
        end
        k++;
        repeat (5) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
