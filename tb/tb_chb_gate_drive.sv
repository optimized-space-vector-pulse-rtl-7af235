// tb_chb_gate_drive - exhaustive test of the level-to-gate mapping.
// Drives all 125 five-level states and checks, through the power-stage
// model, that each phase voltage equals its level, that no leg is shorted
// and that each bridge conducts.
module tb_chb_gate_drive;
  import svpwm_pkg::*;

  state_t               levels;
  logic [2:0][1:0][3:0] gate;
  int                   vphase [3];
  logic                 fault;
  int checks = 0, failures = 0;

  chb_gate_drive dut (.levels(levels), .gate(gate));
  chb_inverter_model pwr (.gate(gate), .vphase(vphase), .fault(fault));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -2; a <= 2; a++)
      for (int b = -2; b <= 2; b++)
        for (int c = -2; c <= 2; c++) begin
          levels = '{a: level_t'(a), b: level_t'(b), c: level_t'(c)};
          #1;
          checks++;
          if (fault || vphase[0] != a || vphase[1] != b || vphase[2] != c) begin
            failures++;
            $display("FAIL state (%0d,%0d,%0d): v=(%0d,%0d,%0d) fault=%0b",
                     a, b, c, vphase[0], vphase[1], vphase[2], fault);
          end
          // H1 carries the first level step, H2 the second
          for (int p = 0; p < 3; p++) begin
            int l;
            l = (p == 0) ? a : (p == 1) ? b : c;
            checks++;
            if ((l == 1 && gate[p][1] != 4'b0011) || (l == -1 && gate[p][1] != 4'b0011)) begin
              failures++;
              $display("FAIL level %0d on phase %0d uses H2", l, p);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
