// chb_inverter_model - behavioural model of the five-level cascaded
// H-bridge power stage, for simulation only (not synthesizable intent).
//
// Each phase is two H-bridges in series, each fed from its own source E.
// A bridge outputs +E when S1 and S4 conduct, -E when S2 and S3 conduct and
// 0 when both upper (S1, S2) or both lower (S3, S4) switches conduct. The
// model returns the phase voltage in units of E (-2..+2) and flags a
// shoot-through (both switches of a leg on) or a floating bridge (no
// conducting path). Switch and bridge names follow the gate bundle of
// chb_gate_drive: gate[p][h][s], s = 0..3 for S1..S4.
module chb_inverter_model (
  input  logic [2:0][1:0][3:0] gate,
  output int                   vphase [3],
  output logic                 fault
);

  always_comb begin
    fault = 1'b0;
    for (int p = 0; p < 3; p++) begin
      vphase[p] = 0;
      for (int h = 0; h < 2; h++) begin
        logic s1, s2, s3, s4;
        s1 = gate[p][h][0];
        s2 = gate[p][h][1];
        s3 = gate[p][h][2];
        s4 = gate[p][h][3];
        if ((s1 && s3) || (s2 && s4))      fault = 1'b1;
        else if (s1 && s4)                 vphase[p] += 1;
        else if (s2 && s3)                 vphase[p] -= 1;
        else if ((s1 && s2) || (s3 && s4)) vphase[p] += 0;
        else                               fault = 1'b1;
      end
    end
  end

endmodule
