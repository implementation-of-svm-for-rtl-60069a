// chmi_power_stage_model - behavioural model (not synthesizable intent) of the
// three-phase cascaded H-bridge power stage, used only by testbenches.
//
// Each phase is a series string of CELLS H-bridge cells. A cell whose S1 and S4
// conduct adds +1 cell voltage to the phase, S2 and S3 give -1, and both upper
// (S1, S3) or both lower (S2, S4) switches give 0. The model reports the phase
// voltage in units of the cell DC voltage, flags a leg whose upper and lower
// IGBT conduct together (shoot-through) and a cell with no valid state (e.g.
// all off, where the output would follow the load current).
module chmi_power_stage_model #(
  parameter int unsigned CELLS = 2
) (
  input  logic [3*CELLS*4-1:0] gates,
  output int                   level [3],
  output logic                 shoot_through,
  output logic                 undefined_state
);
  import chmi_svm_pkg::*;

  always_comb begin
    shoot_through   = 1'b0;
    undefined_state = 1'b0;
    for (int p = 0; p < 3; p++) begin
      level[p] = 0;
      for (int c = 0; c < int'(CELLS); c++) begin
        hbridge_gates_t g;
        g = gates[(p * CELLS + c) * 4 +: 4];
        if ((g.s1 && g.s2) || (g.s3 && g.s4)) shoot_through = 1'b1;
        unique case (g)
          4'b1001: level[p] += 1;   // S4, S1
          4'b0110: level[p] -= 1;   // S3, S2
          4'b0101, 4'b1010: ;       // S3+S1 or S4+S2: zero
          default: undefined_state = 1'b1;
        endcase
      end
    end
  end
endmodule
