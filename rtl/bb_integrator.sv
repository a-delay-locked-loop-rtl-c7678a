// bb_integrator: saturating integrator and limiter between the bang-bang
// phase detector and the phase shifter.
//
// The detector's three-level output (late = +1, early = -1, no transition =
// 0) is summed in a signed counter that saturates at +/-SAT, averaging the
// noisy decisions; the limiter passes on only the sign of the sum, a
// two-level signal (1 = advance the clock, 0 = retard it) that the f_d
// sampling flop feeds to the modulator. This is a discrete-time equivalent
// of the prototype's current pump, capacitor and inverter limiter, clocked
// by the recovered clock; the saturation level SAT and the counter form
// are this design's choices.
//
// Timing: acc updates on every rising clock edge; adv follows acc
// combinationally (adv = 1 when acc >= 0). sat_hi / sat_lo flag the
// saturated states.
module bb_integrator #(
  parameter int SAT = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic early,
  input  logic late,
  output logic adv,
  output logic sat_hi,
  output logic sat_lo
);
  timeunit 1ps; timeprecision 1fs;

  localparam int W = $clog2(SAT + 1) + 1;

  logic signed [W-1:0] acc;

  always_comb begin
    adv    = (acc >= 0);
    sat_hi = (acc == W'(SAT));
    sat_lo = (acc == -W'(SAT));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else if (late && !early && !sat_hi)  acc <= acc + 1'b1;
    else if (early && !late && !sat_lo)  acc <= acc - 1'b1;
  end

endmodule
