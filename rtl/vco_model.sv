// vco_model: behavioural model of the ring-oscillator VCO; not
// synthesizable logic.
//
// The oscillator is an ideal integrator of its control voltage: its
// frequency is F0 + KV * vctrl, clamped to [F_MIN, F_MAX], and the output
// toggles every half period of the current frequency. With the defaults
// (Kv = 140 MHz/V, the measured gain) a control voltage of 0.5 V gives the
// nominal 3.2 GHz. Phase noise is not modelled. The gain and the nominal
// frequency are the prototype's; F0 and the clamp limits are this model's
// choices.
//
// Interface: vctrl in volts, clk the oscillator output.
module vco_model #(
  parameter real F0    = 3.13e9,   // Hz at vctrl = 0
  parameter real KV    = 140.0e6,  // Hz per V
  parameter real F_MIN = 2.5e9,
  parameter real F_MAX = 4.0e9
) (
  input  real  vctrl,
  output logic clk
);
  timeunit 1ps; timeprecision 1fs;

  real f;

  initial clk = 1'b0;

  always begin
    f = F0 + KV * vctrl;
    if (f < F_MIN) f = F_MIN;
    if (f > F_MAX) f = F_MAX;
    #(0.5e12 / f);
    clk = ~clk;
  end

endmodule
