// cp_lf_model: behavioural model of the charge pump, loop filter and
// level-shifting source follower that produce the VCO control voltage;
// not synthesizable logic.
//
// At the end of each detector pulse pair the net charge, proportional to
// the width difference w = t(up) - t(dn) in picoseconds, is applied to a
// second-order loop filter modelled in the phase domain: the integrating
// capacitor adds KI * w to its voltage, and the series resistor adds a
// proportional term KP * w that lasts until the next update. The source
// follower subtracts a constant VSHIFT. The defaults set a loop bandwidth of
// about 4 MHz for a 533 MHz reference, a 3.2 GHz VCO with 140 MHz/V gain
// and N = 6: the loop gain per reference cycle is N * (T_vco^2 * Kv) * KP
// = 0.047 = 2*pi*4 MHz/533 MHz. The bandwidth is the prototype's; the
// filter's component values are not given, so KP, KI and the initial
// voltage are this model's choices.
//
// Interface: up and dn from the detector, vctrl (volts) to the VCO.
module cp_lf_model #(
  parameter real KP     = 5.7e-4,  // V per ps of phase error (resistor)
  parameter real KI     = 3.6e-5,  // V per ps of phase error (capacitor)
  parameter real V_INIT = 1.0,     // filter voltage at start
  parameter real VSHIFT = 0.5      // source-follower level shift
) (
  input  logic up,
  input  logic dn,
  output real  vctrl
);
  timeunit 1ps; timeprecision 1fs;

  realtime t_up, t_dn;
  real     v_int;
  logic    any_on;

  assign any_on = up | dn;

  initial begin
    t_up  = 0.0;
    t_dn  = 0.0;
    v_int = V_INIT;
    vctrl = V_INIT - VSHIFT;
  end

  always @(posedge up) t_up = $realtime;
  always @(posedge dn) t_dn = $realtime;

  // Both pulses end together; the width difference is t_dn - t_up.
  always @(negedge any_on) begin
    real w;
    w     = t_dn - t_up;
    v_int = v_int + KI * w;
    vctrl = v_int + KP * w - VSHIFT;
  end

endmodule
