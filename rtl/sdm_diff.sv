// sdm_diff: the differentiator 1 - z^-1 at the output of the modulator and
// the adders that fold in the overflow pulses, giving n[k].
//
// The one-bit output c of the last first-order stage is differentiated
// (m[k] = c[k] - c[k-1]); the up-overflow pulse adds +1 and the
// down-overflow pulse -1. The result is the divider modulus offset n[k]. As
// the overflow pulses arrive exactly when the wrapped phase setting appears
// in c, the sum stays within the three levels -1, 0, +1; an assertion
// checks this. Structure follows the modulator's block diagram; the output
// register is this design's choice.
//
// Timing: n is registered, so n[k] reflects c and the pulses of the
// previous f_ref cycle.
module sdm_diff (
  input  logic          clk,    // f_ref
  input  logic          rst_n,
  input  logic          c,      // one-bit output of the last stage
  input  logic          up_p,
  input  logic          dn_p,
  output dll_pkg::nk_t  n
);
  timeunit 1ps; timeprecision 1fs;

  logic c_q;
  logic signed [2:0] sum;

  always_comb
    sum = $signed({2'b00, c}) - $signed({2'b00, c_q})
        + $signed({2'b00, up_p}) - $signed({2'b00, dn_p});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q <= 1'b0;
      n   <= '0;
    end else begin
      c_q <= c;
      n   <= sum[1:0];
      assert (sum >= -3'sd1 && sum <= 3'sd1)
        else $error("sdm_diff: n[k] out of the three levels (%0d)", sum);
    end
  end

endmodule
