// nsd_sampler: the D flip-flop that samples the limited integrator output
// once every T_d = 1/f_d and presents it as the SDM input n_sd[k].
//
// Sampling at the slow rate f_d lets the fractional-N PLL settle after each
// one-step phase change before the next one. The flop runs in the f_ref
// domain and loads only on the f_d strobe, so n_sd is constant for a whole
// T_d. The sampling at T_d follows the DLL's block diagram; the reset value
// 0 and the enable form are this design's choices.
//
// Timing: q takes the value of d present in the f_ref cycle where en = 1.
module nsd_sampler (
  input  logic clk,     // f_ref
  input  logic rst_n,
  input  logic en,      // f_d strobe
  input  logic d,       // limiter output, 1 = advance
  output logic q        // n_sd
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (en) q <= d;
  end

endmodule
