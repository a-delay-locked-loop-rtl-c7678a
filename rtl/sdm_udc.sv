// sdm_udc: the first stage of the multi-rate Sigma-Delta modulator, an
// up/down counter that acts as the accumulator 1/(1-z^-1).
//
// Its input n_sd[k] is two-valued (+1 or -1), so the accumulator reduces to
// a counter that steps once per f_d strobe (en). The count is the phase
// setting of the DLL in units of 2*pi/2^W (W = 8: 1/256 of a VCO cycle).
// The counter wraps modulo 2^W, which gives the phase shifter its unlimited
// range; each wrap is reported on ovf_up (255 -> 0) or ovf_dn (0 -> 255)
// so that the modulator can add the lost whole cycle back into n[k].
//
// Interface and timing: on an en cycle, cnt steps up when up = 1 and down
// when up = 0. ovf_up / ovf_dn are registered levels that are high for the
// whole f_d period after the step that wrapped, and low otherwise; the
// overflow re-alignment path turns them into single pulses. Reset clears
// the count. The counter and its two overflow outputs follow the
// modulator's structure; the level form of the overflow flags and the
// reset value are this design's choices.
module sdm_udc #(
  parameter int unsigned W = dll_pkg::ACC_W
) (
  input  logic         clk,     // f_ref
  input  logic         rst_n,
  input  logic         en,      // f_d strobe
  input  logic         up,      // 1: +1, 0: -1
  output logic [W-1:0] cnt,
  output logic         ovf_up,
  output logic         ovf_dn
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      ovf_up <= 1'b0;
      ovf_dn <= 1'b0;
    end else if (en) begin
      cnt    <= up ? cnt + 1'b1 : cnt - 1'b1;
      ovf_up <= up  && (cnt == '1);
      ovf_dn <= !up && (cnt == '0);
    end
  end

endmodule
