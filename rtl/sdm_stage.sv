// sdm_stage: one first-order Sigma-Delta requantizer of the multi-rate
// cascade (8 -> 5, 5 -> 2 and 2 -> 1 bits in the prototype).
//
// The input is a fraction x / 2^IN_W of a VCO cycle, the output the same
// quantity with OUT_W fractional bits. Each update adds the residue kept
// from the previous update, outputs the top bits of the sum and keeps the
// low R = IN_W - OUT_W bits as the new residue (error feedback). The output
// is therefore the input delayed by one update plus quantization error
// shaped by (1 - z^-1), the STF z^-1 / NTF 1 - z^-1 of a first-order
// modulator. A fraction close to 1 can round up to exactly 1.0, so both
// buses carry one integer bit above their fractional bits: the input is
// IN_W+1 bits wide (0 .. 2^IN_W) and the output OUT_W+1 bits (0 .. 2^OUT_W).
// For the last stage (OUT_W = 0) the output is the single carry bit.
//
// Timing: x is sampled and y, the residue, updated on each cycle with
// en = 1, so y holds the result for one en period. The error-feedback
// requantizer and the extra integer bit are this design's reading of the
// stage; the widths are the cascade's.
module sdm_stage #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [IN_W:0]    x,     // 0 .. 2^IN_W
  output logic [OUT_W:0]   y      // 0 .. 2^OUT_W
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned R = IN_W - OUT_W;

  logic [R-1:0] res;
  logic [IN_W:0] sum;

  always_comb sum = x + (IN_W + 1)'(res);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res <= '0;
      y   <= '0;
    end else if (en) begin
      res <= sum[R-1:0];
      y   <= sum[IN_W:R];
    end
  end

  initial begin
    assert (IN_W > OUT_W) else $error("sdm_stage: IN_W must exceed OUT_W");
  end

endmodule
