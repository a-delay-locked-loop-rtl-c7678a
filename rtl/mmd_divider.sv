// mmd_divider: the multi-modulus divider of the fractional-N loop, dividing
// the VCO clock by N-1, N or N+1 (5, 6 or 7 for N = 6).
//
// Each division cycle counts N + n VCO cycles, with n in {-1, 0, +1} taken
// from the Sigma-Delta modulator at the start of the cycle. Lengthening one
// cycle by a VCO period delays the divider output by one VCO period; the PLL
// answers by advancing the VCO by one period, which is how n[k] moves the
// VCO phase. The output is high for the first N/2 VCO cycles of each
// division cycle, so its rising edge marks the cycle start; it is the
// reference-rate clock f_ref for the phase detector and the modulator.
// The 5/6/7 range is the prototype's; the counter structure and output
// duty are this design's choices (the circuit itself is not given).
//
// Reset starts a division cycle of length N with out high.
// Timing: n is read in the last VCO cycle of a division cycle, i.e. at
// least N/2 VCO cycles after the rising edge of out on which the modulator
// updated it.
module mmd_divider
  import dll_pkg::*;
#(
  parameter int unsigned N = dll_pkg::N_NOM
) (
  input  logic clk,       // VCO clock
  input  logic rst_n,
  input  nk_t  n,         // modulus offset
  output logic out,       // f_ref
  output logic [3:0] modulus  // modulus of the current cycle (observation)
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned HIGH = N / 2;

  logic [3:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      modulus <= 4'(N);
      out     <= 1'b1;
    end else begin
      if (cnt == modulus - 4'd1) begin
        cnt     <= '0;
        modulus <= 4'($signed(5'(N)) + 5'(n));
        out     <= 1'b1;
      end else begin
        cnt <= cnt + 4'd1;
        out <= (cnt + 4'd1) < 4'(HIGH);
      end
    end
  end

  initial assert (N >= 3 && N <= 14) else $error("mmd_divider: N out of range");

endmodule
