// clk_prescaler: the /M divider that turns the received clock into the PLL
// reference (M = 3: 1.6 GHz -> 533 MHz).
//
// Together with the /N divider in the loop, this sets the output clock to
// N/M times the input clock (x2 for N = 6, M = 3), which is what lets the
// DLL serve double-data-rate links without a 50 % duty cycle on the input.
// A counter modulo M drives the output high for the first M/2 (rounded
// down, at least one) input cycles of each period; only its rising edge is
// used. M is the prototype's; the counter form is this design's choice.
//
// Timing: one rising edge of out every M cycles of clk_in.
module clk_prescaler #(
  parameter int unsigned M = dll_pkg::M_DIV
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic out
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned W    = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned HIGH = (M / 2 > 0) ? M / 2 : 1;

  logic [W-1:0] cnt;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      out <= 1'b0;
    end else begin
      if (cnt == W'(M - 1)) begin
        cnt <= '0;
        out <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
        out <= (32'(cnt) + 1) < HIGH;
      end
    end
  end

endmodule
