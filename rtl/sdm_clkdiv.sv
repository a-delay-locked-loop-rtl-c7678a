// sdm_clkdiv: the /2, /8, /32 clock chain of the multi-rate Sigma-Delta
// modulator, built as clock-enable strobes in the f_ref domain.
//
// The modulator runs its stages at f_ref, f_ref/2, f_ref/16 and f_ref/512
// (= f_d, the update rate of the phase command). Instead of deriving new
// clocks, this block counts f_ref cycles in three cascaded counters (modulo
// DIV_A, DIV_B, DIV_C) and raises en_a, en_ab and en_abc for exactly one
// f_ref cycle at the end of each slow period. The strobes nest: en_abc
// implies en_ab implies en_a, so every register of a slower stage updates
// on the same f_ref edge as the faster stages, which is the in-phase edge
// alignment a ripple divider chain would give. The ratios follow the
// modulator's clock chain; implementing them as enables rather than
// divided clocks is this design's choice.
//
// Timing: en_a is high one cycle in DIV_A, en_ab one in DIV_A*DIV_B and
// en_abc one in DIV_A*DIV_B*DIV_C, the first strobes DIV_x-1 cycles after
// reset.
module sdm_clkdiv #(
  parameter int unsigned DIV_A = dll_pkg::DIV_A,
  parameter int unsigned DIV_B = dll_pkg::DIV_B,
  parameter int unsigned DIV_C = dll_pkg::DIV_C
) (
  input  logic clk,     // f_ref
  input  logic rst_n,   // asynchronous, active low
  output logic en_a,    // f_ref / DIV_A
  output logic en_ab,   // f_ref / (DIV_A*DIV_B)
  output logic en_abc   // f_ref / (DIV_A*DIV_B*DIV_C) = f_d
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned WA = (DIV_A > 1) ? $clog2(DIV_A) : 1;
  localparam int unsigned WB = (DIV_B > 1) ? $clog2(DIV_B) : 1;
  localparam int unsigned WC = (DIV_C > 1) ? $clog2(DIV_C) : 1;

  logic [WA-1:0] cnt_a;
  logic [WB-1:0] cnt_b;
  logic [WC-1:0] cnt_c;

  always_comb begin
    en_a   = (cnt_a == WA'(DIV_A - 1));
    en_ab  = en_a  && (cnt_b == WB'(DIV_B - 1));
    en_abc = en_ab && (cnt_c == WC'(DIV_C - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_a <= '0;
      cnt_b <= '0;
      cnt_c <= '0;
    end else begin
      cnt_a <= en_a ? '0 : cnt_a + 1'b1;
      if (en_a)  cnt_b <= (cnt_b == WB'(DIV_B - 1)) ? '0 : cnt_b + 1'b1;
      if (en_ab) cnt_c <= (cnt_c == WC'(DIV_C - 1)) ? '0 : cnt_c + 1'b1;
    end
  end

endmodule
