// dll_pkg: constants and types shared by the synthesizer-based DLL.
//
// The DLL shifts the phase of a 3.2 GHz recovered clock by steering the
// fractional-N divider of a PLL with a Sigma-Delta modulator (SDM). The
// numbers below are the prototype's: the input clock is divided by M = 3,
// the VCO by N-1/N/N+1 with N = 6 (so the VCO runs at twice the input
// clock), the SDM has 8 fractional bits (phase step 2*pi/256, about 1.4
// degrees), and the SDM input is updated at f_d = f_ref/512 through a
// /2, /8, /32 divider chain. The intermediate SDM word widths 5 and 2 are
// those of the multi-rate cascade.
package dll_pkg;
  timeunit 1ps; timeprecision 1fs;

  // Nominal divider modulus N and input prescaler M (output = in * N/M).
  localparam int unsigned N_NOM = 6;
  localparam int unsigned M_DIV = 3;

  // Fractional bits of the phase setting and of the cascaded SDM stages.
  localparam int unsigned ACC_W    = 8;
  localparam int unsigned S1_OUT_W = 5;
  localparam int unsigned S2_OUT_W = 2;

  // SDM clock chain: f_ref /2 -> /8 -> /32, so f_d = f_ref / 512.
  localparam int unsigned DIV_A = 2;
  localparam int unsigned DIV_B = 8;
  localparam int unsigned DIV_C = 32;

  // Divider modulus offset n[k] in {-1, 0, +1}.
  typedef logic signed [1:0] nk_t;

endpackage
