// dll_top: delay-locked loop whose phase shifter is a fractional-N PLL.
//
// The recovered clock is the VCO of a PLL locked to the received clock
// (clk_in / M at the detector, VCO / (N + n[k]) as feedback, so the VCO runs
// at N/M = 2 times clk_in: 3.2 GHz from 1.6 GHz). Its phase is moved in
// steps of 1/256 of a VCO cycle by the Sigma-Delta modulator: each +1 on
// the modulator input advances the steady-state VCO phase by one step, each
// -1 retards it, without limit in either direction. A bang-bang phase
// detector compares the recovered clock with the received data; its
// early/late decisions are averaged by a saturating integrator and limiter,
// and the sign is sampled once per T_d = 512 reference cycles (about 1 us)
// into the modulator. The slow update lets the PLL (bandwidth about 4 MHz)
// settle after each step. In lock the clock's rising edge sits in the
// middle of each data bit and the detector's bit samples are the retimed
// data.
//
// Digital blocks (prescaler, divider, modulator, sampling flop, detector,
// integrator) are synthesizable; the PFD, charge pump with loop filter and
// the VCO are behavioural models, so this top is a simulation model of the
// whole loop. The architecture, ratios, 8-bit phase resolution and update
// rate are the prototype's; the integrator's saturation level and the
// analog model values are this design's choices.
//
// Interface: clk_in is the received clock, data_in the received data, both
// asynchronous to nothing but each other; rst_n resets all digital state.
// int_n_mode = 1 holds the divider at N (the synthesizer in integer-N mode,
// used to measure the PLL on its own); how that mode is entered is this
// design's choice.
// clk_out is the adjusted clock and rdata the retimed data (one clk_out
// cycle behind the bit-centre sample). The remaining outputs expose the
// loop's internal state for observation.
module dll_top
  import dll_pkg::*;
#(
  parameter int unsigned N        = dll_pkg::N_NOM,
  parameter int unsigned M        = dll_pkg::M_DIV,
  parameter int          INT_SAT  = 64
) (
  input  logic       clk_in,
  input  logic       rst_n,
  input  logic       data_in,
  input  logic       int_n_mode,  // 1: integer-N test mode, divider fixed at N
  output logic       clk_out,
  output logic       rdata,
  output logic       f_ref,       // divider output, modulator clock
  output logic       fd_tick,     // f_d strobe in the f_ref domain
  output logic       n_sd,        // sampled phase command, 1 = advance
  output nk_t        n_k,         // divider modulus offset
  output logic [3:0] modulus,     // current division ratio
  output logic [ACC_W-1:0] phase_code,
  output logic       ovf_up_p,
  output logic       ovf_dn_p,
  output logic       early,
  output logic       late,
  output logic       int_sat
);
  timeunit 1ps; timeprecision 1fs;

  logic ref_clk;
  logic pfd_up, pfd_dn;
  real  vctrl;
  nk_t  n_div;
  logic adv, sat_hi, sat_lo;

  // Reference path: clk_in / M.
  clk_prescaler #(.M(M)) u_presc (.clk_in, .rst_n, .out(ref_clk));

  // Fractional-N PLL.
  pfd_model   u_pfd (.ref_clk, .fb_clk(f_ref), .up(pfd_up), .dn(pfd_dn));
  cp_lf_model u_cplf (.up(pfd_up), .dn(pfd_dn), .vctrl);
  vco_model   u_vco (.vctrl, .clk(clk_out));
  mmd_divider #(.N(N)) u_div (.clk(clk_out), .rst_n, .n(n_div), .out(f_ref), .modulus);

  // Integer-N test mode: the modulator keeps running but the divider
  // ignores it, so the clock phase stays where it is.
  assign n_div = int_n_mode ? nk_t'(0) : n_k;

  sdm_multirate u_sdm (
    .clk(f_ref), .rst_n, .n_sd, .fd_tick, .n(n_k), .phase_code, .ovf_up_p, .ovf_dn_p);

  // Data side: detector, integrator with limiter, T_d sampling flop.
  bbpd u_bbpd (.clk(clk_out), .rst_n, .data(data_in), .rdata, .early, .late);

  bb_integrator #(.SAT(INT_SAT)) u_int (
    .clk(clk_out), .rst_n, .early, .late, .adv, .sat_hi, .sat_lo);

  assign int_sat = sat_hi | sat_lo;

  nsd_sampler u_samp (.clk(f_ref), .rst_n, .en(fd_tick), .d(adv), .q(n_sd));

endmodule
