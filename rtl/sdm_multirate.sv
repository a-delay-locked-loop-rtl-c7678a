// sdm_multirate: the multi-rate second-order Sigma-Delta modulator that
// drives the fractional-N divider of the DLL's phase shifter.
//
// A second-order noise transfer function (1-z^-1)^2 is obtained as
// accumulator -> first-order SDM -> differentiator: the accumulator and
// differentiator cancel in the signal path (STF z^-1) while the
// differentiator adds a second zero at DC to the first-order noise shaping.
// Because the input n_sd[k] only changes at f_d = f_ref/512, the
// accumulator is an 8-bit up/down counter stepping at f_d, and the
// first-order SDM is split into three stages running at rising rates:
// 8 -> 5 bits at f_ref/16, 5 -> 2 bits at f_ref/2 and 2 -> 1 bit at f_ref.
// Only the last stage and the differentiator run at the full f_ref. Counter
// wraps are carried as overflow flags through one register per domain and
// added to the output, so the phase setting can rotate without limit while
// n[k] stays within -1, 0, +1.
//
// Interface: n_sd (1 = +1, 0 = -1) is read on the fd_tick cycle; n is the
// divider offset for the next division cycle; phase_code is the counter
// value (phase setting in 1/256 VCO cycles). Timing: a change of the phase
// setting reaches n after one f_d step plus the stage latencies (16 + 2 +
// 1 + 1 f_ref cycles). The structure, stage widths and clock ratios are the
// modulator's; clock enables instead of divided clocks and the extra
// integer bit on the inter-stage buses are this design's choices.
module sdm_multirate #(

  parameter int unsigned ACC_W    = dll_pkg::ACC_W,
  parameter int unsigned S1_OUT_W = dll_pkg::S1_OUT_W,
  parameter int unsigned S2_OUT_W = dll_pkg::S2_OUT_W,
  parameter int unsigned DIV_A    = dll_pkg::DIV_A,
  parameter int unsigned DIV_B    = dll_pkg::DIV_B,
  parameter int unsigned DIV_C    = dll_pkg::DIV_C
) (
  input  logic             clk,        // f_ref
  input  logic             rst_n,
  input  logic             n_sd,
  output logic             fd_tick,
  output dll_pkg::nk_t     n,
  output logic [ACC_W-1:0] phase_code,
  output logic             ovf_up_p,   // overflow pulses (observation)
  output logic             ovf_dn_p
);
  timeunit 1ps; timeprecision 1fs;

  logic en_a, en_ab;
  logic ovf_up, ovf_dn;
  logic [S1_OUT_W:0] y1;
  logic [S2_OUT_W:0] y2;
  logic [0:0]        c;

  sdm_clkdiv #(.DIV_A(DIV_A), .DIV_B(DIV_B), .DIV_C(DIV_C)) u_clkdiv (
    .clk, .rst_n, .en_a, .en_ab, .en_abc(fd_tick));

  sdm_udc #(.W(ACC_W)) u_udc (
    .clk, .rst_n, .en(fd_tick), .up(n_sd), .cnt(phase_code), .ovf_up, .ovf_dn);

  // 8 -> 5 bits at f_ref/16
  sdm_stage #(.IN_W(ACC_W), .OUT_W(S1_OUT_W)) u_stage1 (
    .clk, .rst_n, .en(en_ab), .x({1'b0, phase_code}), .y(y1));

  // 5 -> 2 bits at f_ref/2
  sdm_stage #(.IN_W(S1_OUT_W), .OUT_W(S2_OUT_W)) u_stage2 (
    .clk, .rst_n, .en(en_a), .x(y1), .y(y2));

  // 2 -> 1 bit at f_ref
  sdm_stage #(.IN_W(S2_OUT_W), .OUT_W(0)) u_stage3 (
    .clk, .rst_n, .en(1'b1), .x(y2), .y(c));

  sdm_ovf_align u_ovf (
    .clk, .rst_n, .en_a, .en_ab, .ovf_up, .ovf_dn, .up_p(ovf_up_p), .dn_p(ovf_dn_p));

  sdm_diff u_diff (
    .clk, .rst_n, .c(c[0]), .up_p(ovf_up_p), .dn_p(ovf_dn_p), .n);

endmodule
