// sdm_ovf_align: carries the up/down counter's overflow flags through the
// clock domains of the modulator and turns each into a one-cycle pulse.
//
// When the phase counter wraps, a whole VCO cycle has to be added to (or
// removed from) the divider sequence at the moment the wrapped value
// reaches the output of the cascade. Each flag therefore passes one DFF in
// every stage domain, clocked exactly like that stage's data register
// (en_ab for the 8-bit stage, en_a for the 5-bit stage, every f_ref cycle
// for the 2-bit stage), so it stays aligned with the data it belongs to. A
// 0->1 detector (a further DFF and an AND of D with the inverted Q) then
// makes a pulse one f_ref cycle long. The flag path and the 0->1 detectors
// follow the modulator's structure; the exact register per domain is read
// from its block diagram.
//
// Timing: a flag that rises at the UDC gives a pulse on up_p / dn_p in the
// f_ref cycle in which the final stage output first reflects the wrapped
// counter value.
module sdm_ovf_align (
  input  logic clk,     // f_ref
  input  logic rst_n,
  input  logic en_a,    // domain of the 5-bit stage
  input  logic en_ab,   // domain of the 8-bit stage
  input  logic ovf_up,  // level from the counter
  input  logic ovf_dn,
  output logic up_p,    // one-cycle pulse
  output logic dn_p
);
  timeunit 1ps; timeprecision 1fs;

  typedef struct packed {
    logic up;
    logic dn;
  } ovf_t;

  ovf_t q_ab, q_a, q_ref, q_det;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_ab  <= '0;
      q_a   <= '0;
      q_ref <= '0;
      q_det <= '0;
    end else begin
      if (en_ab) q_ab <= '{up: ovf_up, dn: ovf_dn};
      if (en_a)  q_a  <= q_ab;
      q_ref <= q_a;
      q_det <= q_ref;
    end
  end

  always_comb begin
    up_p = q_ref.up && !q_det.up;
    dn_p = q_ref.dn && !q_det.dn;
  end

endmodule
