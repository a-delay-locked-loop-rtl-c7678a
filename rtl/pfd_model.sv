// pfd_model: behavioural model of the phase-frequency detector of the
// fractional-N loop; not synthesizable logic.
//
// The prototype uses an XOR-type detector in current-mode logic whose
// circuit is not given here; this model behaves as an ideal three-state
// phase-frequency detector. A rising edge of ref raises up, a rising edge
// of fb raises dn, and once both are high they are cleared together after
// T_RST picoseconds. The difference of the two pulse widths is the phase
// error. The model's ports are the detector's two clock inputs and its two
// charge-pump control outputs.
module pfd_model #(
  parameter real T_RST = 20.0   // reset delay in ps
) (
  input  logic ref_clk,
  input  logic fb_clk,
  output logic up,
  output logic dn
);
  timeunit 1ps; timeprecision 1fs;

  initial begin
    up = 1'b0;
    dn = 1'b0;
  end

  always @(posedge ref_clk) up = 1'b1;
  always @(posedge fb_clk)  dn = 1'b1;

  always @(posedge (up & dn)) begin
    #(T_RST);
    up = 1'b0;
    dn = 1'b0;
  end

endmodule
