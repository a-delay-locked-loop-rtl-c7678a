// bbpd: bang-bang (Alexander) phase detector and data retimer.
//
// The recovered clock samples the data twice per bit: on the rising edge,
// which should sit in the middle of the bit, and on the falling edge, which
// should sit on the transition between two bits. When two consecutive bit
// samples differ, the edge sample tells which side of the transition the
// clock is on: if it equals the earlier bit the clock edge came before the
// transition (clock early), if it equals the later bit the clock came after
// it (clock late). Without a transition the detector says nothing. The two
// outputs early and late together form the three-level signal (+1, 0, -1)
// fed to the integrator. The rising-edge samples are the retimed data.
// The detector type is named by the design; the full-rate two-edge sampling
// and the sign convention are this design's choices.
//
// Timing: on each rising clock edge, rdata, early and late are updated with
// the decision about the transition between the previous and the current
// bit; they hold for one clock period.
module bbpd (
  input  logic clk,     // recovered clock, one rising edge per bit
  input  logic rst_n,
  input  logic data,
  output logic rdata,   // retimed data
  output logic early,   // clock ahead of the data: retard
  output logic late     // clock behind the data: advance
);
  timeunit 1ps; timeprecision 1fs;

  logic edge_s;   // sample on the falling edge, between two bits
  logic bit_q;    // previous bit-centre sample

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) edge_s <= 1'b0;
    else        edge_s <= data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_q <= 1'b0;
      rdata <= 1'b0;
      early <= 1'b0;
      late  <= 1'b0;
    end else begin
      // the previous decision must not have been both at once
      assert (!(early && late)) else $error("bbpd: early and late together");
      bit_q <= data;
      rdata <= bit_q;
      early <= (bit_q != data) && (edge_s == bit_q);
      late  <= (bit_q != data) && (edge_s == data);
    end
  end

endmodule
