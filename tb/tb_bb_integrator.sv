// tb_bb_integrator: checks the saturating integrator and limiter against a
// reference sum: random early/late streams with a bias in either direction,
// so that both saturation limits are reached, and the limiter output is the
// sign of the sum.
module tb_bb_integrator;
  timeunit 1ps; timeprecision 1fs;
  localparam int SAT = 64;
  logic clk = 0, rst_n = 0, early = 0, late = 0;
  logic adv, sat_hi, sat_lo;
  int checks = 0, failures = 0;
  int acc = 0, n_hi = 0, n_lo = 0;

  bb_integrator #(.SAT(SAT)) dut (.clk, .rst_n, .early, .late, .adv, .sat_hi, .sat_lo);

  always #500 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  task automatic burst(input int n, input int p_late);
    repeat (n) begin
      int r;
      @(negedge clk);
      r = $urandom_range(0, 99);
      late  = (r < p_late);
      early = (r >= p_late) && (r < p_late + (100 - p_late) / 2 + 10);
      if (late && !early && acc < SAT)  acc++;
      if (early && !late && acc > -SAT) acc--;
      @(posedge clk); #1;
      chk(adv == (acc >= 0), "limiter output");
      chk(sat_hi == (acc == SAT) && sat_lo == (acc == -SAT), "saturation flags");
      if (sat_hi) n_hi++;
      if (sat_lo) n_lo++;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    burst(1000, 70);
    burst(2000, 10);
    burst(2000, 45);
    chk(n_hi > 0 && n_lo > 0, "both limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000.0 * 100000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
