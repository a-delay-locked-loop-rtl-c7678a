// tb_pfd_model: checks the phase-frequency detector model. With the
// reference leading the feedback by d ps, up must be high for d + T_RST and
// dn for T_RST; with the feedback leading, the other way round.
module tb_pfd_model;
  timeunit 1ps; timeprecision 1fs;
  logic ref_clk = 0, fb_clk = 0, up, dn;
  int checks = 0, failures = 0;
  realtime t_up_r, t_dn_r, w_up, w_dn;

  pfd_model dut (.ref_clk, .fb_clk, .up, .dn);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  always @(posedge up) t_up_r = $realtime;
  always @(posedge dn) t_dn_r = $realtime;
  always @(negedge up) w_up = $realtime - t_up_r;
  always @(negedge dn) w_dn = $realtime - t_dn_r;

  task automatic pair(input real d);   // d > 0: ref first
    if (d >= 0) begin
      ref_clk = 1; #(d); fb_clk = 1;
    end else begin
      fb_clk = 1; #(-d); ref_clk = 1;
    end
    #100; ref_clk = 0; fb_clk = 0; #1500;
    if (d >= 0) begin
      chk(w_up > d + 19.9 && w_up < d + 20.1, "up width = lead + reset delay");
      chk(w_dn > 19.9 && w_dn < 20.1, "dn width = reset delay");
    end else begin
      chk(w_dn > -d + 19.9 && w_dn < -d + 20.1, "dn width = lead + reset delay");
      chk(w_up > 19.9 && w_up < 20.1, "up width = reset delay");
    end
  endtask

  initial begin
    #1000;
    for (int k = 0; k < 50; k++) pair(real'($urandom_range(0, 400)) - 200.0);
    pair(0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
