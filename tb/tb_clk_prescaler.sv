// tb_clk_prescaler: checks that the /M prescaler gives one rising output
// edge every M = 3 input cycles (1.6 GHz in, 533 MHz out).
module tb_clk_prescaler;
  timeunit 1ps; timeprecision 1fs;
  logic clk_in = 0, rst_n = 0, out, out_q = 0;
  int checks = 0, failures = 0;
  int cyc = 0, last = -1, rises = 0;

  clk_prescaler dut (.clk_in, .rst_n, .out);

  always #312.5 clk_in = ~clk_in;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at cycle %0d", msg, cyc); end
  endtask

  always @(posedge clk_in) if (rst_n) begin
    cyc++;
    out_q <= out;
    if (out && !out_q) begin
      if (last >= 0) chk(cyc - last == 3, "prescaler period");
      last = cyc;
      rises++;
    end
    if (cyc == 3000) begin
      chk(rises >= 999, "edge count");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (2) @(posedge clk_in);
    @(negedge clk_in) rst_n = 1;
  end

  initial begin
    #(625.0 * 100000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
