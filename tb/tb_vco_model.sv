// tb_vco_model: checks the VCO model's frequency: 3.2 GHz (312.5 ps) at
// 0.5 V, and a change of 140 MHz per volt around it, by timing 1000
// periods at several control voltages.
module tb_vco_model;
  timeunit 1ps; timeprecision 1fs;
  real vctrl = 0.5;
  logic clk;
  int checks = 0, failures = 0;

  vco_model dut (.vctrl, .clk);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  task automatic measure(input real v);
    realtime t0;
    real f, fexp;
    vctrl = v;
    repeat (3) @(posedge clk);
    t0 = $realtime;
    repeat (1000) @(posedge clk);
    f = 1000.0 / (($realtime - t0) * 1e-12);
    fexp = 3.13e9 + 140.0e6 * v;
    chk(f > fexp * 0.9999 && f < fexp * 1.0001, $sformatf("frequency at %f V: %f", v, f));
  endtask

  initial begin
    measure(0.5);
    measure(0.0);
    measure(1.0);
    measure(-0.3);
    measure(0.75);
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
