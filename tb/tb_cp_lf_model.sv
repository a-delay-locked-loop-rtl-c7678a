// tb_cp_lf_model: checks the charge-pump / loop-filter model. Pulse pairs
// of known width difference w are applied; after each pair the control
// voltage must equal V_INIT + KI * (sum of w) + KP * w - VSHIFT.
module tb_cp_lf_model;
  timeunit 1ps; timeprecision 1fs;
  localparam real KP = 5.7e-4, KI = 3.6e-5, V_INIT = 1.0, VSHIFT = 0.5;
  logic up = 0, dn = 0;
  real vctrl;
  int checks = 0, failures = 0;
  real sum_w = 0.0, expv;

  cp_lf_model dut (.up, .dn, .vctrl);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  task automatic pair(input real w);
    if (w >= 0) begin up = 1; #(w); dn = 1; end
    else        begin dn = 1; #(-w); up = 1; end
    #20; up = 0; dn = 0; #100;
    sum_w += w;
    expv = V_INIT + KI * sum_w + KP * w - VSHIFT;
    chk(vctrl > expv - 1e-6 && vctrl < expv + 1e-6, "control voltage");
  endtask

  initial begin
    #10;
    chk(vctrl > V_INIT - VSHIFT - 1e-9 && vctrl < V_INIT - VSHIFT + 1e-9, "initial voltage");
    for (int k = 0; k < 100; k++) pair(real'($urandom_range(0, 300)) - 150.0);
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
