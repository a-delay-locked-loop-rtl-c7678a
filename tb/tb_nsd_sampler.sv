// tb_nsd_sampler: checks that the SDM input flop takes d only on the f_d
// strobe and holds it for the whole T_d period in between.
module tb_nsd_sampler;
  timeunit 1ps; timeprecision 1fs;
  logic clk = 0, rst_n = 0, en = 0, d = 0, q;
  int checks = 0, failures = 0;
  bit expq = 0;

  nsd_sampler dut (.clk, .rst_n, .en, .d, .q);

  always #500 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    chk(q == 0, "reset value");
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      en = (k % 16 == 15);
      d  = 1'($urandom_range(0, 1));
      if (en) expq = d;
      @(posedge clk); #1;
      chk(q == expq, "sampled value");
    end
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
