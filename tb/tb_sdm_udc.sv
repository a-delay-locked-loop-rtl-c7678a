// tb_sdm_udc: checks the 8-bit up/down counter of the modulator against a
// reference count: random steps on random enable cycles, forced runs
// across 255 -> 0 and 0 -> 255, and the overflow flag levels (high for
// the period after a wrap, low otherwise).
module tb_sdm_udc;
  timeunit 1ps; timeprecision 1fs;
  logic clk = 0, rst_n = 0, en = 0, up = 0;
  logic [7:0] cnt;
  logic ovf_up, ovf_dn;
  int checks = 0, failures = 0;
  int ref_cnt = 0, n_up = 0, n_dn = 0;
  bit ref_up = 0, ref_dn = 0;

  sdm_udc dut (.clk, .rst_n, .en, .up, .cnt, .ovf_up, .ovf_dn);

  always #500 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  task automatic step(input bit e, input bit u);
    en = e; up = u;
    @(posedge clk); #1;
    if (e) begin
      ref_up = u && ref_cnt == 255;
      ref_dn = !u && ref_cnt == 0;
      ref_cnt = u ? (ref_cnt + 1) % 256 : (ref_cnt + 255) % 256;
      if (ref_up) n_up++;
      if (ref_dn) n_dn++;
    end
    chk(cnt == 8'(ref_cnt), "count");
    chk(ovf_up == ref_up && ovf_dn == ref_dn, "overflow flags");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(cnt == 0 && !ovf_up && !ovf_dn, "reset state");
    repeat (300) step(1'b1, 1'b1);          // through 255 -> 0
    repeat (600) step(1'b1, 1'b0);          // through 0 -> 255 twice
    repeat (3000) step(1'($urandom_range(0, 3) == 0), 1'($urandom_range(0, 1)));
    chk(n_up >= 1 && n_dn >= 2, "both overflow directions exercised");
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
