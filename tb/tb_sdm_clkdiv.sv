// tb_sdm_clkdiv: checks the /2, /8, /32 strobe chain of the modulator.
// Counts f_ref cycles between strobes (2, 16 and 512 expected), checks that
// the strobes nest (en_abc implies en_ab implies en_a) and that the first
// f_d strobe comes 512 cycles after reset.
module tb_sdm_clkdiv;
  timeunit 1ps; timeprecision 1fs;
  logic clk = 0, rst_n = 0;
  logic en_a, en_ab, en_abc;
  int checks = 0, failures = 0;
  int cyc = 0, last_a = -1, last_ab = -1, last_abc = -1;

  sdm_clkdiv dut (.clk, .rst_n, .en_a, .en_ab, .en_abc);

  always #500 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", msg, cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (en_abc) chk(en_ab, "en_abc without en_ab");
    if (en_ab)  chk(en_a,  "en_ab without en_a");
    if (en_a)   begin if (last_a   >= 0) chk(cyc - last_a   == 2,   "en_a period");   last_a   = cyc; end
    if (en_ab)  begin if (last_ab  >= 0) chk(cyc - last_ab  == 16,  "en_ab period");  last_ab  = cyc; end
    if (en_abc) begin
      if (last_abc >= 0) chk(cyc - last_abc == 512, "en_abc period");
      else               chk(cyc == 512, "first f_d strobe after 512 cycles");
      last_abc = cyc;
    end
    if (cyc == 512 * 4 + 10) begin
      chk(last_abc == 512 * 4, "four f_d strobes seen");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    #(1000.0 * 100000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
