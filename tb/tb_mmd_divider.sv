// tb_mmd_divider: checks the 5/6/7 divider. After each rising edge of the
// divider output a new random n is applied (as the modulator does); the
// output period that starts on the following rising edge must then last
// exactly N + n VCO cycles.
module tb_mmd_divider;
  timeunit 1ps; timeprecision 1fs;
  logic clk = 0, rst_n = 0, out;
  dll_pkg::nk_t n = '0;
  logic [3:0] modulus;
  int checks = 0, failures = 0;
  int cyc = 0, last_rise = -1;
  int pend[$] = '{6};
  int seen[3] = '{0, 0, 0};
  logic out_q = 0;

  mmd_divider dut (.clk, .rst_n, .n, .out, .modulus);

  always #156.25 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at cycle %0d", msg, cyc); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    out_q <= out;
    if (out && !out_q) begin
      if (last_rise >= 0) begin
        int e;
        e = pend.pop_front();
        chk(cyc - last_rise == e, "division period");
        seen[e - 5]++;
      end
      last_rise = cyc;
      begin
        int r;
        r = $urandom_range(0, 2) - 1;
        n <= 2'(r);
        pend.push_back(6 + r);
      end
    end
    if (cyc == 30000) begin
      chk(seen[0] > 100 && seen[1] > 100 && seen[2] > 100, "all three moduli used");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
  end

  initial begin
    #(312.5 * 100000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
