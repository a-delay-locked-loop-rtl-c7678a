// tb_sdm_diff: checks the output differentiator and overflow adders:
// n[k] = c[k-1] - c[k-2] + up[k-1] - dn[k-1] (registered), for random
// inputs restricted to combinations whose sum lies in {-1, 0, +1}.
module tb_sdm_diff;
  timeunit 1ps; timeprecision 1fs;
  logic clk = 0, rst_n = 0;
  logic c = 0, up_p = 0, dn_p = 0;
  dll_pkg::nk_t n;
  int checks = 0, failures = 0;
  int c_prev = 0, expn = 0;
  int seen[3] = '{0, 0, 0};

  sdm_diff dut (.clk, .rst_n, .c, .up_p, .dn_p, .n);

  always #500 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (4000) begin
      int cc, u, d, m;
      @(negedge clk);
      cc = $urandom_range(0, 1);
      m  = cc - c_prev;
      u = 0; d = 0;
      if ($urandom_range(0, 7) == 0) begin
        if (m <= 0 && $urandom_range(0, 1)) u = 1;
        else if (m >= 0) d = 1;
      end
      c = 1'(cc); up_p = 1'(u); dn_p = 1'(d);
      expn = m + u - d;
      c_prev = cc;
      @(posedge clk); #1;
      chk(int'(n) == expn, "n[k]");
      seen[expn + 1]++;
    end
    chk(seen[0] > 0 && seen[1] > 0 && seen[2] > 0, "all three levels produced");
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
