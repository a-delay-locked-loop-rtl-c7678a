// tb_sdm_ovf_align: checks the overflow re-alignment path. A flag level
// that rises on an f_d strobe must give exactly one one-cycle pulse, in the
// cycle after it has been sampled on the next en_ab strobe, then the next
// en_a strobe, then one more f_ref edge; nothing else may pulse.
module tb_sdm_ovf_align;
  timeunit 1ps; timeprecision 1fs;
  logic clk = 0, rst_n = 0;
  logic en_a, en_ab, en_abc;
  logic ovf_up = 0, ovf_dn = 0;
  logic up_p, dn_p;
  int checks = 0, failures = 0;
  int cyc = 0;
  int exp_up[$], exp_dn[$];
  int n_up = 0, n_dn = 0;

  sdm_clkdiv gen (.clk, .rst_n, .en_a, .en_ab, .en_abc);
  sdm_ovf_align dut (.clk, .rst_n, .en_a, .en_ab, .ovf_up, .ovf_dn, .up_p, .dn_p);

  always #500 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", msg, cyc); end
  endtask

  // Expected pulse cycle for a level that becomes visible at cycle c0:
  // first en_ab strobe at or after c0, then the first en_a strobe after
  // that, then one more edge.
  function automatic int expect_at(input int c0);
    int t = c0;
    while (t % 16 != 15) t++;   // en_ab strobe cycles (cycle index mod 16 == 15)
    t++;
    while (t % 2 != 1) t++;     // en_a strobe
    return t + 2;
  endfunction

  always @(posedge clk) if (rst_n) begin
    // flags change after the edge on which en_abc was high
    if (en_abc) begin
      int r;
      r = $urandom_range(0, 3);
      ovf_up <= (r == 1);
      ovf_dn <= (r == 2);
      if (r == 1 && !ovf_up) exp_up.push_back(expect_at(cyc + 1));
      if (r == 2 && !ovf_dn) exp_dn.push_back(expect_at(cyc + 1));
    end
    if (up_p) begin
      n_up++;
      chk(exp_up.size() > 0 && exp_up[0] == cyc, "up pulse at expected cycle");
      if (exp_up.size() > 0) void'(exp_up.pop_front());
    end
    if (dn_p) begin
      n_dn++;
      chk(exp_dn.size() > 0 && exp_dn[0] == cyc, "down pulse at expected cycle");
      if (exp_dn.size() > 0) void'(exp_dn.pop_front());
    end
    if (exp_up.size() > 0) chk(exp_up[0] >= cyc, "up pulse missing");
    if (exp_dn.size() > 0) chk(exp_dn[0] >= cyc, "down pulse missing");
    cyc++;
    if (cyc == 512 * 60) begin
      chk(n_up > 3 && n_dn > 3, "pulses of both kinds seen");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
  end

  initial begin
    #(1000.0 * 200000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
