// tb_sdm_multirate: checks the whole multi-rate modulator cycle by cycle
// against a reference written with unbounded integers: the phase setting V
// is never wrapped, the three first-order stages requantize V/256 -> 1/32
// -> 1/4 -> whole cycles with floor division and a residue, and n[k] is the
// first difference of the last stage's output. In that reference there are
// no overflows at all, so an exact match shows that the hardware's wrapped
// counter plus re-aligned overflow pulses behaves like an unbounded
// accumulator. Also checked: f_d = f_ref/512, the counter value, n[k] in
// {-1, 0, +1}, and that the accumulated n[k] tracks V/256 within two
// cycles. The stimulus includes long runs up and down (several overflows
// in each direction) and random commands.
module tb_sdm_multirate;
  timeunit 1ps; timeprecision 1fs;
  logic clk = 0, rst_n = 0, n_sd = 0;
  logic fd_tick, ovf_up_p, ovf_dn_p;
  dll_pkg::nk_t n;
  logic [7:0] phase_code;
  int checks = 0, failures = 0, errs_n = 0;
  longint cyc = 0;
  int V = 0, rA = 0, rB = 0, rC = 0, yA = 0, yB = 0, c = 0, cq = 0, n_ref = 0;
  longint P = 0;
  int lv[3] = '{0, 0, 0};
  int n_ovf_up = 0, n_ovf_dn = 0;
  int mode = 0;   // 0: up, 1: down, 2: random

  sdm_multirate dut (.clk, .rst_n, .n_sd, .fd_tick, .n, .phase_code, .ovf_up_p, .ovf_dn_p);

  always #500 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (cycle %0d)", msg, cyc);
    end
  endtask

  function automatic int fdiv(input int a, input int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  always @(posedge clk) if (rst_n) begin
    int s;
    bit ea, eab, ed;
    ea  = (cyc % 2) == 1;
    eab = (cyc % 16) == 15;
    ed  = (cyc % 512) == 511;
    chk(fd_tick == ed, "f_d strobe every 512 f_ref cycles");
    // reference, downstream first so that each stage sees old values
    n_ref = c - cq;
    cq = c;
    s = yB + rC; c = fdiv(s, 4); rC = s - 4 * c;
    if (ea)  begin s = yA + rB; yB = fdiv(s, 8); rB = s - 8 * yB; end
    if (eab) begin s = V + rA;  yA = fdiv(s, 8); rA = s - 8 * yA; end
    if (ed)  V += n_sd ? 1 : -1;
    cyc++;
    #1;
    chk(int'(n) == n_ref, "n[k] equals the unbounded reference");
    chk(int'(phase_code) == ((V % 256) + 256) % 256, "phase code");
    chk(n inside {-2'sd1, 2'sd0, 2'sd1}, "three-level output");
    if (n inside {-2'sd1, 2'sd0, 2'sd1}) lv[int'(n) + 1]++;
    P += n;
    chk((P * 256 - V) <= 2 * 256 && (V - P * 256) <= 2 * 256, "accumulated n tracks V/256");
    if (ovf_up_p) n_ovf_up++;
    if (ovf_dn_p) n_ovf_dn++;
  end

  // command source: changes n_sd away from the sampling edge
  always @(negedge clk) if (rst_n) begin
    case (mode)
      0: n_sd <= 1'b1;
      1: n_sd <= 1'b0;
      default: if ((cyc % 512) == 300) n_sd <= 1'($urandom_range(0, 1));
    endcase
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    mode = 0; repeat (600 * 512) @(posedge clk);
    mode = 1; repeat (700 * 512) @(posedge clk);
    mode = 2; repeat (300 * 512) @(posedge clk);
    mode = 0; repeat (200 * 512) @(posedge clk);
    chk(n_ovf_up >= 2 && n_ovf_dn >= 2, "overflows in both directions");
    chk(lv[0] > 0 && lv[1] > 0 && lv[2] > 0, "all three output levels");
    $display("levels -1/0/+1: %0d %0d %0d, overflows up %0d down %0d", lv[0], lv[1], lv[2], n_ovf_up, n_ovf_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000.0 * 2000000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
