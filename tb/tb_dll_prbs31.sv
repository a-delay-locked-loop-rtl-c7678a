// tb_dll_prbs31: the DLL at its default parameters retiming a 3.2 Gb/s
// PRBS 2^31-1 stream in synchronous mode (1.6 GHz input clock), the main
// measurement condition of the prototype. After the loop has locked, every
// retimed bit is checked with a self-synchronising PRBS-31 checker
// (x^31 + x^28 + 1), and the output clock must run at 3.2 GHz. The input
// clock is given a 35 % duty cycle, because the loop multiplies it through
// a phase-locked loop that compares rising edges only and so needs no
// fifty percent duty cycle.
module tb_dll_prbs31;
  timeunit 1ps; timeprecision 1fs;
  import dll_pkg::*;

  localparam real T_IN     = 625.0;
  localparam real UI       = 312.5;
  localparam real DATA_OFS = 60.0;
  localparam real LOCK_US  = 110.0;
  localparam real CHECK_US = 40.0;

  logic clk_in = 0, rst_n = 1, data_in = 0, int_n_mode = 0;
  logic clk_out, rdata, f_ref, fd_tick, n_sd;
  nk_t  n_k;
  logic [3:0] modulus;
  logic [ACC_W-1:0] phase_code;
  logic ovf_up_p, ovf_dn_p, early, late, int_sat;

  dll_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  // input clock with a 35 % duty cycle: only its rising edges matter
  always begin
    #(T_IN * 0.65) clk_in = 1'b1;
    #(T_IN * 0.35) clk_in = 1'b0;
  end

  initial begin
    realtime t;
    logic [30:0] h;
    h = 31'h1234_5678;
    t = DATA_OFS;
    forever begin
      logic b;
      #(t - $realtime);
      b = h[27] ^ h[30];
      h = {h[29:0], b};
      data_in = b;
      t += UI;
    end
  end

  logic [30:0] rh = '0;
  int  rbits = 0, bits_checked = 0, bit_errors = 0, edges = 0;
  bit  check_on = 0;
  always @(posedge clk_out) begin
    #1;
    edges++;
    if (check_on && rbits >= 31) begin
      bits_checked++;
      if (rdata != (rh[27] ^ rh[30])) bit_errors++;
    end
    rh = {rh[29:0], rdata};
    rbits++;
  end

  initial begin
    int e0;
    // a real falling edge, so that the asynchronous reset also reaches the
    // blocks clocked by derived clocks
    #1 rst_n = 0;
    #(10 * T_IN);
    rst_n = 1;
    #(LOCK_US * 1e6);
    check_on = 1;
    e0 = edges;
    #(CHECK_US * 1e6);
    $display("PRBS-31: %0d bits checked, %0d errors, phase code %0d", bits_checked, bit_errors, phase_code);
    chk(bits_checked > int'(CHECK_US * 3190.0), "bits retimed");
    chk(bit_errors == 0, "error-free retiming of PRBS-31");
    chk(edges - e0 > int'(CHECK_US * 3199.0) && edges - e0 < int'(CHECK_US * 3201.0), "3.2 GHz output clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((LOCK_US + CHECK_US + 20.0) * 1e6);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
