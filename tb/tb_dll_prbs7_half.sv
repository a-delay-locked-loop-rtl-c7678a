// tb_dll_prbs7_half: the DLL at its default parameters retiming a 1.6 Gb/s
// PRBS 2^7-1 stream (x^7 + x^6 + 1) with the usual 1.6 GHz input clock, so
// the recovered clock still runs at 3.2 GHz and every data bit lasts two
// clock periods. The phase detector then sees a transition at most every
// second clock period and still pulls the falling clock edge onto the
// transitions, which leaves both rising edges inside each bit. The retimed
// stream is therefore every bit twice: the rising edges are split into two
// interleaved halves, and each half must be an error-free PRBS-7 sequence
// (each half has its own self-synchronising checker). The test also checks
// that the two samples of each bit agree, that the phase detector kept
// producing decisions of both signs while locked, and that the output clock
// ran at 3.2 GHz.
module tb_dll_prbs7_half;
  timeunit 1ps; timeprecision 1fs;
  import dll_pkg::*;

  localparam real T_IN     = 625.0;
  localparam real UI       = 625.0;   // 1.6 Gb/s
  localparam real DATA_OFS = 130.0;
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

  always #(T_IN / 2) clk_in = ~clk_in;

  initial begin
    realtime t;
    logic [6:0] h;
    h = 7'h5a;
    t = DATA_OFS;
    forever begin
      logic b;
      #(t - $realtime);
      b = h[5] ^ h[6];
      h = {h[5:0], b};
      data_in = b;
      t += UI;
    end
  end

  // two interleaved checkers, one per half of the rising clock edges
  logic [6:0] rh [2];
  int  rbits [2];
  int  bits_checked = 0, bit_errors = 0, pair_errors = 0, edges = 0;
  int  n_early = 0, n_late = 0;
  bit  check_on = 0, ph = 0, prev = 0;
  initial begin
    rh[0] = '0; rh[1] = '0;
    rbits[0] = 0; rbits[1] = 0;
  end
  always @(posedge clk_out) begin
    #1;
    edges++;
    if (check_on) begin
      if (rbits[ph] >= 7) begin
        bits_checked++;
        if (rdata != (rh[ph][5] ^ rh[ph][6])) bit_errors++;
      end
      if (early) n_early++;
      if (late)  n_late++;
    end
    rh[ph] = {rh[ph][5:0], rdata};
    rbits[ph]++;
    ph = ~ph;
  end

  // pairing check: with both rising edges inside the bit, rdata changes at
  // most every second clock period, i.e. it never shows a single-period
  // pulse (0-1-0 or 1-0-1)
  logic [2:0] win = '0;
  always @(posedge clk_out) begin
    #1;
    win = {win[1:0], rdata};
    if (check_on && win[2] != win[1] && win[1] != win[0]) pair_errors++;
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
    $display("PRBS-7 at 1.6 Gb/s: %0d samples checked, %0d errors, %0d single-period pulses, early %0d late %0d, phase code %0d",
             bits_checked, bit_errors, pair_errors, n_early, n_late, phase_code);
    chk(bits_checked > int'(CHECK_US * 3190.0), "samples retimed");
    chk(bit_errors == 0, "error-free retiming of 1.6 Gb/s PRBS-7, both halves");
    chk(pair_errors == 0, "each bit sampled twice with the same value");
    chk(n_early > 0 && n_late > 0, "phase detector dithers around lock");
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
