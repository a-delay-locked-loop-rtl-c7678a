// tb_dll_top: end-to-end test of the DLL at its default parameters.
//
// A 1.6 GHz clock and a 3.2 Gb/s PRBS-7 data stream are applied. Phase 1
// (synchronous mode): data and clock share a frequency, with the data
// transitions placed so that the loop has to retard its clock through the
// 0 -> 255 wrap of the phase code to lock. Phase 2 (asynchronous mode): the
// data rate is raised by 3 kHz, so the data phase drifts steadily and the
// loop must keep rotating its clock forward, through the 255 -> 0 wrap. The
// retimed data is checked with a self-synchronising PRBS-7 checker in both
// phases after lock; the output clock frequency (2 x clk_in), the f_d rate
// (one update per 512 f_ref cycles, about 1 MHz) and the size of the phase
// step (1/256 of a 312.5 ps cycle per code) are measured. Every mechanism of
// the design is counted and must occur: divider moduli 5 and 7, both
// overflow directions, both commands, both detector decisions and
// integrator saturation. A last phase switches to integer-N mode and checks
// that the divider then stays at N and the clock phase stops moving.
module tb_dll_top;
  timeunit 1ps; timeprecision 1fs;
  import dll_pkg::*;

  localparam real T_IN      = 625.0;     // 1.6 GHz
  localparam real UI        = 312.5;     // 3.2 Gb/s
  localparam real DATA_OFS  = 205.0;     // data phase against clk_in, ps
  localparam real SYNC_US   = 70.0;
  localparam real LOCK_US   = 55.0;
  localparam real ASYNC_US  = 120.0;
  localparam real F_OFS     = 3.0e3;     // Hz, asynchronous mode

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

  // ---------------------------------------------------------------- data
  real ui_cur = UI;
  initial begin
    realtime t;
    logic [6:0] h;
    h = 7'h7f;
    t = DATA_OFS;
    forever begin
      logic b;
      #(t - $realtime);
      b = h[5] ^ h[6];
      h = {h[5:0], b};
      data_in = b;
      t += ui_cur;
    end
  end

  // ---------------------------------------------------- checker / counters
  logic [6:0] rh = '0;
  int  rbits = 0;
  bit  check_on = 0;
  int  bits_checked = 0, bit_errors = 0;
  int  c_mod5 = 0, c_mod7 = 0, c_ovu = 0, c_ovd = 0, c_nsd1 = 0, c_nsd0 = 0;
  int  c_early = 0, c_late = 0, c_sat = 0, c_fd = 0;
  int  fref_cnt = 0, last_fd = -1, fd_bad = 0;

  always @(posedge clk_out) begin
    #1;
    if (check_on && rbits >= 7) begin
      bits_checked++;
      if (rdata != (rh[5] ^ rh[6])) bit_errors++;
    end
    rh = {rh[5:0], rdata};
    rbits++;
    if (early) c_early++;
    if (late)  c_late++;
    if (int_sat) c_sat++;
  end

  always @(posedge f_ref) if (rst_n) begin
    fref_cnt++;
    if (modulus == 4'd5) c_mod5++;
    if (modulus == 4'd7) c_mod7++;
    if (ovf_up_p) c_ovu++;
    if (ovf_dn_p) c_ovd++;
    if (fd_tick) begin
      c_fd++;
      if (n_sd) c_nsd1++; else c_nsd0++;
      if (last_fd >= 0 && fref_cnt - last_fd != 512) fd_bad++;
      last_fd = fref_cnt;
    end
  end

  // mean phase of clk_out rising edges on the 312.5 ps grid of clk_in
  real acc_s = 0.0, acc_c = 0.0;
  int  n_ph = 0;
  always @(posedge clk_out) begin
    real a;
    a = 2.0 * 3.14159265358979 * ($realtime / UI);
    acc_s += $sin(a);
    acc_c += $cos(a);
    n_ph++;
  end
  function automatic real take_phase();   // ps in (-UI/2, UI/2]
    real p;
    p = $atan2(acc_s, acc_c) / (2.0 * 3.14159265358979) * UI;
    acc_s = 0.0; acc_c = 0.0; n_ph = 0;
    return p;
  endfunction

  // ---------------------------------------------------------------- flow
  initial begin
    real ph0, ph1, dph, dcode;
    int  code0, code1, fcount;
    realtime t0;
    int  err_sync, bits_sync;
    // a real falling edge, so that the asynchronous reset also reaches the
    // blocks clocked by derived clocks
    #1 rst_n = 0;
    #(10 * T_IN);
    rst_n = 1;

    // synchronous mode
    #(LOCK_US * 1e6);
    check_on = 1;
    // output frequency over 1 us
    fcount = 0;
    t0 = $realtime;
    fork
      begin : cnt_edges
        forever @(posedge clk_out) fcount++;
      end
      #(1e6);
    join_any
    disable cnt_edges;
    chk(fcount >= 3199 && fcount <= 3201, $sformatf("output clock 3.2 GHz (%0d edges/us)", fcount));
    #((SYNC_US - LOCK_US - 1.0) * 1e6);
    err_sync = bit_errors; bits_sync = bits_checked;
    $display("sync: %0d bits checked, %0d errors, phase code %0d", bits_sync, err_sync, phase_code);
    chk(bits_sync > 40000 && err_sync == 0, "error-free retiming in synchronous mode");
    chk(c_ovd > 0 && phase_code > 8'd128, "locked below zero: down overflow while locking");
    c_ovu = 0;

    // asynchronous mode: data rate + 3 kHz
    check_on = 0;
    ui_cur = UI / (1.0 + F_OFS / 3.2e9);
    #(2e6);
    bit_errors = 0; bits_checked = 0;
    check_on = 1;
    void'(take_phase());
    #(1e6);
    ph0 = take_phase(); code0 = phase_code;
    #((ASYNC_US - 4.0) * 1e6);
    void'(take_phase());
    #(1e6);
    ph1 = take_phase(); code1 = phase_code;
    dph = ph1 - ph0;
    if (dph > UI / 2)  dph -= UI;
    if (dph < -UI / 2) dph += UI;
    dcode = code1 - code0;
    if (dcode < -128) dcode += 256;
    if (dcode > 128)  dcode -= 256;
    $display("async: %0d bits checked, %0d errors; code %0d -> %0d, clock phase %.2f -> %.2f ps (%.3f ps/code)",
             bits_checked, bit_errors, code0, code1, ph0, ph1, -dph / dcode);
    chk(bits_checked > 200000 && bit_errors == 0, "error-free retiming in asynchronous mode");
    chk(dcode > 10, "phase code rotates forward with faster data");
    chk(c_ovu > 0 && code1 < 128, "up overflow while rotating");
    // each code advances the clock by UI/256 = 1.22 ps
    chk(dph < 0 && (-dph) > dcode * UI / 256.0 * 0.8 && (-dph) < dcode * UI / 256.0 * 1.2,
        $sformatf("phase step %.3f ps per code", -dph / dcode));
    chk(fd_bad == 0 && c_fd > 100, "f_d = f_ref / 512");

    // integer-N mode: divider fixed at N, clock phase frozen while the
    // data keeps drifting and the modulator keeps moving
    int_n_mode = 1;
    c_mod5 = 0; c_mod7 = 0;
    #(1e6);
    void'(take_phase());
    #(1e6);
    ph0 = take_phase(); code0 = phase_code;
    #(8e6);
    void'(take_phase());
    #(1e6);
    ph1 = take_phase(); code1 = phase_code;
    dph = ph1 - ph0;
    $display("integer-N: code %0d -> %0d, clock phase %.2f -> %.2f ps", code0, code1, ph0, ph1);
    chk(c_mod5 == 0 && c_mod7 == 0, "integer-N mode: divider stays at N");
    chk(dph < 1.0 && dph > -1.0, "integer-N mode: clock phase does not move");
    chk(code1 != code0, "integer-N mode: modulator still commanded");
    int_n_mode = 0;
    c_mod5 = 1; c_mod7 = 1;

    $display("mechanisms: mod5 %0d mod7 %0d ovf_up %0d ovf_dn %0d nsd1 %0d nsd0 %0d early %0d late %0d sat %0d",
             c_mod5, c_mod7, c_ovu, c_ovd, c_nsd1, c_nsd0, c_early, c_late, c_sat);
    chk(c_mod5 > 0, "divide by 5 used");
    chk(c_mod7 > 0, "divide by 7 used");
    chk(c_ovu > 0,  "up overflow");
    chk(c_ovd > 0,  "down overflow");
    chk(c_nsd1 > 0 && c_nsd0 > 0, "both phase commands");
    chk(c_early > 0 && c_late > 0, "both detector decisions");
    chk(c_sat > 0, "integrator saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((SYNC_US + ASYNC_US + 40.0) * 1e6);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // progress trace every 5 us
  initial forever begin
    #(5e6);
    $display("t=%0.0f us code=%0d nsd=%0d vctrl=%f", $realtime / 1e6, phase_code, n_sd, dut.vctrl);
  end
endmodule
