// tb_bbpd: checks the bang-bang phase detector with a 3.2 GHz clock and
// random 3.2 Gb/s data whose transitions are placed a fixed offset after
// (clock early) or before (clock late) the falling clock edge. Every
// transition must produce exactly the expected decision, no decision may
// appear without a transition, and the retimed data must equal the data
// sent, two clock cycles later.
module tb_bbpd;
  timeunit 1ps; timeprecision 1fs;
  localparam real UI = 312.5;
  logic clk = 0, rst_n = 0, data = 0;
  logic rdata, early, late;
  int checks = 0, failures = 0;
  bit bits[$];
  int n_early = 0, n_late = 0;

  bbpd dut (.clk, .rst_n, .data, .rdata, .early, .late);

  always #(UI / 2) clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  // Send nbits random bits with transitions at falling edge + off.
  task automatic run(input real off, input int nbits, input bit exp_early);
    bit prev, cur;
    int k;
    bits.delete();
    @(posedge clk);
    #(UI / 2 + off);
    prev = data;
    for (k = 0; k < nbits; k++) begin
      cur = 1'($urandom_range(0, 1));
      data = cur;
      bits.push_back(cur);
      // decision for the transition prev -> cur appears after the rising
      // edge that samples cur; check it one clock later.
      fork
        begin
          automatic bit tr = (prev != cur);
          automatic bit idx_ok = 1;
          @(posedge clk); #1;
          if (idx_ok) begin
            chk(early == (tr && exp_early), "early decision");
            chk(late  == (tr && !exp_early), "late decision");
            if (early) n_early++;
            if (late)  n_late++;
          end
        end
      join_none
      prev = cur;
      #(UI);
    end
    #(UI * 4);
  endtask

  // retimed data: rdata after the rising edge = bit sampled one edge earlier
  bit hist[$];
  always @(posedge clk) if (rst_n) begin
    hist.push_back(data);
    if (hist.size() > 3) void'(hist.pop_front());
  end
  always @(posedge clk) if (rst_n) begin
    #2;
    if (hist.size() == 3) chk(rdata == hist[1], "retimed data");
  end

  initial begin
    repeat (2) @(posedge clk);
    #10 rst_n = 1;
    run(40.0, 2000, 1'b1);    // transition 40 ps after the edge sample: clock early
    run(-40.0, 2000, 1'b0);   // transition 40 ps before the edge sample: clock late
    chk(n_early > 500 && n_late > 500, "both decisions produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(UI * 100000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
