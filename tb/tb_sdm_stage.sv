// tb_sdm_stage: checks the first-order requantizer stages (8 -> 5 bits and
// 2 -> 1 bit). For each update, the output is compared with
// floor((x + residue) / 2^R) from a reference residue, and over a long run
// with constant input the output mean must equal the input exactly (the
// accumulated error stays below one output step).
module tb_sdm_stage;
  timeunit 1ps; timeprecision 1fs;
  logic clk = 0, rst_n = 0, en = 0;
  logic [8:0] xa;  logic [5:0] ya;   // 8 -> 5
  logic [2:0] xb;  logic [0:0] yb;   // 2 -> 1
  int checks = 0, failures = 0;
  int ra = 0, rb = 0;

  sdm_stage #(.IN_W(8), .OUT_W(5)) dut_a (.clk, .rst_n, .en, .x(xa), .y(ya));
  sdm_stage #(.IN_W(2), .OUT_W(0)) dut_b (.clk, .rst_n, .en, .x(xb), .y(yb));

  always #500 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  // One update of both stages; returns the outputs' values.
  task automatic upd(input int a, input int b, input bit e, output int oa, output int ob);
    int sa, sb;
    xa = 9'(a); xb = 3'(b); en = e;
    @(posedge clk); #1;
    if (e) begin
      sa = a + ra; sb = b + rb;
      chk(int'(ya) == sa / 8, "8->5 output");
      chk(int'(yb) == sb / 4, "2->1 output");
      ra = sa % 8; rb = sb % 4;
    end
    oa = ya; ob = yb;
  endtask

  initial begin
    int oa, ob, suma, sumb;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // random inputs, random enables
    repeat (2000) upd($urandom_range(0, 256), $urandom_range(0, 4), 1'($urandom_range(0, 1)), oa, ob);
    // constant inputs: mean over 8*32 updates must match exactly
    for (int v = 0; v <= 256; v += 37) begin
      suma = 0; sumb = 0;
      for (int k = 0; k < 256; k++) begin
        upd(v, v % 5, 1'b1, oa, ob);
        suma += oa; sumb += ob;
      end
      // sum of outputs * 2^R = sum of inputs - (residue change) : within one step
      chk((suma * 8 - v * 256) <= 8 && (v * 256 - suma * 8) <= 8, "8->5 mean");
      chk((sumb * 4 - (v % 5) * 256) <= 4 && ((v % 5) * 256 - sumb * 4) <= 4, "2->1 mean");
    end
    upd(256, 4, 1'b1, oa, ob);
    upd(256, 4, 1'b1, oa, ob);
    chk(ya == 6'd32 && yb == 1'b1, "full-scale input gives full-scale output");
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
