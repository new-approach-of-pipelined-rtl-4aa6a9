// tb_svm_decision: checks the sum of 30 products plus bias, its saturation
// to 36 bits and the class decision (+1 only for a strictly positive
// decision value), with directed cases and random vectors.
module tb_svm_decision;
  timeunit 1ns;
  timeprecision 1ps;
  import svm_pkg::*;

  localparam int N = 30;
  localparam longint MAXV = (longint'(1) <<< 35) - 1;
  localparam longint MINV = -(longint'(1) <<< 35);

  acc_t m [N];
  acc_t bias, score;
  logic cls;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_sat = 0;

  svm_decision dut (.mult_i(m), .bias_i(bias), .score_o(score), .class_pos_o(cls));

  task automatic check();
    longint s;
    #1;
    s = longint'(bias);
    foreach (m[i]) s += longint'(m[i]);
    if (s > MAXV) begin s = MAXV; n_sat++; end
    if (s < MINV) begin s = MINV; n_sat++; end
    checks += 2;
    if (longint'(score) != s) begin
      failures++;
      $display("FAIL score %0d, model %0d", score, s);
    end
    if (cls != (s > 0)) begin
      failures++;
      $display("FAIL class %0b for score %0d", cls, s);
    end
    if (s > 0) n_pos++; else n_neg++;
  endtask

  task automatic fill(longint lo, longint hi);
    foreach (m[i]) m[i] = acc_t'(lo + longint'($urandom_range(0, 32'(hi - lo))));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m[i]) m[i] = '0;
    bias = '0;
    check();                          // exactly zero -> class -1
    bias = acc_t'(1);
    check();                          // smallest positive -> class +1
    bias = acc_t'(-1);
    check();
    foreach (m[i]) m[i] = acc_t'(MAXV);
    bias = acc_t'(MAXV);
    check();                          // positive saturation
    foreach (m[i]) m[i] = acc_t'(MINV);
    check();                          // negative saturation
    foreach (m[i]) m[i] = '0;
    m[29] = acc_t'(5);
    bias = acc_t'(-5);
    check();                          // last term counts
    for (int t = 0; t < 2000; t++) begin
      fill(-2000000000, 2000000000);
      foreach (m[i]) m[i] = acc_t'(longint'(m[i]) * longint'($urandom_range(1, 16)));
      bias = acc_t'(longint'($urandom_range(0, 2000000000)) - 1000000000);
      check();
    end
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_sat < 2) begin
      failures++;
      $display("FAIL coverage pos=%0d neg=%0d sat=%0d", n_pos, n_neg, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
