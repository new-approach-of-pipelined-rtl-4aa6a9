// tb_svm_exp_lut: checks the RBF kernel table against exp() evaluated in
// floating point for sigma = 0.9: entry 0 is exactly 1.0, every sampled
// entry is within one LSB of round(exp(-x/(2*sigma^2)) * 2^14) with x the
// left end of the entry's interval, and the table never increases.
module tb_svm_exp_lut;
  timeunit 1ns;
  timeprecision 1ps;
  import svm_pkg::*;

  localparam int ADDR_W = 10;
  localparam int SHIFT  = 17 - ADDR_W;

  data_t d, e, prev;
  int checks = 0, failures = 0;

  svm_exp_lut dut (.d_i(d), .exp_o(e));

  function automatic longint model(longint x);
    real xr;
    xr = real'((x >> SHIFT) << SHIFT) / 16384.0;
    return longint'($rtoi($exp(-xr / (2.0 * 0.81)) * 16384.0 + 0.5));
  endfunction

  task automatic check(longint x);
    longint m, diff;
    d = data_t'(x);
    #1;
    m    = model(x);
    diff = longint'(e) - m;
    checks++;
    if (diff > 1 || diff < -1) begin
      failures++;
      $display("FAIL d=%0d got=%0d exp=%0d", d, e, m);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    #1;
    checks++;
    if (e != data_t'(16384)) begin
      failures++;
      $display("FAIL exp(0) = %0d", e);
    end
    check(16384);   // d = 1.0 -> exp(-1/1.62) = 0.5394
    check(32768);   // d = 2.0
    check(131071);  // last entry
    // every entry, in address order, also checking monotonicity
    prev = data_t'(16384);
    for (int i = 0; i < (1 << ADDR_W); i++) begin
      check(longint'(i) << SHIFT);
      checks++;
      if (e > prev) begin
        failures++;
        $display("FAIL table rises at entry %0d", i);
      end
      prev = e;
    end
    for (int i = 0; i < 1000; i++) check(longint'($urandom_range(0, 131071)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
