// tb_svm_kernel_term: checks one support vector's term: the saturating sum
// of the two squares, the kernel look-up (within one LSB of exp() in
// floating point, sigma = 0.9) and the exact 36-bit product with Alpha.
module tb_svm_kernel_term;
  timeunit 1ns;
  timeprecision 1ps;
  import svm_pkg::*;

  data_t s1, s2, al, adder1, ex;
  acc_t  mult;
  int checks = 0, failures = 0;

  svm_kernel_term dut (
    .sq1_i(s1), .sq2_i(s2), .alpha_i(al),
    .dist_o(adder1), .exp_o(ex), .mult_o(mult)
  );

  function automatic longint exp_model(longint x);
    real xr;
    xr = real'((x >> 7) << 7) / 16384.0;
    return longint'($rtoi($exp(-xr / 1.62) * 16384.0 + 0.5));
  endfunction

  task automatic check(longint x1, longint x2, longint a);
    longint dm, em, diff;
    s1 = data_t'(x1);
    s2 = data_t'(x2);
    al = data_t'(a);
    #1;
    dm = x1 + x2;
    if (dm > 131071) dm = 131071;
    em = exp_model(dm);
    diff = longint'(ex) - em;
    checks += 3;
    if (longint'(adder1) != dm) begin
      failures++;
      $display("FAIL adder1 %0d + %0d = %0d, exp %0d", x1, x2, adder1, dm);
    end
    if (diff > 1 || diff < -1) begin
      failures++;
      $display("FAIL exp(%0d) = %0d, model %0d", dm, ex, em);
    end
    if (longint'(mult) != a * longint'(ex)) begin
      failures++;
      $display("FAIL mult %0d * %0d = %0d", a, ex, mult);
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
    check(0, 0, 16384);              // exp(0) * 1.0
    check(0, 0, -131072);            // most negative alpha
    check(8192, 8192, 16384);        // d = 1.0
    check(131071, 131071, 131071);   // saturating adder
    check(100000, 40000, -5000);
    for (int i = 0; i < 3000; i++)
      check(longint'($urandom_range(0, 70000)), longint'($urandom_range(0, 70000)),
            longint'($urandom_range(0, 262143)) - 131072);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
