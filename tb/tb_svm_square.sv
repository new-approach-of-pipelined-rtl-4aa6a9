// tb_svm_square: checks the squared-difference unit against a 64-bit
// integer model: directed corner cases (equal inputs, one unit, the most
// negative difference, saturation) and random pairs.
module tb_svm_square;
  timeunit 1ns;
  timeprecision 1ps;
  import svm_pkg::*;

  data_t a, b, q;
  int checks = 0, failures = 0;

  svm_square dut (.sv_i(a), .test_i(b), .sq_o(q));

  function automatic longint model(longint x, longint y);
    longint d, r;
    d = x - y;
    r = (d * d + 8192) / 16384;
    return (r > 131071) ? 131071 : r;
  endfunction

  task automatic check(longint x, longint y);
    a = data_t'(x);
    b = data_t'(y);
    #1;
    checks++;
    if (longint'(q) != model(longint'(a), longint'(b))) begin
      failures++;
      $display("FAIL sv=%0d test=%0d got=%0d exp=%0d", a, b, q, model(longint'(a), longint'(b)));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0);
    check(16384, 0);          // 1.0^2 = 1.0
    check(-16384, 16384);     // (-2)^2 = 4.0
    check(8192, 0);           // 0.25
    check(3, 0);              // tiny, rounds to 0
    check(128, 0);            // 2^-14 * 2^14... 128^2/2^14 = 1
    check(-131072, 131071);   // huge, saturates
    check(65536, -65536);     // 16, saturates
    check(46341, 0);          // just above 8 -> saturates
    for (int i = 0; i < 2000; i++)
      check(longint'($signed($urandom_range(0, 262143) - 131072)),
            longint'($signed($urandom_range(0, 262143) - 131072)));
    for (int i = 0; i < 2000; i++)
      check(longint'($urandom_range(0, 65535)) - 32768,
            longint'($urandom_range(0, 65535)) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
