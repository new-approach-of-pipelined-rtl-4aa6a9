// tb_gated_reg: applies clock pulses with and without the load strobe and
// checks that the register takes its input only on a pulse with load high,
// and holds its value between pulses.
module tb_gated_reg;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int W = 18;

  logic gclk = 1'b0, load = 1'b0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  gated_reg #(.WIDTH(W)) dut (.gclk_i(gclk), .load_i(load), .d_i(d), .q_o(q));

  task automatic pulse();
    #5 gclk = 1'b1;
    #5 gclk = 1'b0;
  endtask

  task automatic check(string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, model);
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
    d = 18'h2aaaa; load = 1'b1;
    pulse();
    model = 18'h2aaaa;
    check("load");
    for (int i = 0; i < 500; i++) begin
      d    = W'($urandom);
      load = 1'($urandom);
      if ($urandom_range(0, 3) != 0) begin
        pulse();
        if (load) model = d;
        check("pulse");
      end else begin
        #10;
        check("no pulse");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
