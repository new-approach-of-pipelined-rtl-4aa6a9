// tb_gclk_ctrl_xbm_gates: drives a random valid pattern, changed just after rising clock
// edges, and checks the controller cycle by cycle: the gated clock is high
// in the high phase of exactly those cycles that began with valid_i = 1 and
// low in all others, and valid_o carries the valid_i of the last rising
// edge. It also counts gated-clock pulses against valid cycles.
module tb_gclk_ctrl_xbm_gates;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, vi = 1'b0;
  logic gclk, vo;
  logic sampled = 1'b0;
  int checks = 0, failures = 0;
  int pulses = 0, valid_cycles = 0;
  logic z00, z01;
  logic [1:0] st;

  gclk_ctrl_xbm_gates dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(vi),
                           .gclk_o(gclk), .valid_o(vo), .zzz00_o(z00), .zzz01_o(z01));

  // state number of the specification, from the clock and the model's nodes
  assign st = z00 ? 2'd2 : z01 ? 2'd1 : (vo && !clk) ? 2'd3 : 2'd0;

  always #5 clk = ~clk;

  always @(posedge gclk) pulses++;

  task automatic expect_eq(logic got, logic want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s at %0t: got %b want %b", what, $time, got, want);
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
    repeat (2) @(negedge clk);
    expect_eq(gclk, 1'b0, "gclk in reset");
    expect_eq(vo, 1'b0, "valid_o in reset");
    rst_n = 1'b1;
    for (int c = 0; c < 600; c++) begin
      // low phase: gated clock must be low
      #1 expect_eq(gclk, 1'b0, "gclk in low phase");
      @(posedge clk);
      sampled = vi;
      if (sampled) valid_cycles++;
      #1;
      expect_eq(gclk, sampled, "gclk in high phase");
      expect_eq(vo, sampled, "valid_o");
      // next cycle's valid changes just after the rising edge, as the
      // previous stage's valid_o does
      #1 vi = (c < 10) ? 1'b0 : (c < 20) ? 1'b1 : 1'($urandom_range(0, 2) != 0);
      #1 expect_eq(gclk, sampled, "gclk after valid_i changed");
      checks++;
      if (st != (sampled ? 2'd2 : 2'd1)) begin
        failures++;
        $display("FAIL state %0d after rising edge, valid %b", st, sampled);
      end
      @(negedge clk);
      #1;
      checks++;
      if (st != (sampled ? 2'd3 : 2'd0)) begin
        failures++;
        $display("FAIL state %0d after falling edge, valid %b", st, sampled);
      end
      expect_eq(vo, sampled, "valid_o held in low phase");
    end
    checks++;
    if (pulses != valid_cycles) begin
      failures++;
      $display("FAIL %0d gated pulses for %0d valid cycles", pulses, valid_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
