// gclk_ctrl_latch: gated-clock stage controller built from two transparent
// latches and an AND gate.
//
// The first latch is transparent while clk_i is low and holds valid_i
// through the high phase; ANDing its output with clk_i gives the stage's
// gated clock, so gclk_o repeats clk_i in exactly those cycles whose valid_i
// was 1 just before the rising edge, and stays low otherwise. The second
// latch is transparent while clk_i is high and passes the first latch's
// output on as valid_o, which therefore changes just after the rising edge
// and is stable through the next low phase, when the next stage's first
// latch samples it. A chain of these controllers moves a valid flag one
// stage per clock cycle, and each stage's registers are clocked only when
// the flag is in front of them.
//
// Timing: valid_i must be stable around the rising edge of clk_i (it is
// produced by the previous stage just after a rising edge, or by the
// source on the falling edge). valid_o = valid_i as seen at the previous
// rising edge. The structure (two opposite-phase latches, AND gate, latch
// clear pins) follows the controller's logic diagram; the active-low reset
// on the clear pins is this design's choice.
//
// The two latches are intended: they are the controller. The latch and the
// gated clock the lint and synthesis tools report are by design.
module gclk_ctrl_latch (
  input  logic clk_i,    // free-running clock
  input  logic rst_ni,   // asynchronous reset, active low (latch clear)
  input  logic valid_i,  // data in front of this stage's registers is valid
  output logic gclk_o,   // gated clock for this stage's registers
  output logic valid_o   // valid flag for the next stage
);

  logic hold;  // low-phase latch: valid_i frozen while clk_i is high

  always_latch begin
    if (!rst_ni)     hold = 1'b0;
    else if (!clk_i) hold = valid_i;
  end

  always_latch begin
    if (!rst_ni)    valid_o = 1'b0;
    else if (clk_i) valid_o = hold;
  end

  assign gclk_o = hold & clk_i;

endmodule
