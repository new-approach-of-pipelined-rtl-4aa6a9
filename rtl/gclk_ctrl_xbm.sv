// gclk_ctrl_xbm: gated-clock stage controller following an extended burst
// mode (XBM) specification with four states:
//   0 (clk low, idle)     --CLK+ & Valid-i=0-->  1
//   0                     --CLK+ & Valid-i=1-->  2  output Valid-o+, GCLK+
//   1 (clk high, idle)    --CLK-------------->   0
//   2 (clk high, active)  --CLK- ------------>   3  output GCLK-
//   3 (clk low, active)   --CLK+ & Valid-i=1-->  2  output GCLK+
//   3                     --CLK+ & Valid-i=0-->  1  output Valid-o-
// So Valid-o is Valid-i as seen at the last rising edge, and GCLK repeats
// the high phase of CLK in the cycles that start with Valid-i = 1.
//
// Implementation. The state is held as two bits: the phase of the clock and
// a "burst active" bit updated on every rising edge with valid_i, which is
// Valid-o itself (states 2 and 3 are the active ones). GCLK must rise at the
// same instant as CLK, so it cannot wait for the active bit, which only
// settles after that edge: as in any glitch-free clock gate, valid_i is
// held by a latch that is transparent in the low phase (state 0 or 3, where
// the specification waits for CLK+ and reads Valid-i) and ANDed with
// clk_i. The outputs are then the specification's in every state, under
// the specification's own condition that Valid-i is stable when CLK rises.
// The asynchronous gate-level realisation with its feedback variables
// (zzz00, zzz01) depends on gate delays and is modelled separately, for
// simulation, in gclk_ctrl_xbm_gates; this is its synchronous equivalent.
// The reset to state 0 is this design's choice.
//
// The latch is intended: it keeps the gated clock free of glitches.
module gclk_ctrl_xbm (
  input  logic clk_i,    // free-running clock
  input  logic rst_ni,   // asynchronous reset to state 0, active low
  input  logic valid_i,  // Valid-i
  output logic gclk_o,   // GCLK
  output logic valid_o,  // Valid-o
  output logic [1:0] state_o  // current XBM state number, for observation
);

  typedef enum logic [1:0] {
    S_IDLE_LO   = 2'd0,
    S_IDLE_HI   = 2'd1,
    S_ACTIVE_HI = 2'd2,
    S_ACTIVE_LO = 2'd3
  } xbm_state_e;

  logic       active;  // set in states 2 and 3
  logic       arm;     // valid_i held over the high phase
  xbm_state_e state;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) active <= 1'b0;
    else         active <= valid_i;
  end

  always_latch begin
    if (!rst_ni)     arm = 1'b0;
    else if (!clk_i) arm = valid_i;
  end

  always_comb begin
    unique case ({active, clk_i})
      2'b00:   state = S_IDLE_LO;
      2'b01:   state = S_IDLE_HI;
      2'b11:   state = S_ACTIVE_HI;
      default: state = S_ACTIVE_LO;
    endcase
  end

  assign valid_o = active;
  assign gclk_o  = arm & clk_i;
  assign state_o = state;

endmodule
