// gclk_ctrl_xbm_gates: behavioural, timed gate-level model of the
// asynchronous controller that implements the extended-burst-mode (XBM)
// gated-clock specification (see gclk_ctrl_xbm for the state table). This is
// a simulation model: its function depends on gate delays, so it is not
// meant for synthesis; gclk_ctrl_xbm is the synthesizable equivalent.
//
// The netlist has three feedback variables, each an OR of ANDs:
//   zzz00   = CLK & zzz00  |  CLK & Valid-i & ~zzz01     (active burst)
//   zzz01   = CLK & zzz01  |  CLK & ~Valid-i & ~zzz00    (idle burst)
//   Valid-o = zzz00        |  Valid-o & ~zzz01
//   GCLK    = zzz00 & CLK
// When CLK rises, exactly one of zzz00 / zzz01 sets, depending on Valid-i,
// and holds (each blocks the other) until CLK falls and clears both. zzz00
// is the gated clock pulse and sets Valid-o; zzz01 clears Valid-o. The
// states of the specification are: 0 = all low, 1 = zzz01 set,
// 2 = zzz00 set (Valid-o high), 3 = CLK low with Valid-o high.
//
// Timing: every gate has the delay TGATE. GCLK rises two gate delays after
// CLK (AND, OR, then the output AND), Valid-o three to four. A downstream
// controller reads Valid-i within two gate delays of CLK rising and then
// locks itself, so the later change of the upstream Valid-o cannot reach it
// in the same cycle. As in the original circuit, Valid-i must not change
// within two gate delays of CLK rising.
//
// The gates and their connections follow the published logic diagram. The
// AND with rst_ni on Valid-o is an addition of this model: the diagram has
// no reset, and a two-state simulation would otherwise start with an
// arbitrary Valid-o. The feedback loops are the circuit's state-holding
// elements and are intended; tools report them as combinational loops.
module gclk_ctrl_xbm_gates #(
  parameter int unsigned TGATE = 20   // gate delay in ps
) (
  input  logic clk_i,    // CLK
  input  logic rst_ni,   // clears Valid-o, active low
  input  logic valid_i,  // Valid-i
  output logic gclk_o,   // GCLK
  output logic valid_o,  // Valid-o
  output logic zzz00_o,  // state variable: active burst
  output logic zzz01_o   // state variable: idle burst
);

  timeunit 1ps;
  timeprecision 1ps;

  logic zzz00, zzz01, vo;
  logic n_zzz01, n_zzz00, n_valid;
  logic a_hold_vo, vo_set;
  logic a_hold00, a_set00, a_hold01, a_set01;

  // Valid-o
  assign #(TGATE) n_zzz01   = ~zzz01;
  assign #(TGATE) a_hold_vo = n_zzz01 & vo;
  assign #(TGATE) vo_set    = a_hold_vo | zzz00;
  assign #(TGATE) vo        = vo_set & rst_ni;

  // GCLK
  assign #(TGATE) gclk_o    = zzz00 & clk_i;

  // zzz00
  assign #(TGATE) a_hold00  = clk_i & zzz00;
  assign #(TGATE) a_set00   = clk_i & valid_i & n_zzz01;
  assign #(TGATE) zzz00     = a_hold00 | a_set00;

  // zzz01
  assign #(TGATE) n_valid   = ~valid_i;
  assign #(TGATE) n_zzz00   = ~zzz00;
  assign #(TGATE) a_hold01  = clk_i & zzz01;
  assign #(TGATE) a_set01   = clk_i & n_valid & n_zzz00;
  assign #(TGATE) zzz01     = a_hold01 | a_set01;

  assign valid_o = vo;
  assign zzz00_o = zzz00;
  assign zzz01_o = zzz01;

endmodule
