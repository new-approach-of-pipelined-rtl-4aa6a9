// gated_reg: one register of the classifier's pipeline, clocked by the
// gated clock (GCLK) of its stage controller.
//
// On each rising edge of gclk_i the register takes d_i if load_i is high and
// otherwise keeps its value. The gated clock only pulses in cycles in which
// the stage holds valid data, so the register changes only then; load_i is
// the separate load strobe the input registers have (LSV for the support
// vectors and the test vector, LAlpha, LBias) and is tied high in the
// pipeline registers between stages. The register has no reset: it is only
// read while the valid flag travelling with it is set.
module gated_reg #(
  parameter int unsigned WIDTH = 18
) (
  input  logic             gclk_i,  // gated clock
  input  logic             load_i,  // load strobe
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o
);

  always_ff @(posedge gclk_i)
    if (load_i) q_o <= d_i;

endmodule
