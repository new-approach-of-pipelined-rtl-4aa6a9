// gclk_ctrl: selects one of the gated-clock stage controllers, so the
// pipeline can be built with any of them: the synchronous XBM controller,
// the latch controller, or the timed gate-level model of the asynchronous
// XBM circuit (simulation only). All have the same cycle behaviour:
// gclk_o repeats clk_i in cycles that start with valid_i = 1, and valid_o is
// valid_i delayed to the next cycle.
module gclk_ctrl
  import svm_pkg::*;
#(
  parameter ctrl_kind_e KIND = CTRL_XBM
) (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic valid_i,
  output logic gclk_o,
  output logic valid_o
);

  if (KIND == CTRL_XBM) begin : g_xbm
    logic [1:0] state_unused;
    gclk_ctrl_xbm u_ctrl (
      .clk_i   (clk_i),
      .rst_ni  (rst_ni),
      .valid_i (valid_i),
      .gclk_o  (gclk_o),
      .valid_o (valid_o),
      .state_o (state_unused)
    );
  end else if (KIND == CTRL_XBM_GATES) begin : g_xbm_gates
    logic zzz00_unused, zzz01_unused;
    gclk_ctrl_xbm_gates u_ctrl (
      .clk_i   (clk_i),
      .rst_ni  (rst_ni),
      .valid_i (valid_i),
      .gclk_o  (gclk_o),
      .valid_o (valid_o),
      .zzz00_o (zzz00_unused),
      .zzz01_o (zzz01_unused)
    );
  end else begin : g_latch
    gclk_ctrl_latch u_ctrl (
      .clk_i   (clk_i),
      .rst_ni  (rst_ni),
      .valid_i (valid_i),
      .gclk_o  (gclk_o),
      .valid_o (valid_o)
    );
  end

endmodule
