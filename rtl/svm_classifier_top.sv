// svm_classifier_top: three-stage pipelined classifier of a two-class
// support vector machine with a radial-basis-function (RBF) kernel,
//   score = sum_i Alpha(i) * exp(-|SV(i) - Test|^2 / (2*sigma^2)) + Bias,
//   class = +1 if score > 0, else -1,
// for NUM_SV support vectors of two coordinates each. One instance is one
// "one-versus-all" machine of a multi-class recogniser; its support vectors,
// multipliers and bias are loaded into registers.
//
// Pipeline (one register rank per stage boundary, each clocked by the gated
// clock of its own controller):
//   rank 1  RSV(i,k), RTest(k)        loaded on GCLK1 when l_sv_i is high
//   stage 1 Square(i,k) = (SV(i,k) - Test(k))^2          2*NUM_SV units
//   rank 2  squares
//   stage 2 Adder1 -> EXP() look-up -> Multiplier by Alpha(i)  NUM_SV units
//   rank 3  products (36 bits)
//   stage 3 adder over all products, + Bias, comparison with 0
//   rank 4  class (Final_Res) and score
// The controllers are chained by their valid flags: start_i is the first
// controller's Valid-i, each Valid-o is the next Valid-i, and the last
// Valid-o is valid_o. A rank's gated clock only pulses in a cycle that
// starts with its Valid-i set, so ranks holding no new data are not
// clocked. The Alpha and Bias registers are loaded on the free-running clock
// by l_alpha_i and l_bias_i.
//
// Timing: drive start_i, l_sv_i, sv_i and test_i before a rising edge of
// clk_i (e.g. on the falling edge). The sample is taken at that edge; its
// class and score appear just after the third rising edge after it, with
// valid_o high for one cycle per sample. A new sample can be taken every
// cycle. Alpha must not be loaded at an edge that moves a sample out of
// rank 2, nor Bias at one that moves a sample out of rank 3 (assertions
// check both); loading while the pipeline is empty is always safe.
// The assertions are disabled during reset by reading the asynchronous
// reset; lint notes that the reset net is then used both ways, which is
// harmless here.
//
// From the classifier: the three stages and their contents, the 18-bit
// operands and 36-bit products and sums, 30 support vectors, sigma = 0.9,
// the load strobes, the two controller types (CTRL selects the
// synchronous XBM controller, the latch controller, or the timed gate-level
// model of the asynchronous XBM circuit, which is for simulation only). This design's own choices:
// the 4.14 fixed-point split of the 18-bit values (from the 14-bit fraction
// precision of the exponential), rounding and saturation, the look-up table
// depth, the reset, the score output, and the Alpha and Bias registers being
// on the free-running clock.
module svm_classifier_top
  import svm_pkg::*;
#(
  parameter int unsigned NUM_SV     = 30,
  parameter int unsigned EXP_ADDR_W = 10,
  parameter real         SIGMA      = 0.9,
  parameter ctrl_kind_e  CTRL       = CTRL_XBM
) (
  input  logic  clk_i,
  input  logic  rst_ni,                  // asynchronous, active low
  input  logic  start_i,                 // Valid-i of the first stage
  input  logic  l_sv_i,                  // LSV: load RSV and RTest
  input  data_t sv_i    [NUM_SV][DIM],   // support vectors
  input  data_t test_i  [DIM],           // test vector
  input  logic  l_alpha_i,               // LAlpha
  input  data_t alpha_i [NUM_SV],        // signed multipliers alpha*y
  input  logic  l_bias_i,                // LBias
  input  acc_t  bias_i,                  // bias, 28 fraction bits
  output logic  valid_o,                 // result below is new
  output logic  class_pos_o,             // Final_Res: 1 = class +1, 0 = -1
  output acc_t  score_o                  // decision value of that result
);

  localparam int unsigned RANKS = 4;

  // ---------------------------------------------------------------- control
  logic [RANKS-1:0] gclk;
  logic [RANKS:0]   valid;

  assign valid[0] = start_i;

  for (genvar r = 0; r < RANKS; r++) begin : g_ctrl
    gclk_ctrl #(.KIND(CTRL)) u_ctrl (
      .clk_i   (clk_i),
      .rst_ni  (rst_ni),
      .valid_i (valid[r]),
      .gclk_o  (gclk[r]),
      .valid_o (valid[r+1])
    );
  end

  assign valid_o = valid[RANKS];

  // ------------------------------------------------- rank 1 and stage 1
  data_t rsv   [NUM_SV][DIM];
  data_t rtest [DIM];
  data_t sq    [NUM_SV][DIM];
  data_t sq_q  [NUM_SV][DIM];

  for (genvar k = 0; k < DIM; k++) begin : g_test
    gated_reg #(.WIDTH(DATA_W)) u_rtest (
      .gclk_i (gclk[0]),
      .load_i (l_sv_i),
      .d_i    (test_i[k]),
      .q_o    (rtest[k])
    );
  end

  for (genvar i = 0; i < NUM_SV; i++) begin : g_sv
    for (genvar k = 0; k < DIM; k++) begin : g_dim
      gated_reg #(.WIDTH(DATA_W)) u_rsv (
        .gclk_i (gclk[0]),
        .load_i (l_sv_i),
        .d_i    (sv_i[i][k]),
        .q_o    (rsv[i][k])
      );

      svm_square u_square (
        .sv_i   (rsv[i][k]),
        .test_i (rtest[k]),
        .sq_o   (sq[i][k])
      );

      gated_reg #(.WIDTH(DATA_W)) u_rsq (
        .gclk_i (gclk[1]),
        .load_i (1'b1),
        .d_i    (sq[i][k]),
        .q_o    (sq_q[i][k])
      );
    end
  end

  // ------------------------------------------------------------- stage 2
  data_t ralpha [NUM_SV];
  acc_t  mult   [NUM_SV];
  acc_t  mult_q [NUM_SV];

  for (genvar i = 0; i < NUM_SV; i++) begin : g_term
    data_t dist_unused, exp_unused;

    gated_reg #(.WIDTH(DATA_W)) u_ralpha (
      .gclk_i (clk_i),
      .load_i (l_alpha_i),
      .d_i    (alpha_i[i]),
      .q_o    (ralpha[i])
    );

    svm_kernel_term #(
      .EXP_ADDR_W (EXP_ADDR_W),
      .SIGMA      (SIGMA)
    ) u_term (
      .sq1_i   (sq_q[i][0]),
      .sq2_i   (sq_q[i][1]),
      .alpha_i (ralpha[i]),
      .dist_o  (dist_unused),
      .exp_o   (exp_unused),
      .mult_o  (mult[i])
    );

    gated_reg #(.WIDTH(ACC_W)) u_rmult (
      .gclk_i (gclk[2]),
      .load_i (1'b1),
      .d_i    (mult[i]),
      .q_o    (mult_q[i])
    );
  end

  // ------------------------------------------------------------- stage 3
  acc_t rbias;
  acc_t score;
  logic class_pos;

  gated_reg #(.WIDTH(ACC_W)) u_rbias (
    .gclk_i (clk_i),
    .load_i (l_bias_i),
    .d_i    (bias_i),
    .q_o    (rbias)
  );

  svm_decision #(.NUM_SV(NUM_SV)) u_decision (
    .mult_i      (mult_q),
    .bias_i      (rbias),
    .score_o     (score),
    .class_pos_o (class_pos)
  );

  // ---------------------------------------------------------- interface rules
  // A weight load must not coincide with the edge at which a sample leaves
  // rank 2 (its product is formed with the weights), nor a bias load with
  // the edge at which a sample leaves rank 3: which value the sample sees
  // would then depend on how far the gated clock lags the free-running one.
  a_alpha_load_safe: assert property (
    @(posedge clk_i) disable iff (!rst_ni) l_alpha_i |-> !valid[2])
    else $error("Alpha loaded while a sample is in stage 2");

  a_bias_load_safe: assert property (
    @(posedge clk_i) disable iff (!rst_ni) l_bias_i |-> !valid[3])
    else $error("Bias loaded while a sample is in stage 3");

  gated_reg #(.WIDTH(ACC_W + 1)) u_result (
    .gclk_i (gclk[3]),
    .load_i (1'b1),
    .d_i    ({class_pos, score}),
    .q_o    ({class_pos_o, score_o})
  );

endmodule
