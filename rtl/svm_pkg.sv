// svm_pkg: number formats and shared arithmetic of the pipelined RBF-kernel
// SVM classifier.
//
// All feature, support-vector, squared-distance, kernel and Lagrange
// multiplier values are 18-bit signed fixed point with 14 fraction bits
// (4 integer bits including the sign, range -8 .. 8-2^-14). Products of
// two such values and the accumulated decision value are 36-bit signed with
// 28 fraction bits. The 18/36-bit widths are the classifier's; the split of
// the 18 bits into 4 integer and 14 fraction bits is taken from the 14-bit
// fraction precision of the exponential and is applied to every 18-bit value.
// Narrowing follows the usual fixed-point-library defaults: round to nearest
// (half away from zero for positive values, i.e. add half an LSB) and
// saturate.
package svm_pkg;

  localparam int unsigned DATA_W = 18;  // every operand register
  localparam int unsigned FRAC_W = 14;  // fraction bits of a DATA_W value
  localparam int unsigned ACC_W  = 36;  // products, sums, bias
  localparam int unsigned DIM    = 2;   // coordinates per support vector

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Which gated-clock controller drives the pipeline registers.
  typedef enum logic [1:0] {
    CTRL_XBM       = 2'd0,  // extended-burst-mode specification, synchronous form
    CTRL_LATCH     = 2'd1,  // two transparent latches and a gate
    CTRL_XBM_GATES = 2'd2   // timed gate-level model of the XBM circuit (simulation only)
  } ctrl_kind_e;

  localparam data_t DATA_MAX = data_t'({1'b0, {(DATA_W-1){1'b1}}});

endpackage
