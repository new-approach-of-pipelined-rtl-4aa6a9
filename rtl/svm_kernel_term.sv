// svm_kernel_term: one support vector's contribution to the decision value,
// the "Adder + EXP + Multiplier" column of pipeline stage 2:
//   Adder1 = Square(i,1) + Square(i,2)
//   Exp    = EXP(Adder1)            (RBF kernel look-up table)
//   Mult   = Alpha(i) * Exp
//
// Combinational. The two squares and Adder1 are 18-bit fixed point with 14
// fraction bits; Adder1 saturates at the largest positive 18-bit value
// (the saturation is this design's choice; the squares are never negative).
// Alpha(i) is an 18-bit signed value that already carries the label sign of
// the support vector (alpha_i * y_i), an assumption of this design. The
// product keeps all 36 bits (28 fraction bits), as the datapath does.
module svm_kernel_term
  import svm_pkg::*;
#(
  parameter int unsigned EXP_ADDR_W = 10,
  parameter real         SIGMA      = 0.9
) (
  input  data_t sq1_i,    // Square(i,1)
  input  data_t sq2_i,    // Square(i,2)
  input  data_t alpha_i,  // Alpha(i), signed
  output data_t dist_o,   // Adder1(i), for observation
  output data_t exp_o,    // Exp(i), for observation
  output acc_t  mult_o    // Mult(i) = Alpha(i) * Exp(i)
);

  logic [DATA_W:0] sum;

  always_comb begin
    sum = {1'b0, sq1_i} + {1'b0, sq2_i};
    if (sq1_i[DATA_W-1] || sq2_i[DATA_W-1] || sum > (DATA_W+1)'(DATA_MAX))
      dist_o = DATA_MAX;
    else
      dist_o = data_t'(sum);
  end

  svm_exp_lut #(
    .ADDR_W (EXP_ADDR_W),
    .SIGMA  (SIGMA)
  ) u_exp (
    .d_i   (dist_o),
    .exp_o (exp_o)
  );

  assign mult_o = acc_t'(alpha_i) * acc_t'(exp_o);

endmodule
