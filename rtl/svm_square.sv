// svm_square: squared difference of one support-vector coordinate and the
// matching test-vector coordinate, Square(i,k) = (SV(i,k) - Test(k))^2.
//
// Purely combinational; it sits between the input register bank and the
// first pipeline register (stage 1 of the classifier). Inputs and output are
// 18-bit fixed point with 14 fraction bits, as the classifier's datapath
// carries 18 bits into and out of every Square unit. The exact 38-bit square
// is brought back to 18 bits by rounding to nearest (adding half an LSB
// before the shift) and saturating to the largest positive value; the
// rounding and saturation modes are this design's choice, modelled on the
// defaults of common fixed-point libraries.
module svm_square
  import svm_pkg::*;
(
  input  data_t sv_i,    // support-vector coordinate
  input  data_t test_i,  // test-vector coordinate
  output data_t sq_o     // (sv_i - test_i)^2, >= 0
);

  localparam int unsigned PW = 2 * DATA_W + 2;

  logic signed [DATA_W:0] diff;
  logic signed [PW-1:0]   prod;
  logic        [PW-1:0]   rnd;

  always_comb begin
    diff = {sv_i[DATA_W-1], sv_i} - {test_i[DATA_W-1], test_i};
    prod = PW'(diff) * PW'(diff);
    rnd  = (PW'(prod) + PW'(1 << (FRAC_W - 1))) >> FRAC_W;
    if (rnd > PW'(DATA_MAX)) sq_o = DATA_MAX;
    else                     sq_o = data_t'(rnd);
  end

endmodule
