// svm_decision: the "Adder + Comparator" logic of pipeline stage 3:
//   Adder2 = SUM over i of Mult(i)
//   Adder3 = Adder2 + Bias
//   Class  = +1 if Adder3 > 0, else -1
//
// Combinational. All operands are 36-bit signed fixed point with 28
// fraction bits. The sum of NUM_SV products is formed with enough guard bits
// that it cannot overflow; only Adder3 is brought back to 36 bits, by
// saturation, so the sign that decides the class is always right. (The
// guard bits and saturation are this design's choice; the summation order
// does not matter in exact integer arithmetic, so a plain sum stands for the
// adder tree.) The comparison with zero is strict: a decision value of
// exactly zero gives class -1.
module svm_decision
  import svm_pkg::*;
#(
  parameter int unsigned NUM_SV = 30
) (
  input  acc_t mult_i [NUM_SV],  // Mult(i), one per support vector
  input  acc_t bias_i,           // Bias
  output acc_t score_o,          // Adder3, saturated to 36 bits
  output logic class_pos_o       // 1: class +1, 0: class -1
);

  localparam int unsigned SUM_W = ACC_W + $clog2(NUM_SV + 1) + 1;

  localparam logic signed [SUM_W-1:0] SAT_MAX = SUM_W'({1'b0, {(ACC_W-1){1'b1}}});
  localparam logic signed [SUM_W-1:0] SAT_MIN = -SAT_MAX - SUM_W'(1);

  logic signed [SUM_W-1:0] total;

  always_comb begin
    total = SUM_W'(bias_i);
    for (int i = 0; i < int'(NUM_SV); i++)
      total = total + SUM_W'(mult_i[i]);
    if (total > SAT_MAX)      score_o = acc_t'(SAT_MAX);
    else if (total < SAT_MIN) score_o = acc_t'(SAT_MIN);
    else                      score_o = acc_t'(total);
  end

  assign class_pos_o = (score_o > acc_t'(0));

endmodule
