// svm_exp_lut: read-only look-up table of the RBF kernel,
// EXP(d) = exp(-d / (2*sigma^2)), where d is the squared distance between a
// support vector and the test vector.
//
// The input is an 18-bit fixed-point value with 14 fraction bits. Because a
// squared distance is never negative, only its 17 magnitude bits are used
// (0 <= d < 8); the top ADDR_W of them address the table, so the table holds
// 2^ADDR_W samples spaced 8/2^ADDR_W apart and every entry is the kernel at
// the left end of its interval (entry 0 is exactly 1.0). The output is the
// kernel value in the same 18-bit format, rounded to nearest.
//
// The kernel formula and sigma = 0.9 are the classifier's; the table depth
// (ADDR_W) and the sampling rule are this design's choice. The contents are
// computed at elaboration: r = exp(-step/(2*sigma^2)) is found by a Taylor
// series and entry i is round(r^i * 2^14). The table is combinational (a ROM
// in logic), as the unit sits inside pipeline stage 2 between the first
// adder and the multiplier.
module svm_exp_lut
  import svm_pkg::*;
#(
  parameter int unsigned ADDR_W = 10,   // log2 of the number of table entries
  parameter real         SIGMA  = 0.9   // RBF kernel width
) (
  input  data_t d_i,    // squared distance, >= 0
  output data_t exp_o   // exp(-d_i / (2*SIGMA^2))
);

  localparam int unsigned DEPTH = 1 << ADDR_W;
  localparam int unsigned MAG_W = DATA_W - 1;   // magnitude bits of d_i

  typedef data_t table_t [DEPTH];

  function automatic real taylor_exp(real x);
    real term, sum;
    term = 1.0;
    sum  = 1.0;
    for (int n = 1; n < 40; n++) begin
      term = term * x / real'(n);
      sum  = sum + term;
    end
    return sum;
  endfunction

  function automatic table_t build_table();
    table_t t;
    real    step, r, v;
    step = real'(1 << (MAG_W - FRAC_W)) / real'(DEPTH);
    r    = taylor_exp(-step / (2.0 * SIGMA * SIGMA));
    v    = 1.0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      t[i] = data_t'($rtoi(v * real'(1 << FRAC_W) + 0.5));
      v    = v * r;
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  logic [ADDR_W-1:0] addr;

  assign addr  = d_i[MAG_W-1 -: ADDR_W];
  assign exp_o = TABLE[addr];

endmodule
