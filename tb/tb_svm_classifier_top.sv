// tb_svm_classifier_top: end-to-end test of the pipelined classifier at its
// default size (30 support vectors, XBM stage controllers).
//
// The workload has the shape of the recogniser's test: 30 one-versus-all
// machines (one per class), each with 30 random support vectors, signed
// multipliers and a bias, and 60 test vectors classified by every machine
// (1800 classifications). For each machine the Alpha and Bias registers are
// loaded (LAlpha, LBias), then the 60 samples are streamed with LSV, mostly
// back to back and with random idle cycles in between; a few samples are
// sent with LSV low and must reuse the vector already held. Some test
// vectors lie far from every support vector, which saturates the squares.
//
// Each result is compared with a model written here from the formulas:
// squares and their sum with rounding and saturation in 64-bit integers,
// the kernel from exp() in floating point at the table's sampling points,
// and the decision value in 64 bits. The kernel may differ by one LSB from
// the table, so the score is checked within sum|alpha| and the class only
// when the model's score is further than that from zero. The testbench
// also checks that every result appears exactly three cycles after its
// sample was taken, that each rank's gated clock pulsed once per sample,
// and that an idle cycle leaves the input registers alone; it counts every
// mechanism and fails if one never happened.
module tb_svm_classifier_top;
  timeunit 1ns;
  timeprecision 1ps;
  import svm_pkg::*;

  localparam int N        = 30;   // support vectors, DUT default
  localparam int MACHINES = 30;   // classes, one machine each
  localparam int TESTS    = 60;   // test vectors
  localparam int LAT      = 3;    // pipeline latency in cycles

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  start = 1'b0, l_sv = 1'b0, l_alpha = 1'b0, l_bias = 1'b0;
  data_t sv    [N][DIM];
  data_t test  [DIM];
  data_t alpha [N];
  acc_t  bias;
  logic  valid_o, class_pos;
  acc_t  score;

  svm_classifier_top dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start),
    .l_sv_i(l_sv), .sv_i(sv), .test_i(test),
    .l_alpha_i(l_alpha), .alpha_i(alpha),
    .l_bias_i(l_bias), .bias_i(bias),
    .valid_o(valid_o), .class_pos_o(class_pos), .score_o(score)
  );

  always #5 clk = ~clk;

  // ------------------------------------------------------------ stimulus
  data_t m_sv    [MACHINES][N][DIM];
  data_t m_alpha [MACHINES][N];
  acc_t  m_bias  [MACHINES];
  data_t tv      [TESTS][DIM];

  typedef struct {
    longint score;
    longint tol;
    longint cycle;
  } expect_t;
  expect_t pending [$];

  int checks = 0, failures = 0;
  longint cycle = 0;
  int samples = 0, back_to_back = 0, bubbles = 0, reuse = 0;
  int reloads = 0, n_pos = 0, n_neg = 0, n_sat = 0, results = 0;
  int gpulse [4] = '{0, 0, 0, 0};
  logic prev_start = 1'b0;

  always @(posedge clk) cycle++;
  always @(posedge dut.gclk[0]) gpulse[0]++;
  always @(posedge dut.gclk[1]) gpulse[1]++;
  always @(posedge dut.gclk[2]) gpulse[2]++;
  always @(posedge dut.gclk[3]) gpulse[3]++;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s (cycle %0d)", msg, cycle);
  endtask

  function automatic longint sq_model(longint a, longint b);
    longint d, r;
    d = a - b;
    r = (d * d + 8192) / 16384;
    return (r > 131071) ? 131071 : r;
  endfunction

  function automatic longint exp_model(longint x);
    real xr;
    xr = real'((x >> 7) << 7) / 16384.0;
    return longint'($rtoi($exp(-xr / (2.0 * 0.81)) * 16384.0 + 0.5));
  endfunction

  // model of one classification with the vectors currently presented
  function automatic expect_t model(int mc, data_t t [DIM], data_t s [N][DIM]);
    expect_t e;
    longint sum, tol, d;
    sum = longint'(m_bias[mc]);
    tol = 1;
    for (int i = 0; i < N; i++) begin
      d = sq_model(longint'(s[i][0]), longint'(t[0])) + sq_model(longint'(s[i][1]), longint'(t[1]));
      if (d > 131071) d = 131071;
      if (d == 131071) n_sat++;
      sum += longint'(m_alpha[mc][i]) * exp_model(d);
      tol += (m_alpha[mc][i] < 0) ? -longint'(m_alpha[mc][i]) : longint'(m_alpha[mc][i]);
    end
    e.score = sum;
    e.tol   = tol;
    e.cycle = 0;
    return e;
  endfunction

  function automatic data_t rnd(int lo, int hi);
    return data_t'(lo + int'($urandom_range(0, hi - lo)));
  endfunction

  // --------------------------------------------------------------- checker
  always @(negedge clk) begin
    if (rst_n && valid_o) begin
      expect_t e;
      longint diff;
      results++;
      checks += 3;
      if (pending.size() == 0) begin
        fail("result without a sample");
      end else begin
        e = pending.pop_front();
        if (cycle != e.cycle + LAT) fail($sformatf("latency %0d", cycle - e.cycle));
        diff = longint'(score) - e.score;
        if (diff > e.tol || diff < -e.tol)
          fail($sformatf("score %0d, model %0d +- %0d", score, e.score, e.tol));
        if (e.score > e.tol || e.score < -e.tol) begin
          if (class_pos != (e.score > 0))
            fail($sformatf("class %b for model score %0d", class_pos, e.score));
          if (e.score > 0) n_pos++; else n_neg++;
        end
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t held_t [DIM];
    data_t held_s [N][DIM];
    int mc;

    for (int m = 0; m < MACHINES; m++) begin
      for (int i = 0; i < N; i++) begin
        m_sv[m][i][0]  = rnd(-32768, 32768);
        m_sv[m][i][1]  = rnd(-32768, 32768);
        m_alpha[m][i]  = rnd(-24576, 24576);
      end
      m_bias[m] = acc_t'(longint'($urandom_range(0, 1 << 28)) - (longint'(1) << 27));
    end
    for (int t = 0; t < TESTS; t++) begin
      if (t % 10 == 9) begin              // far from everything
        tv[t][0] = rnd(100000, 131071);
        tv[t][1] = rnd(-131072, -100000);
      end else begin                      // near a support vector of machine t%30
        tv[t][0] = data_t'(m_sv[t % MACHINES][t % N][0] + rnd(-8192, 8192));
        tv[t][1] = data_t'(m_sv[t % MACHINES][t % N][1] + rnd(-8192, 8192));
      end
    end
    foreach (sv[i, k]) sv[i][k] = '0;
    foreach (alpha[i]) alpha[i] = '0;
    test = '{default: '0};
    bias = '0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (mc = 0; mc < MACHINES; mc++) begin
      // load the machine's multipliers and bias; the pipeline is empty
      @(negedge clk);
      start   = 1'b0;
      l_sv    = 1'b0;
      alpha   = m_alpha[mc];
      bias    = m_bias[mc];
      l_alpha = 1'b1;
      l_bias  = 1'b1;
      reloads++;
      @(negedge clk);
      l_alpha = 1'b0;
      l_bias  = 1'b0;
      alpha   = '{default: '0};
      bias    = '0;
      for (int t = 0; t < TESTS; t++) begin
        // optional idle cycle: garbage on the inputs, LSV high, no start
        if ($urandom_range(0, 4) == 0 && t != 0) begin
          start = 1'b0;
          l_sv  = 1'b1;
          test[0] = rnd(-131072, 131071);
          test[1] = rnd(-131072, 131071);
          sv[0][0] = rnd(-131072, 131071);
          @(negedge clk);
          bubbles++;
          checks++;
          if (dut.rtest[0] != held_t[0] || dut.rsv[0][0] != held_s[0][0])
            fail("input registers changed in an idle cycle");
        end
        if (t % 15 == 7) begin
          // reuse the held vector: LSV low, start high
          l_sv = 1'b0;
          test[0] = rnd(-131072, 131071);
          reuse++;
        end else begin
          l_sv   = 1'b1;
          test   = tv[t];
          sv     = m_sv[mc];
          held_t = tv[t];
          held_s = m_sv[mc];
        end
        start = 1'b1;
        if (prev_start) back_to_back++;
        begin
          expect_t e;
          e = model(mc, held_t, held_s);
          e.cycle = cycle + 1;            // taken at the coming rising edge
          pending.push_back(e);
        end
        samples++;
        prev_start = 1'b1;
        @(negedge clk);
      end
      start      = 1'b0;
      l_sv       = 1'b0;
      prev_start = 1'b0;
      repeat (LAT + 1) @(negedge clk);    // drain before the next machine
    end
    repeat (LAT + 2) @(negedge clk);

    checks += 5;
    if (results != samples) fail($sformatf("%0d results for %0d samples", results, samples));
    for (int r = 0; r < 4; r++)
      if (gpulse[r] != samples)
        fail($sformatf("rank %0d gated clock pulsed %0d times for %0d samples", r, gpulse[r], samples));
    $display("samples=%0d back_to_back=%0d idle_cycles=%0d lsv_low_reuse=%0d reloads=%0d",
             samples, back_to_back, bubbles, reuse, reloads);
    $display("class+1=%0d class-1=%0d saturated_distances=%0d", n_pos, n_neg, n_sat);
    checks += 7;
    if (back_to_back == 0) fail("no back-to-back samples");
    if (bubbles == 0)      fail("no idle cycles");
    if (reuse == 0)        fail("no LSV-low samples");
    if (reloads < 2)       fail("no Alpha/Bias reload");
    if (n_pos == 0)        fail("no class +1 result");
    if (n_neg == 0)        fail("no class -1 result");
    if (n_sat == 0)        fail("no saturated distance");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
