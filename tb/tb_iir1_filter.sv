// End-to-end test of iir1_filter at its default (and only) size.
//
// Runs the responses the filter was characterised with:
//   - impulse and step of magnitude 63 with a = 0, b = 8/16 (expected output
//     31, 31, 0, 0, 0 and 31, 62, 62, 62, 62);
//   - low-pass sine responses with a = b = 5/16 (0.3125, the nearest 4-bit
//     value to a Butterworth design with cutoff 0.15 Fs) at 0.025 Fs
//     (41 samples), 0.15 Fs (14 samples) and 0.25 Fs (9 samples), input
//     amplitude 63; the outputs are compared exactly with a reference model
//     and, where the published response is known, within 0.05 of full scale;
//   - a random run over all coefficients and both AS / AS2 settings.
// Each sample is applied before a rising edge and the output register must
// hold its response right after that edge: one sample per clock, one clock
// of latency. Counts how often each mechanism was exercised (zero at -1 and
// +1, positive and negative pole, negative input through the absolute-value
// stage, negative feedback) and fails if one never was.
module tb_iir1_filter;
  import iir_pkg::*;

  logic    clk = 0;
  logic    rst_n;
  sample_t x;
  coef_t   b, a;
  logic    as_sel, as2;
  sample_t k, o;
  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_zero_m1 = 0, n_zero_p1 = 0, n_pole_pos = 0, n_pole_neg = 0;
  int n_neg_in = 0, n_neg_fb = 0;

  // reference model state
  int ref_p_prev, ref_y;

  iir1_filter dut (.clk(clk), .rst_n(rst_n), .x(x), .b(b), .as(as_sel), .a(a),
                   .as2(as2), .k(k), .o(o));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tdiv16(int v);
    return v / 16;   // truncates toward zero
  endfunction

  task automatic restart();
    @(negedge clk);
    rst_n = 0; x = '0;
    #1 rst_n = 1;
    ref_p_prev = 0; ref_y = 0;
    checks++;
    if (o != 0) begin failures++; $display("reset did not clear the output"); end
  endtask

  // Apply one sample, clock it, compare with the reference model. Returns
  // the filter output.
  task automatic step(input int xv, output int got);
    int p, kk, fb;
    @(negedge clk);
    x = sample_t'(xv);
    p  = tdiv16(xv * int'(b));
    kk = int'(sample_t'(as_sel ? p + ref_p_prev : p - ref_p_prev));
    fb = tdiv16(int'(a) * ref_y);
    #1;
    checks++;
    if (int'(k) != kk) begin
      failures++;
      if (failures < 20) $display("x=%0d: k=%0d expected %0d", xv, k, kk);
    end
    if (as_sel) n_zero_m1++; else n_zero_p1++;
    if (a != 0) begin
      if (as2) n_pole_pos++; else n_pole_neg++;
      if (ref_y < 0) n_neg_fb++;
    end
    if (xv < 0 && b != 0) n_neg_in++;
    ref_p_prev = p;
    ref_y = int'(sample_t'(as2 ? kk + fb : kk - fb));
    @(posedge clk);
    #1;
    got = int'(o);
    checks++;
    if (got != ref_y) begin
      failures++;
      if (failures < 20) $display("x=%0d: o=%0d expected %0d", xv, got, ref_y);
    end
  endtask

  task automatic expect_exact(input string what, input int n, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s sample %0d: %0d, published %0d", what, n, got, want);
    end
  endtask

  // compare a normalised output with a published normalised value
  task automatic expect_near(input string what, input int n, input int got, input real want);
    real norm;
    norm = real'(got) / 63.0;
    checks++;
    if (norm - want > 0.05 || want - norm > 0.05) begin
      failures++;
      $display("%s sample %0d: %f, published %f", what, n, norm, want);
    end
  endtask

  function automatic int sine63(real f, int n);
    return $rtoi($floor(63.0 * $sin(2.0 * 3.14159265358979 * f * n) + 0.5));
  endfunction

  initial begin
    int got, peak;
    automatic int imp_want[5]  = '{31, 31, 0, 0, 0};
    automatic int step_want[5] = '{31, 62, 62, 62, 62};
    automatic real f25_want[9] = '{0.0, 0.30, 0.38, -0.20, -0.35, 0.21, 0.37, -0.20, -0.35};
    automatic real f15_want[13] = '{0.0, 0.24, 0.59, 0.54, 0.06, -0.46, -0.62, -0.27, 0.30,
                          0.61, 0.41, -0.11, -0.56};

    rst_n = 0; x = '0; b = '0; a = '0; as_sel = 1; as2 = 1;
    repeat (2) @(posedge clk);
    ref_p_prev = 0; ref_y = 0;
    #1 rst_n = 1;

    // impulse response, a = 0, b = 0.5
    b = 4'b1000; a = 4'b0000; as_sel = 1; as2 = 1;
    restart();
    for (int n = 0; n < 5; n++) begin
      step(n == 0 ? 63 : 0, got);
      expect_exact("impulse", n, got, imp_want[n]);
    end

    // step response, a = 0, b = 0.5
    restart();
    for (int n = 0; n < 5; n++) begin
      step(63, got);
      expect_exact("step", n, got, step_want[n]);
    end

    // low-pass sine responses, a = b = 0.3125
    b = 4'b0101; a = 4'b0101; as_sel = 1; as2 = 1;
    restart();
    peak = 0;
    for (int n = 0; n <= 40; n++) begin
      step(sine63(0.025, n), got);
      if (got > peak) peak = got;
    end
    expect_near("0.025Fs peak", 0, peak, 0.86);

    restart();
    for (int n = 0; n < 14; n++) begin
      step(sine63(0.15, n), got);
      if (n < 13) expect_near("0.15Fs", n, got, f15_want[n]);
    end

    restart();
    for (int n = 0; n < 9; n++) begin
      step(sine63(0.25, n), got);
      expect_near("0.25Fs", n, got, f25_want[n]);
    end

    // high-pass setting: zero at z = +1, pole at z = -a
    b = 4'b0111; a = 4'b0011; as_sel = 0; as2 = 0;
    restart();
    for (int n = 0; n < 40; n++) step(sine63(0.25, n), got);

    // random coefficients, controls and samples
    restart();
    for (int n = 0; n < 3000; n++) begin
      if (n % 50 == 0) begin
        b = coef_t'($urandom); a = coef_t'($urandom);
        as_sel = 1'($urandom); as2 = 1'($urandom);
      end
      step(int'($signed(7'($urandom))), got);
    end

    $display("zero at -1: %0d, zero at +1: %0d, positive pole: %0d, negative pole: %0d",
             n_zero_m1, n_zero_p1, n_pole_pos, n_pole_neg);
    $display("negative input samples: %0d, negative feedback samples: %0d", n_neg_in, n_neg_fb);
    checks++;
    if (n_zero_m1 == 0 || n_zero_p1 == 0 || n_pole_pos == 0 || n_pole_neg == 0 ||
        n_neg_in == 0 || n_neg_fb == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
