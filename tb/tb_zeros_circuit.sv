// Random test of zeros_circuit. A reference model computes
// p(n) = trunc(X(n) * b / 16) (rounded toward zero) and
// K(n) = p(n) + p(n-1) or p(n) - p(n-1) wrapped to 8 bits, and K is compared
// every clock. The coefficient and the AS control change at random, the
// delayed product must survive such changes, and a reset must clear it.
module tb_zeros_circuit;
  import iir_pkg::*;

  logic    clk = 0;
  logic    rst_n;
  sample_t x;
  coef_t   b;
  logic    as_sel;
  sample_t k;
  int checks = 0;
  int failures = 0;
  int n_add = 0, n_sub = 0, n_neg = 0;

  zeros_circuit dut (.clk(clk), .rst_n(rst_n), .x_i(x), .b_i(b), .as_i(as_sel), .k_o(k));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int prod(int xv, int bv);
    return (xv * bv) / 16;   // integer division truncates toward zero
  endfunction

  function automatic int wrap8(int v);
    return int'(sample_t'(v));
  endfunction

  initial begin
    int p_prev, p_now, exp_k;
    rst_n = 0; x = '0; b = '0; as_sel = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    p_prev = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i == 1000) begin
        // reset in the middle: the delayed product must clear
        rst_n = 0; #1 rst_n = 1; p_prev = 0;
      end
      x      = sample_t'($urandom);
      if (i % 7 == 0) x = (i % 2) ? 8'sh80 : 8'sh7f;
      b      = coef_t'($urandom);
      as_sel = 1'($urandom);
      #1;
      p_now = prod(int'(x), int'(b));
      exp_k = wrap8(as_sel ? p_now + p_prev : p_now - p_prev);
      checks++;
      if (int'(k) != exp_k) begin
        failures++;
        if (failures < 10)
          $display("i=%0d x=%0d b=%0d as=%0b: k=%0d expected %0d", i, x, b, as_sel, k, exp_k);
      end
      if (as_sel) n_add++; else n_sub++;
      if (x < 0) n_neg++;
      p_prev = p_now;
    end
    checks++;
    if (n_add == 0 || n_sub == 0 || n_neg == 0) failures++;
    $display("add=%0d sub=%0d negative samples=%0d", n_add, n_sub, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
