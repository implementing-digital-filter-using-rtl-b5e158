// Random test of poles_circuit. The reference model keeps Y(n-1) and forms
// Y(n) = K(n) + s * trunc(a * Y(n-1) / 16), s = +1 for AS2 = 1 and -1 for
// AS2 = 0, wrapped to 8 bits; the product is rounded toward zero. After each
// rising edge the output register must hold Y(n): one clock of latency.
module tb_poles_circuit;
  import iir_pkg::*;

  logic    clk = 0;
  logic    rst_n;
  sample_t k;
  coef_t   a;
  logic    as2;
  sample_t o;
  int checks = 0;
  int failures = 0;
  int n_pos = 0, n_negc = 0, n_negfb = 0;

  poles_circuit dut (.clk(clk), .rst_n(rst_n), .k_i(k), .a_i(a), .as2_i(as2), .o_o(o));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int y_prev, fb, y_now;
    rst_n = 0; k = '0; a = '0; as2 = 1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (o != 0) failures++;   // reset clears the output register
    rst_n = 1;
    y_prev = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      k   = sample_t'($signed(8'($urandom)) >>> 1);
      a   = coef_t'($urandom);
      as2 = 1'($urandom);
      fb    = (int'(a) * y_prev) / 16;
      y_now = int'(sample_t'(as2 ? k + fb : k - fb));
      if (as2) n_pos++; else n_negc++;
      if (y_prev < 0 && a != 0) n_negfb++;
      @(posedge clk);
      #1;
      checks++;
      if (int'(o) != y_now) begin
        failures++;
        if (failures < 10)
          $display("i=%0d k=%0d a=%0d as2=%0b y(n-1)=%0d: o=%0d expected %0d",
                   i, k, a, as2, y_prev, o, y_now);
      end
      y_prev = y_now;
    end
    checks++;
    if (n_pos == 0 || n_negc == 0 || n_negfb == 0) failures++;
    $display("positive coef=%0d negative coef=%0d negative feedback=%0d", n_pos, n_negc, n_negfb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
