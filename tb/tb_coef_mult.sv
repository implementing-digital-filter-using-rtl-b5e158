// Exhaustive test of coef_mult: every 8-bit signed sample against every
// 4-bit coefficient. The expected magnitude is floor(|x| * c / 16) computed
// with integer arithmetic, and the sign flag must equal x < 0.
module tb_coef_mult;
  import iir_pkg::*;

  sample_t             x;
  coef_t               c;
  logic [SAMPLE_W-1:0] mag;
  logic                neg;
  int checks = 0;
  int failures = 0;

  coef_mult dut (.x_i(x), .coef_i(c), .mag_o(mag), .neg_o(neg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xv, av, exp_mag;
    for (xv = -128; xv <= 127; xv++) begin
      for (int cv = 0; cv < 16; cv++) begin
        x = sample_t'(xv);
        c = coef_t'(cv);
        #1;
        av      = (xv < 0) ? -xv : xv;
        exp_mag = (av * cv) / 16;
        checks++;
        if (int'(mag) != exp_mag || neg != (xv < 0)) begin
          failures++;
          if (failures < 10)
            $display("x=%0d c=%0d: mag=%0d neg=%0b, expected %0d %0b",
                     xv, cv, mag, neg, exp_mag, xv < 0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
