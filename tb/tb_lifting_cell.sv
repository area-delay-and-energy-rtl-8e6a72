// tb_lifting_cell: checks y = a + c*(b+d) for the four lifting constants against
// the reference model, with random operands and with the extreme corners that
// drive the result into saturation. Also checks that, when not saturated, the
// result is within one LSB of the real-valued product.
module tb_lifting_cell;
  import dwt_ref_pkg::*;

  logic signed [11:0] a, b, d;
  logic signed [11:0] y [4];

  lifting_cell #(.COEF(dwt_pkg::ALPHA_Q)) u0 (.a, .b, .d, .y(y[0]));
  lifting_cell #(.COEF(dwt_pkg::BETA_Q))  u1 (.a, .b, .d, .y(y[1]));
  lifting_cell #(.COEF(dwt_pkg::GAMMA_Q)) u2 (.a, .b, .d, .y(y[2]));
  lifting_cell #(.COEF(dwt_pkg::DELTA_Q)) u3 (.a, .b, .d, .y(y[3]));

  int checks = 0, failures = 0;
  real coef_r [4];
  int  coef_q [4];

  task automatic check_one();
    int exp;
    real ideal, tol;
    #1;
    for (int i = 0; i < 4; i++) begin
      exp = lc(int'(a), int'(b), int'(d), coef_q[i]);
      checks++;
      if (int'(y[i]) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL c%0d a=%0d b=%0d d=%0d y=%0d exp=%0d", i, a, b, d, y[i], exp);
      end
      ideal = real'(a) + coef_r[i] * real'(int'(b) + int'(d));
      // allowed error: half an LSB of rounding plus the constant's quantisation
      tol = (real'(coef_q[i]) / 1024.0 - coef_r[i]) * real'(int'(b) + int'(d));
      tol = 0.51 + ((tol < 0.0) ? -tol : tol);
      if (ideal < 2046.0 && ideal > -2047.0) begin
        checks++;
        if ((real'(y[i]) - ideal) > tol || (ideal - real'(y[i])) > tol) begin
          failures++;
          if (failures < 10) $display("FAIL accuracy c%0d y=%0d ideal=%f", i, y[i], ideal);
        end
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coef_r = '{R_ALPHA, R_BETA, R_GAMMA, R_DELTA};
    foreach (coef_q[i]) coef_q[i] = q(coef_r[i]);
    for (int i = 0; i < 8; i++) begin
      a = (i & 1) ? 12'sh7ff : 12'sh800;
      b = (i & 2) ? 12'sh7ff : 12'sh800;
      d = (i & 4) ? 12'sh7ff : 12'sh800;
      check_one();
    end
    a = 0; b = 0; d = 0; check_one();
    a = 100; b = 1; d = 0; check_one();
    for (int n = 0; n < 3000; n++) begin
      a = 12'($urandom);
      b = 12'($urandom);
      d = 12'($urandom);
      if (n % 3 == 0) begin  // pixel-like magnitudes
        a = 12'($urandom_range(0, 255));
        b = 12'($urandom_range(0, 255));
        d = 12'($urandom_range(0, 255));
      end
      check_one();
    end
    if (sat_count == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("saturations in model: %0d", sat_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
