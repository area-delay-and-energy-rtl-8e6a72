// tb_scaling_unit: checks the K^2 and 1/K^2 scaling lanes against the reference
// model (random and extreme inputs) and against the real-valued product.
module tb_scaling_unit;
  import dwt_ref_pkg::*;
  localparam int L = 4;

  logic signed [11:0] din [L];
  logic signed [11:0] d_k2 [L], d_ik2 [L];

  scaling_unit #(.LANES(L), .COEF(dwt_pkg::K2_Q))  u_k2  (.din, .dout(d_k2));
  scaling_unit #(.LANES(L), .COEF(dwt_pkg::IK2_Q)) u_ik2 (.din, .dout(d_ik2));

  int checks = 0, failures = 0;
  int qk2, qik2;
  real rk2, rik2;

  task automatic cmp(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
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
    rk2 = R_K * R_K; rik2 = 1.0 / rk2;
    qk2 = q(rk2); qik2 = q(rik2);
    for (int n = 0; n < 1000; n++) begin
      foreach (din[i]) din[i] = 12'($urandom);
      if (n == 0) begin din[0] = 12'sh7ff; din[1] = 12'sh800; din[2] = 0; din[3] = -1; end
      #1;
      foreach (din[i]) begin
        cmp(int'(d_k2[i]),  scale(int'(din[i]), qk2),  "K2");
        cmp(int'(d_ik2[i]), scale(int'(din[i]), qik2), "IK2");
        // accuracy of the unsaturated 1/K^2 lane
        checks++;
        if ((real'(d_ik2[i]) - real'(din[i]) * rik2) > 1.0 ||
            (real'(din[i]) * rik2 - real'(d_ik2[i])) > 1.0) begin
          failures++;
          $display("FAIL accuracy IK2 din=%0d got=%0d", din[i], d_ik2[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
