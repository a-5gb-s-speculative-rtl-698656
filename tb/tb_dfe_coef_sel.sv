// tb_dfe_coef_sel: checks the coefficient selector for every PHI_AVG value
// with random coefficient sets. Reference: S2 lies in interval
// j = floor(8 * (PHI_AVG mod 1 UI)); c2 = alpha[j], c1 = alpha[(j+4) mod 8].
// Also checks the worked example of the design: S2 in I2 gives alpha2 for S2
// and alpha6 for S1.
module tb_dfe_coef_sel;
  import dfe_pkg::*;

  phase_avg_t phi_avg;
  coef_t      alpha [N_INT];
  logic [2:0] s2_interval;
  coef_t      c1, c2;
  int         checks = 0, failures = 0;

  dfe_coef_sel dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example with distinct coefficients alpha[i] = 10 + i
    foreach (alpha[i]) alpha[i] = coef_t'(10 + i);
    phi_avg = phase_avg_t'(2 * 8 + 3);      // 19/64 UI: inside I2
    #1;
    checks++;
    if (c2 !== coef_t'(12) || c1 !== coef_t'(16) || s2_interval !== 3'd2) begin
      failures++;
      $display("example: c1=%0d c2=%0d interval=%0d", c1, c2, s2_interval);
    end
    for (int r = 0; r < 20; r++) begin
      foreach (alpha[i]) alpha[i] = coef_t'($urandom);
      for (int p = 0; p < 2**(PH_INT_W + PH_W); p++) begin
        int j;
        phi_avg = phase_avg_t'(p);
        #1;
        j = (p % 64) / 8;
        checks++;
        if (c2 !== alpha[j] || c1 !== alpha[(j + 4) % 8]) begin
          failures++;
          if (failures < 10)
            $display("phi=%0d: c1=%0d c2=%0d expected %0d %0d", p, c1, c2,
                     alpha[(j + 4) % 8], alpha[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
