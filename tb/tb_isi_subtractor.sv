// tb_isi_subtractor: checks the speculative ISI subtraction. Reference, in
// ADC LSB: d^0 = (S - 15.5) + c and d^1 = (S - 15.5) - c, with c = c1 for odd
// and c2 for even sample numbers; the block's outputs are in half-LSB units.
module tb_isi_subtractor;
  import dfe_pkg::*;

  sample_t s_ext [0:N_SAMP];
  coef_t   c1, c2;
  dval_t   d0 [0:N_SAMP];
  dval_t   d1 [0:N_SAMP];
  int      checks = 0, failures = 0;

  isi_subtractor dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2000; r++) begin
      foreach (s_ext[i]) s_ext[i] = sample_t'($urandom);
      c1 = coef_t'($urandom);
      c2 = coef_t'($urandom);
      if (r == 0) begin c1 = '1; c2 = '1; foreach (s_ext[i]) s_ext[i] = '0; end
      if (r == 1) begin c1 = '1; c2 = '1; foreach (s_ext[i]) s_ext[i] = '1; end
      #1;
      for (int i = 0; i <= N_SAMP; i++) begin
        real v, c, e0, e1;
        v  = real'(s_ext[i]) - 15.5;
        c  = (i % 2 == 1) ? real'(c1) : real'(c2);
        e0 = v + c;
        e1 = v - c;
        checks++;
        if (real'(d0[i]) != 2.0 * e0 || real'(d1[i]) != 2.0 * e1) begin
          failures++;
          if (failures < 10)
            $display("S[%0d]=%0d: d0=%0d d1=%0d expected %0.1f %0.1f", i, s_ext[i],
                     d0[i], d1[i], 2.0 * e0, 2.0 * e1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
