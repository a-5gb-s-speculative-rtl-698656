// tb_pd_dd_array: checks that unit u = {b[k-2], b[k-1]} of the array works
// on (S0 corrected for b[k-2], S1 and S2 corrected for b[k-1]). Each unit's
// expected (PHI_X, valid, b) comes from a real-valued reference of phase
// detection and of the nearest-to-centre decision.
module tb_pd_dd_array;
  import dfe_pkg::*;

  dval_t  d_s0 [2];
  dval_t  d_s1 [2];
  dval_t  d_s2 [2];
  phase_t phi_avg1;
  pdd_t   res [N_SPEC];
  logic   use_s1;
  int     checks = 0, failures = 0;

  pd_dd_array dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_sample();
    return 2 * int'($urandom_range(0, 93)) - 93;
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    for (int r = 0; r < 5000; r++) begin
      int v0 [2], v1 [2], v2 [2];
      int p;
      for (int i = 0; i < 2; i++) begin
        v0[i] = rnd_sample(); v1[i] = rnd_sample(); v2[i] = rnd_sample();
        d_s0[i] = dval_t'(v0[i]); d_s1[i] = dval_t'(v1[i]); d_s2[i] = dval_t'(v2[i]);
      end
      p = int'($urandom_range(0, 63));
      phi_avg1 = phase_t'(p);
      #1;
      for (int u = 0; u < 4; u++) begin
        int a, b, c, exp_phx;
        logic exp_valid, exp_b;
        real x;
        a = v0[u / 2]; b = v1[u % 2]; c = v2[u % 2];
        exp_valid = ((a < 0) != (b < 0)) != ((b < 0) != (c < 0));
        if ((a < 0) != (b < 0)) x = 0.5 * real'(iabs(a)) / real'(iabs(a) + iabs(b));
        else                    x = 0.5 + 0.5 * real'(iabs(b)) / real'(iabs(b) + iabs(c));
        exp_phx = int'($floor(64.0 * x + 1e-9)) % 64;
        exp_b   = (p < 16) ? (b > 0) : (c > 0);
        checks++;
        if (res[u].phx_valid !== exp_valid || res[u].b !== exp_b ||
            (exp_valid && int'(res[u].phx) != exp_phx)) begin
          failures++;
          if (failures < 10)
            $display("unit %0d d=%0d,%0d,%0d p=%0d: phx=%0d/%0b b=%0b", u, a, b, c, p,
                     res[u].phx, res[u].phx_valid, res[u].b);
        end
      end
      checks++;
      if (use_s1 !== (p < 16)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
