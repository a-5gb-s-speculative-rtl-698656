// tb_phase_detector: checks PHI_X against a real-valued interpolation of the
// zero crossing. For a crossing at time x (in UI) after sample 0, the next UI
// boundary lies x later than sample 2 (mod 1 UI), so the expected value is
// floor(64 * x). Includes hand-worked cases and random odd sample values.
module tb_phase_detector;
  import dfe_pkg::*;

  dval_t  d [0:2];
  phase_t phx;
  logic   phx_valid;
  int     checks = 0, failures = 0;

  phase_detector dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int a, int b, int c);
    int  s0, s1, s2;
    logic exp_valid;
    int  exp_phx;
    real x;
    d[0] = dval_t'(a); d[1] = dval_t'(b); d[2] = dval_t'(c);
    #1;
    s0 = (a < 0); s1 = (b < 0); s2 = (c < 0);
    exp_valid = (s0 != s1) != (s1 != s2);
    exp_phx = 0;
    if (s0 != s1) begin
      x = 0.5 * real'(a < 0 ? -a : a) / real'((a < 0 ? -a : a) + (b < 0 ? -b : b));
    end else begin
      x = 0.5 + 0.5 * real'(b < 0 ? -b : b) / real'((b < 0 ? -b : b) + (c < 0 ? -c : c));
    end
    exp_phx = int'($floor(64.0 * x + 1e-9)) % 64;
    checks++;
    if (phx_valid !== exp_valid || (exp_valid && int'(phx) != exp_phx)) begin
      failures++;
      if (failures < 10)
        $display("d=%0d,%0d,%0d: phx=%0d/%0b expected %0d/%0b", a, b, c, phx,
                 phx_valid, exp_phx, exp_valid);
    end
  endtask

  initial begin
    check(-5, 5, 7);      // crossing halfway S0..S1: 1/4 UI -> 16
    check(-5, -5, 15);    // crossing 1/4 of S1..S2: 1/2 + 1/8 -> 40
    check(9, -3, -1);     // 3/4 of S0..S1: 3/8 UI -> 24
    check(3, 5, 7);       // no crossing
    check(-3, 5, -7);     // two crossings: not valid
    check(-1, 93, 93);    // just after S0 -> 0
    check(93, 93, -1);    // just before S2 -> 63
    for (int r = 0; r < 20000; r++) begin
      int v [3];
      foreach (v[i]) v[i] = 2 * int'($urandom_range(0, 93)) - 93;
      check(v[0], v[1], v[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
