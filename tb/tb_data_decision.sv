// tb_data_decision: for every PHI_AVG1 value and random samples, the bit must
// be the sign of sample 1 when the sample-2-to-boundary distance is below
// 1/4 UI and the sign of sample 2 otherwise.
module tb_data_decision;
  import dfe_pkg::*;

  dval_t  d1, d2;
  phase_t phi_avg1;
  logic   b, use_s1;
  int     checks = 0, failures = 0;

  data_decision dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 100; r++) begin
      for (int p = 0; p < 64; p++) begin
        int  a, c;
        real dist_ui;
        logic exp_b;
        a = 2 * int'($urandom_range(0, 93)) - 93;
        c = 2 * int'($urandom_range(0, 93)) - 93;
        d1 = dval_t'(a); d2 = dval_t'(c); phi_avg1 = phase_t'(p);
        #1;
        dist_ui  = real'(p) / 64.0;
        exp_b = (dist_ui < 0.25) ? (a > 0) : (c > 0);
        checks++;
        if (b !== exp_b || use_s1 !== (dist_ui < 0.25)) begin
          failures++;
          if (failures < 10) $display("p=%0d d=%0d,%0d: b=%0b", p, a, c, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
