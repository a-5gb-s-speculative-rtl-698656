// tb_avg_phase_recovery: (1) with a fast gain (KP_SHIFT = 3) one frame of
// eight phases 8/64 UI ahead must move PHI_AVG by exactly 8; invalid phases
// must be ignored; an error across the UI boundary must be taken the short
// way round (PHI_AVG 60, PHI_X 2 is +6, not -58). (2) A second instance at
// the default gain must converge on a fixed phase and follow a phase that
// wraps past one UI, counting the whole UI in the upper bits.
module tb_avg_phase_recovery;
  import dfe_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, frame_valid = 1'b0;
  phase_t     phx       [1:N_UI];
  logic       phx_valid [1:N_UI];
  phase_avg_t phi_fast, phi_dflt;
  logic [$clog2(N_UI+1)-1:0] nv_fast, nv_dflt;
  int         checks = 0, failures = 0;

  avg_phase_recovery #(.KP_SHIFT(3)) dut_fast (
    .clk, .rst_n, .frame_valid, .phx, .phx_valid, .phi_avg(phi_fast), .n_valid(nv_fast)
  );
  avg_phase_recovery dut_dflt (
    .clk, .rst_n, .frame_valid, .phx, .phx_valid, .phi_avg(phi_dflt), .n_valid(nv_dflt)
  );

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(int ph, int nvalid);
    @(negedge clk);
    for (int k = 1; k <= N_UI; k++) begin
      phx[k] = phase_t'(ph);
      phx_valid[k] = (k <= nvalid);
    end
    frame_valid = 1'b1;
    @(negedge clk);
    frame_valid = 1'b0;
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int ui_before;

  initial begin
    foreach (phx[k]) begin phx[k] = '0; phx_valid[k] = 1'b0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    expect_eq("reset", int'(phi_fast), 0);
    // eight valid errors of +8: sum 64, gain 1/8 -> +8
    frame(8, 8);
    expect_eq("step", int'(phi_fast), 8);
    // four valid errors of +8 (from 8 to 16) and four ignored: +4
    frame(16, 4);
    expect_eq("half valid", int'(phi_fast), 12);
    // no valid phase: no change
    frame(40, 0);
    expect_eq("none valid", int'(phi_fast), 12);
    // walk to 60, then an error of +6 across the boundary (PHI_X = 2)
    frame(60, 8);   // err 48 -> wraps to -16: 8*-16/8 = -16 -> 12-16 = -4 = 252
    expect_eq("wrap err", int'(phi_fast), 252);
    frame(2, 8);    // PHI_AVG1 = 60, err +6 -> +6 -> 258 mod 256 = 2
    expect_eq("short way", int'(phi_fast), 2);
    // default gain: converge on 40 from wherever the instance is now
    repeat (400) frame(40, 4);
    checks++;
    if (phi_dflt[PH_W-1:0] < 38 || phi_dflt[PH_W-1:0] > 40) begin
      failures++;
      $display("default gain did not converge: %0d", phi_dflt);
    end
    // rotate the phase forward by 80/64 UI in small steps; PHI_AVG follows
    // and its whole-UI bits advance by one
    ui_before = int'(phi_dflt[PH_W +: PH_INT_W]);
    for (int s = 0; s < 80; s++) repeat (10) frame((40 + s) % 64, 4);
    repeat (200) frame((40 + 80) % 64, 4);
    expect_eq("tracked phase", int'(phi_dflt[PH_W-1:0]) >= 54 ? 1 : 0, 1);
    expect_eq("whole UI count", (int'(phi_dflt[PH_W +: PH_INT_W]) - ui_before + 4) % 4, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
