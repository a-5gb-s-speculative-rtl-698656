// tb_sample_frame_reg: checks that S[0] is S[16] of the previously accepted
// frame, that S[1:16] pass unchanged, that the register holds while
// frame_valid is low, and that it resets to mid-scale (16).
module tb_sample_frame_reg;
  import dfe_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0, frame_valid = 1'b0;
  sample_t s_frame [1:N_SAMP];
  sample_t s_ext   [0:N_SAMP];
  int      checks = 0, failures = 0;

  sample_frame_reg dut (.*);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t expect_s0;

  initial begin
    foreach (s_frame[i]) s_frame[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    expect_s0 = 5'd16;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      foreach (s_frame[i]) s_frame[i] = sample_t'($urandom);
      frame_valid = ($urandom % 3) != 0;
      #0.1;
      checks++;
      if (s_ext[0] !== expect_s0) begin
        failures++;
        $display("step %0d: S0=%0d expected %0d", n, s_ext[0], expect_s0);
      end
      for (int i = 1; i <= N_SAMP; i++) begin
        checks++;
        if (s_ext[i] !== s_frame[i]) failures++;
      end
      if (frame_valid) expect_s0 = s_frame[N_SAMP];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
