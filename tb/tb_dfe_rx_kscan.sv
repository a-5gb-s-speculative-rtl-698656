// tb_dfe_rx_kscan: sensitivity of the bit error count to the DFE coefficient
// scale. The coefficients are set to round(K * ISI), K = 0.0, 0.2, ... 1.6,
// where ISI is the post-cursor interference of the channel model (so K = 1 is
// the matched DFE and K = 0 no DFE), mirroring the coefficient-scaling
// experiment of the receiver's evaluation. For each K the receiver is reset,
// acquires at a sampling phase of 0.1 UI, which is then moved to 0.2 UI
// (decisions from sample 1, where the interference exceeds the signal), and
// the bits of 400 frames are compared.
// Checks: no errors for 0.8 <= K <= 1.2; errors at K = 0; errors at K = 0
// exceed those at K = 1. The error count per K is printed.
module tb_dfe_rx_kscan;
  import dfe_pkg::*;

  localparam int ISI_TAB [N_INT] = '{5, 6, 6, 7, 7, 8, 9, 10};
  localparam int N_FR  = 600;    // frames per K
  localparam int SKIP  = 200;    // frames not compared (acquisition, move)
  localparam int N_K   = 9;      // K = 0.0 .. 1.6

  logic       clk = 1'b0, rst_n = 1'b0;
  sample_t    adc_data [N_ADC];
  coef_t      alpha    [N_INT];
  logic       rx_bits  [1:N_UI];
  logic       rx_valid;
  phase_avg_t rx_phi_avg, phi_avg;
  logic [1:0] spec_sel [1:N_UI];
  logic       phx_valid [1:N_UI];
  logic       use_s1;
  logic [2:0] s2_interval;
  logic [$clog2(N_UI+1)-1:0] n_valid;
  real        p = 0.1;

  dfe_rx_top dut (.*);
  rx_channel_model #(.ISI(ISI_TAB)) ch (.clk, .rst_n, .p, .adc_data);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int rx_frame = 0, errors = 0;
  int err_k [N_K];

  initial begin : watchdog
    repeat (4 * N_FR * N_K + 1000 * N_K) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && rx_valid) begin
    if (rx_frame >= SKIP)
      for (int k = 1; k <= N_UI; k++)
        if (rx_bits[k] !== ch.bit_of(8 * rx_frame + k - 1)) errors++;
    rx_frame++;
  end

  initial begin
    for (int ki = 0; ki < N_K; ki++) begin
      real kf;
      kf = 0.2 * real'(ki);
      foreach (alpha[j]) begin
        int a;
        a = int'($floor(kf * real'(ISI_TAB[j]) + 0.5));
        alpha[j] = coef_t'(a > 31 ? 31 : a);
      end
      p = 0.1;
      @(negedge clk);
      rst_n = 1'b0;
      repeat (3) @(negedge clk);
      rx_frame = 0;
      errors   = 0;
      rst_n = 1'b1;
      for (int c = 0; c < 4 * N_FR; c++) begin
        // hold 0.1 UI for 100 frames, then move to 0.2 UI over 100 frames
        if (c >= 400 && c < 800) p = 0.1 + 0.1 * real'(c - 400) / 400.0;
        @(posedge clk);
      end
      repeat (8) @(posedge clk);
      err_k[ki] = errors;
      $display("K = %0.1f: %0d bit errors in %0d bits", kf, errors, 8 * (N_FR - SKIP));
    end
    for (int ki = 4; ki <= 6; ki++) begin
      checks++;
      if (err_k[ki] != 0) begin
        failures++;
        $display("errors at K = %0.1f", 0.2 * real'(ki));
      end
    end
    checks++;
    if (err_k[0] == 0) begin failures++; $display("no errors without DFE"); end
    checks++;
    if (err_k[0] <= err_k[5]) begin failures++; $display("DFE does not help"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
