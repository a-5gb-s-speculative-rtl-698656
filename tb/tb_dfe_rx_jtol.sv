// tb_dfe_rx_jtol: sinusoidal jitter on the blind sampling phase, the
// jitter-tolerance workload of the receiver's evaluation. At 5 Gb/s a frame
// of 8 UI lasts 1.6 ns, so a jitter frequency f (MHz) has a period of
// 625/f frames. For each f in 1, 2, 4, 8 MHz the receiver is reset and
// acquires at a phase of 0.1 UI, the phase moves to 0.25 UI, and then
// p(t) = 0.25 + A sin(2 pi f t) with A = 0.12 UI (0.24 UI peak-to-peak) is
// applied for two jitter periods (at least 300 frames) while all bits are
// compared. The phase stays inside 0.13..0.37 UI, so no bit slip occurs.
// Checks: no bit errors at any of the four frequencies; at 1 and 2 MHz,
// below the phase loop's bandwidth, PHI_AVG must swing by at least 12/64 UI
// (of the 15.4/64 UI applied). The swing at each frequency is printed.
module tb_dfe_rx_jtol;
  import dfe_pkg::*;

  localparam int  ISI_TAB [N_INT] = '{5, 6, 6, 7, 7, 8, 9, 10};
  localparam int  N_F = 4;
  localparam real F_MHZ [N_F] = '{1.0, 2.0, 4.0, 8.0};
  localparam real A_UI = 0.12;
  localparam real FRAME_NS = 1.6;
  localparam real PI = 3.14159265358979;

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
  int rx_frame = 0, errors = 0, first_checked = 0;
  int phi_min, phi_max;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && rx_valid) begin
    if (rx_frame >= first_checked) begin
      for (int k = 1; k <= N_UI; k++)
        if (rx_bits[k] !== ch.bit_of(8 * rx_frame + k - 1)) errors++;
      if (int'(rx_phi_avg[PH_W-1:0]) < phi_min) phi_min = int'(rx_phi_avg[PH_W-1:0]);
      if (int'(rx_phi_avg[PH_W-1:0]) > phi_max) phi_max = int'(rx_phi_avg[PH_W-1:0]);
    end
    rx_frame++;
  end

  initial begin
    foreach (alpha[j]) alpha[j] = coef_t'(ISI_TAB[j]);
    for (int fi = 0; fi < N_F; fi++) begin
      real period_fr;
      int  n_sj;
      period_fr = 1000.0 / (F_MHZ[fi] * FRAME_NS);
      n_sj = int'(2.0 * period_fr);
      if (n_sj < 300) n_sj = 300;
      p = 0.1;
      @(negedge clk);
      rst_n = 1'b0;
      repeat (3) @(negedge clk);
      rx_frame = 0;
      errors = 0;
      phi_min = 64;
      phi_max = -1;
      first_checked = 200;
      rst_n = 1'b1;
      // 100 frames at 0.1 UI, 100 frames moving to 0.25 UI, then jitter
      for (int c = 0; c < 4 * (200 + n_sj); c++) begin
        if (c >= 400 && c < 800) p = 0.1 + 0.15 * real'(c - 400) / 400.0;
        if (c >= 800) p = 0.25 + A_UI * $sin(2.0 * PI * real'(c - 800) / (4.0 * period_fr));
        @(posedge clk);
      end
      repeat (8) @(posedge clk);
      $display("SJ %0.0f MHz, %0.2f UIpp: %0d bit errors in %0d bits, PHI_AVG swing %0d/64 UI",
               F_MHZ[fi], 2.0 * A_UI, errors, 8 * n_sj, phi_max - phi_min);
      checks++;
      if (errors != 0) failures++;
      // below the loop bandwidth (about 3 MHz) PHI_AVG must follow most of
      // the 15.4/64 UI peak-to-peak jitter
      checks++;
      if (F_MHZ[fi] < 3.0 && phi_max - phi_min < 12) begin
        failures++;
        $display("PHI_AVG did not follow the jitter");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
