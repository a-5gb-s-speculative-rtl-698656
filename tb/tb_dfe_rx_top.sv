// tb_dfe_rx_top: end-to-end test of the receiver back end at its default
// parameters, with a behavioural channel and ADC in the testbench.
//
// The link in front of the receiver is rx_channel_model: PRBS7 data, a
// 0.75-UI linear transition of +/-5 LSB, a post-cursor interference of 5..10
// LSB depending on the interval, +/-0.3 LSB noise, blind sampling at phase p.
//
// Phase 1 (DFE on, alpha = isi): p starts at 0.1 UI, close to the reset value
// of PHI_AVG (0), so the loop acquires without first deciding with the wrong
// coefficients; p then drifts to 0.4 UI and back to 0.15 UI, which moves the
// selected coefficients and switches the decision between the two samples.
// After acquisition every recovered bit must equal the transmitted one. Phase 2 (reset, alpha = 0): the same channel at a sample
// phase where the ISI exceeds the signal must give bit errors.
//
// Checked per frame: all 8 bits, and that rx_valid arrives every 4 cycles.
// Mechanisms counted (each must occur): all four speculation selects, at
// least three DCS intervals, decisions from sample 1 and from sample 2, a
// PHI_AVG change, frames with valid phases, and errors with the DFE off.
module tb_dfe_rx_top;
  import dfe_pkg::*;

  localparam int  N_FRAMES  = 3000;  // phase 1 length in frames
  localparam int  N_OFF     = 400;   // phase 2 length in frames
  localparam int  SKIP      = 150;   // acquisition frames not checked
  localparam real AMP       = 5.0;   // signal amplitude, ADC LSB
  localparam real RAMP      = 0.75;  // transition width, UI
  localparam real NOISE     = 0.3;   // uniform noise, +/- ADC LSB

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

  dfe_rx_top dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (4 * (N_FRAMES + N_OFF) + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- channel
  localparam int ISI_TAB [N_INT] = '{5, 6, 6, 7, 7, 8, 9, 10};
  real p = 0.1;                             // sampling phase, UI
  int  drift = 1;                           // 1: drift during phase 1
  int  frame_in = 0;                        // frames sent since reset

  rx_channel_model #(.AMP(AMP), .RAMP(RAMP), .NOISE(NOISE), .ISI(ISI_TAB)) ch (
    .clk, .rst_n, .p, .adc_data
  );

  // 0.1 -> 0.4 over frames 400..1200, back to 0.15 over 1600..2400
  function automatic real phase_of(real x);
    if (x < 400.0)  return 0.1;
    if (x < 1200.0) return 0.1 + 0.3 * (x - 400.0) / 800.0;
    if (x < 1600.0) return 0.4;
    if (x < 2400.0) return 0.4 - 0.25 * (x - 1600.0) / 800.0;
    return 0.15;
  endfunction

  // ------------------------------------------------------------ checking
  int  rx_frame = 0;       // frames received since the last reset
  int  errors_on = 0, errors_off = 0, checking = 0, dfe_on = 1;
  int  sel_seen [4];
  int  int_seen [8];
  int  s1_frames = 0, s2_frames = 0, phi_changes = 0, pv_frames = 0;
  int  last_valid_cycle = -1, cycle = 0;
  phase_avg_t last_phi;

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n) begin
    if (dut.frame_valid) begin
      foreach (spec_sel[k]) sel_seen[spec_sel[k]]++;
      int_seen[s2_interval]++;
      if (use_s1) s1_frames++; else s2_frames++;
      if (n_valid != 0) pv_frames++;
      if (phi_avg != last_phi) phi_changes++;
      last_phi = phi_avg;
    end
    if (rx_valid) begin
      if (last_valid_cycle >= 0) begin
        checks++;
        if (cycle - last_valid_cycle != 4) begin
          failures++;
          $display("rx_valid spacing %0d cycles", cycle - last_valid_cycle);
        end
      end
      last_valid_cycle = cycle;
      if (rx_frame >= SKIP) begin
        for (int k = 1; k <= N_UI; k++) begin
          bit expected;
          expected = ch.bit_of(8 * rx_frame + k - 1);
          if (dfe_on) begin
            checks++;
            if (rx_bits[k] !== expected) begin
              failures++;
              errors_on++;
              if (errors_on < 10)
                $display("frame %0d UI %0d: bit %0b expected %0b (phi_avg %0d)",
                         rx_frame, k, rx_bits[k], expected, rx_phi_avg);
            end
          end else if (rx_bits[k] !== expected) errors_off++;
        end
      end
      rx_frame++;
    end
  end

  // ------------------------------------------------------------ stimulus
  task automatic run(int frames);
    for (int c = 0; c < 4 * frames; c++) begin
      if (drift) p = phase_of(real'(c) / 4.0);
      @(posedge clk);
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rx_frame = 0;
    last_valid_cycle = -1;
    rst_n = 1'b1;
  endtask

  initial begin
    foreach (alpha[j]) alpha[j] = coef_t'(ISI_TAB[j]);
    last_phi = '0;
    @(negedge clk);

    // phase 1: DFE on, acquisition and drift
    do_reset();
    run(N_FRAMES);
    repeat (4) @(negedge clk);
    $display("DFE on : %0d bit errors after acquisition, final PHI_AVG %0d",
             errors_on, rx_phi_avg);

    // phase 2: DFE off at a phase where S1 decisions see ISI > signal
    dfe_on = 0;
    drift  = 0;
    p      = 0.2;
    foreach (alpha[j]) alpha[j] = '0;
    do_reset();
    run(N_OFF);
    repeat (4) @(negedge clk);
    $display("DFE off: %0d bit errors", errors_off);

    // mechanisms
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (sel_seen[s] == 0) begin failures++; $display("select %0d never used", s); end
    end
    begin
      int n_int = 0;
      foreach (int_seen[i]) if (int_seen[i] != 0) n_int++;
      checks++;
      if (n_int < 3) begin failures++; $display("only %0d DCS intervals used", n_int); end
      $display("DCS intervals used: %0d", n_int);
    end
    checks++; if (s1_frames == 0) begin failures++; $display("sample 1 never used"); end
    checks++; if (s2_frames == 0) begin failures++; $display("sample 2 never used"); end
    checks++; if (phi_changes == 0) begin failures++; $display("PHI_AVG never moved"); end
    checks++; if (pv_frames == 0) begin failures++; $display("no valid phase"); end
    checks++; if (errors_off == 0) begin failures++; $display("no errors without DFE"); end
    $display("selects %0d/%0d/%0d/%0d, S1 frames %0d, S2 frames %0d, PHI_AVG moves %0d",
             sel_seen[0], sel_seen[1], sel_seen[2], sel_seen[3], s1_frames, s2_frames,
             phi_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
