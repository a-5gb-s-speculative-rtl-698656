// dfe_rx_top: digital back end of a 5 Gb/s receiver with blind 2x ADC
// sampling and a speculative (loop-unrolled) one-tap DFE.
//
// Data path, one 8-UI frame per frame_valid:
//   four ADC words per cycle -> demux_4to16 -> S[1:16]
//   sample_frame_reg: S16 of the previous frame becomes S0 -> S[0:16]
//   dfe_coef_sel: PHI_AVG -> c1 (odd samples), c2 (even samples)
//   isi_subtractor: d^0, d^1 = S -/+ replica for both values of the
//                   previous bit
//   8 x pd_dd_array: four (PHI_X, b) results per UI, one per assumed
//                   {b[k-2], b[k-1]}
//   spec_mux: eight chained 4:1 MUXes keep the right result per UI, using
//             b7, b8 of the previous frame for UI 1
//   avg_phase_recovery: PHI_X[1:8] -> PHI_AVG for the next frame
// The block structure follows the published receiver; the clocking (one
// clock for ADC words and frames, a frame strobe instead of a divided clock)
// and the output register are this implementation's choices.
//
// Interface: adc_data carries one 5-bit code per ADC each cycle; alpha[0:7]
// are the 5-bit DFE coefficients (all zero turns the DFE off). rx_bits[1:8]
// (bit 1 first in time) and rx_phi_avg are registered; rx_valid pulses one
// cycle per frame, two cycles after the frame's last ADC words.
module dfe_rx_top
  import dfe_pkg::*;
#(
  parameter int unsigned ACC_FRAC = 8,
  parameter int unsigned KP_SHIFT = 7,
  parameter phase_avg_t  PHI_INIT = '0
)
(
  input  logic       clk,
  input  logic       rst_n,
  input  sample_t    adc_data [N_ADC],
  input  coef_t      alpha    [N_INT],
  output logic       rx_bits  [1:N_UI],
  output logic       rx_valid,
  output phase_avg_t rx_phi_avg,
  output phase_avg_t phi_avg,          // PHI_AVG in use for the current frame
  output logic [1:0] spec_sel [1:N_UI],// speculation select per UI
  output logic       phx_valid [1:N_UI],
  output logic       use_s1,           // decisions take sample 1 (p < 1/4)
  output logic [2:0] s2_interval,      // interval of S2 chosen by the DCS
  output logic [$clog2(N_UI+1)-1:0] n_valid // valid PHI_X in this frame
);

  sample_t    s_frame [1:N_SAMP];
  sample_t    s_ext   [0:N_SAMP];
  logic       frame_valid;
  coef_t      c1, c2;
  dval_t      d0 [0:N_SAMP];
  dval_t      d1 [0:N_SAMP];
  pdd_t       res [1:N_UI][N_SPEC];
  logic       b   [1:N_UI];
  phase_t     phx [1:N_UI];
  logic       use_s1_ui [1:N_UI];

  demux_4to16 u_demux (
    .clk, .rst_n, .adc_data, .s_frame, .frame_valid
  );

  sample_frame_reg u_s0 (
    .clk, .rst_n, .frame_valid, .s_frame, .s_ext
  );

  dfe_coef_sel u_dcs (
    .phi_avg, .alpha, .s2_interval, .c1, .c2
  );

  isi_subtractor u_isi (
    .s_ext, .c1, .c2, .d0, .d1
  );

  for (genvar k = 1; k <= N_UI; k++) begin : g_ui
    dval_t d_s0 [2];
    dval_t d_s1 [2];
    dval_t d_s2 [2];
    assign d_s0 = '{d0[2*k-2], d1[2*k-2]};
    assign d_s1 = '{d0[2*k-1], d1[2*k-1]};
    assign d_s2 = '{d0[2*k],   d1[2*k]};

    pd_dd_array u_pdd (
      .d_s0, .d_s1, .d_s2,
      .phi_avg1 (phi_avg[PH_W-1:0]),
      .res      (res[k]),
      .use_s1   (use_s1_ui[k])
    );
  end

  spec_mux u_mux (
    .clk, .rst_n, .frame_valid, .res, .b, .phx, .phx_valid, .sel (spec_sel)
  );

  avg_phase_recovery #(
    .ACC_FRAC (ACC_FRAC),
    .KP_SHIFT (KP_SHIFT),
    .PHI_INIT (PHI_INIT)
  ) u_apr (
    .clk, .rst_n, .frame_valid, .phx, .phx_valid, .phi_avg, .n_valid
  );

  assign use_s1 = use_s1_ui[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_valid   <= 1'b0;
      rx_phi_avg <= '0;
      for (int k = 1; k <= N_UI; k++) rx_bits[k] <= 1'b0;
    end else begin
      rx_valid <= frame_valid;
      if (frame_valid) begin
        rx_phi_avg <= phi_avg;
        for (int k = 1; k <= N_UI; k++) rx_bits[k] <= b[k];
      end
    end
  end

endmodule
