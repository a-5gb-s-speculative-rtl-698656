// sample_frame_reg: forms the 17-sample window S[0:16] of a frame.
//
// The CDR decides each UI from three consecutive samples: the two samples of
// that UI and the second sample of the UI before. For the first UI of a frame
// that earlier sample is the last sample S16 of the previous frame, so S16 is
// held in a register for one frame and put in front as S0 (the one-sample
// delay of the published block diagram). The register is loaded whenever a
// new frame is accepted (frame_valid) and resets to mid-scale code 16.
//
// Timing: s_ext is combinational from s_frame; s_ext[0] is the S16 of the
// frame accepted by the previous frame_valid.
module sample_frame_reg
  import dfe_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    frame_valid,
  input  sample_t s_frame [1:N_SAMP],
  output sample_t s_ext   [0:N_SAMP]
);

  sample_t s_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           s_last <= sample_t'(2**(ADC_W-1));
    else if (frame_valid) s_last <= s_frame[N_SAMP];
  end

  always_comb begin
    s_ext[0] = s_last;
    for (int i = 1; i <= N_SAMP; i++) s_ext[i] = s_frame[i];
  end

endmodule
