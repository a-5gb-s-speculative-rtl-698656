// demux_4to16: 4:16 deMUX between the four time-interleaved ADCs and the
// digital DFE/CDR.
//
// Every clock cycle the four ADCs deliver one word each, taken in time order
// ADC0, ADC1, ADC2, ADC3 (a 4-phase 2.5 GS/s sampling clock gives 10 GS/s,
// two samples per 5 Gb/s UI). After four cycles the 16 words form one
// 8-UI frame S[1:16]: word k of cycle m becomes S[4m+k+1]. The frame is
// registered and presented together with a one-cycle frame_valid strobe,
// which plays the role of the divide-by-4 digital clock of the published
// receiver. The frame order and the 4:16 ratio follow the published design;
// running the back end from a strobe on the ADC-word clock, instead of a
// separate divided clock, is this implementation's choice.
//
// Timing: the frame made of the words of cycles t-3..t appears on s_frame
// with frame_valid high in cycle t+1 and stays until the next frame.
module demux_4to16
  import dfe_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t adc_data [N_ADC],          // one word per ADC per cycle
  output sample_t s_frame  [1:N_SAMP],       // S[1:16] of the last frame
  output logic    frame_valid                // one cycle per new frame
);

  localparam int unsigned N_WORDS = N_SAMP / N_ADC;  // cycles per frame (4)

  logic [$clog2(N_WORDS)-1:0] word_cnt;
  sample_t                    buffer [N_SAMP - N_ADC]; // first 3 words of a frame
  localparam logic [$clog2(N_WORDS)-1:0] CNT_LAST = $clog2(N_WORDS)'(N_WORDS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_cnt    <= '0;
      frame_valid <= 1'b0;
      for (int i = 0; i < N_SAMP - N_ADC; i++) buffer[i] <= '0;
      for (int i = 1; i <= N_SAMP; i++) s_frame[i] <= '0;
    end else begin
      word_cnt    <= word_cnt + 1'b1;
      frame_valid <= (word_cnt == CNT_LAST);
      if (word_cnt == CNT_LAST) begin
        for (int i = 0; i < N_SAMP - N_ADC; i++) s_frame[i + 1] <= buffer[i];
        for (int k = 0; k < N_ADC; k++) s_frame[N_SAMP - N_ADC + k + 1] <= adc_data[k];
      end else begin
        for (int k = 0; k < N_ADC; k++) buffer[int'(word_cnt) * N_ADC + k] <= adc_data[k];
      end
    end
  end

endmodule
