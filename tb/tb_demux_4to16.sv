// tb_demux_4to16: checks the 4:16 deMUX.
// Random ADC words are driven on the falling edge, four per cycle. Every
// frame is compared with a reference built in the testbench: word k of
// cycle m of a frame must appear as S[4m+k+1]. frame_valid must pulse once
// every 4 cycles, in the cycle after the fourth word of a frame.
module tb_demux_4to16;
  import dfe_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  sample_t adc_data [N_ADC];
  sample_t s_frame  [1:N_SAMP];
  logic    frame_valid;
  int      checks = 0, failures = 0;

  demux_4to16 dut (.*);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t ref_frame [$];    // words in order of arrival
  int      cycle = 0;
  int      last_valid_cycle = -1;

  initial begin
    foreach (adc_data[k]) adc_data[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 400; c++) begin
      if (c > 0) @(negedge clk);
      // outputs of the previous posedge: a frame after every 4th word cycle
      if (c > 0) begin
        checks++;
        if (frame_valid !== ((c % 4) == 0)) begin
          failures++;
          $display("cycle %0d: frame_valid=%0b", c, frame_valid);
        end
        if (frame_valid) begin
          for (int i = 1; i <= N_SAMP; i++) begin
            checks++;
            if (s_frame[i] !== ref_frame[c*4 - 16 + i - 1]) begin
              failures++;
              $display("cycle %0d: S[%0d]=%0d expected %0d", c, i, s_frame[i],
                       ref_frame[c*4 - 16 + i - 1]);
            end
          end
        end
      end
      for (int k = 0; k < N_ADC; k++) begin
        adc_data[k] = sample_t'($urandom);
        ref_frame.push_back(adc_data[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
