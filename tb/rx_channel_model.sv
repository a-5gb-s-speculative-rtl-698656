// rx_channel_model: behavioural model of the link in front of the digital
// receiver (transmitter, channel and four 5-bit ADCs), for testbenches only.
//
// The transmitter sends a PRBS7 stream (x^7 + x^6 + 1), one bit per UI. The
// noiseless "desired" waveform moves linearly from one bit level (+/-AMP
// ADC LSB) to the next over RAMP UI centred on each UI boundary, so that
// adjacent pulses add to a constant. The channel adds an extra post-cursor
// interference of the previous bit, ISI[j] LSB in interval j of the UI
// (j = floor(8 * distance to the end of the UI)), and uniform noise of
// +/-NOISE LSB. The ADCs sample blindly, two samples per UI: sample g is
// taken at t = (g+1)/2 - p UI, where p (input, in UI) is the distance from
// each second sample of a UI to the next boundary. Codes are
// round(15.5 + AMP*v + ISI + noise), clipped to 0..31.
//
// Interface/timing: while rst_n is low the words of cycle 0 are presented;
// after each rising clock edge with rst_n high the words of the next cycle
// follow 0.2 time units later, so the receiver's deMUX takes word cycle 0 on
// its first clock after reset. bit_of(n) returns transmitted bit n (the bit
// of UI n; UI k of frame f is n = 8f + k - 1).
module rx_channel_model
  import dfe_pkg::*;
#(
  parameter real AMP    = 5.0,
  parameter real RAMP   = 0.75,
  parameter real NOISE  = 0.3,
  parameter int  N_BITS = 65536,
  parameter int  ISI [N_INT] = '{5, 6, 6, 7, 7, 8, 9, 10}
)
(
  input  logic    clk,
  input  logic    rst_n,
  input  real     p,
  output sample_t adc_data [N_ADC]
);

  localparam int OFF = 8;    // bit index offset (t may be slightly < 0)

  bit bits [N_BITS];
  int cycle = 0;

  initial begin
    bit [6:0] lfsr;
    lfsr = 7'h7f;
    foreach (bits[i]) begin
      bits[i] = lfsr[6];
      lfsr = {lfsr[5:0], lfsr[6] ^ lfsr[5]};
    end
  end

  function automatic bit bit_of(int n);
    return bits[n + OFF];
  endfunction

  function automatic real lvl(int n);
    return bits[n + OFF] ? 1.0 : -1.0;
  endfunction

  function automatic sample_t sample_at(int g, real ph);
    real t, u, v, y, nz;
    int  n, j, code;
    t = real'(g + 1) / 2.0 - ph;
    n = int'($floor(t));
    u = t - real'(n);
    if (u < RAMP / 2.0)
      v = lvl(n) + (lvl(n - 1) - lvl(n)) * (RAMP / 2.0 - u) / RAMP;
    else if (u > 1.0 - RAMP / 2.0)
      v = lvl(n) + (lvl(n + 1) - lvl(n)) * (u - (1.0 - RAMP / 2.0)) / RAMP;
    else
      v = lvl(n);
    j = int'($floor(8.0 * (1.0 - u)));
    if (j > 7) j = 7;
    if (j < 0) j = 0;
    nz = NOISE * (2.0 * real'($urandom_range(0, 1000)) / 1000.0 - 1.0);
    y = 15.5 + AMP * v + lvl(n - 1) * real'(ISI[j]) + nz;
    code = int'($floor(y + 0.5));
    if (code < 0) code = 0;
    if (code > 31) code = 31;
    return sample_t'(code);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) cycle = 0;
    else        cycle = cycle + 1;
    #0.2;
    for (int k = 0; k < N_ADC; k++) adc_data[k] = sample_at(N_ADC * cycle + k, p);
  end

  initial begin
    #0.1;
    for (int k = 0; k < N_ADC; k++) adc_data[k] = sample_at(k, p);
  end

endmodule
