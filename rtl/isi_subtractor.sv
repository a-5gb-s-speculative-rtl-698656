// isi_subtractor: speculative ISI subtraction for one 8-UI frame.
//
// The ISI replica of a sample is its coefficient times the sign of the bit
// before its UI. That bit is not known yet when the frame arrives (loop
// unrolling), so both outcomes are computed:
//   d1[i] = S[i] - c   (previous bit assumed 1, replica +c)
//   d0[i] = S[i] + c   (previous bit assumed 0, replica -c)
// where c = c1 for odd and c2 for even sample numbers, as PHI_AVG is the same
// for the whole frame. Samples are converted to the signed half-LSB format of
// dfe_pkg (2*S-31) and the coefficients are doubled to match, so the results
// are odd and never zero. Which previous bit governs a sample (b[n-1] for S1
// and S2 of UI n, b[n-2] for S0) is resolved by the PD/DD arrays.
//
// Purely combinational.
module isi_subtractor
  import dfe_pkg::*;
(
  input  sample_t s_ext [0:N_SAMP],   // S[0:16]
  input  coef_t   c1,
  input  coef_t   c2,
  output dval_t   d0    [0:N_SAMP],   // speculative, previous bit = 0
  output dval_t   d1    [0:N_SAMP]    // speculative, previous bit = 1
);

  always_comb begin
    for (int i = 0; i <= N_SAMP; i++) begin
      dval_t s, c;
      s     = to_signed(s_ext[i]);
      c     = dval_t'({(i % 2 == 1) ? c1 : c2, 1'b0});
      d0[i] = s + c;
      d1[i] = s - c;
    end
  end

endmodule
