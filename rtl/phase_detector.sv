// phase_detector: Phase Detection part of a PD/DD unit.
//
// Input: three consecutive ISI-corrected samples d[0:2] half a UI apart; d0
// is the second sample of the previous UI, d1 and d2 are the samples of the
// current UI. A data transition shows up as a sign change between d0,d1 or
// between d1,d2. Its position is found by linear interpolation between the
// two samples around the zero crossing, and reported as PHI_X, the distance
// from sample 2 to the next UI boundary in 1/64 UI, the same measure as
// PHI_AVG:
//   crossing between d0,d1: PHI_X = 32*|d0|/(|d0|+|d1|)          (0..31)
//   crossing between d1,d2: PHI_X = 32 + 32*|d1|/(|d1|+|d2|)     (32..63)
// With no sign change, or with two (which a band-limited channel cannot
// produce in one UI), the phase is not valid and is left out of the
// average. The published design names this block and its inputs and output
// but not its method; interpolation and the validity rule are this
// implementation's choices.
//
// Purely combinational (one small divider).
module phase_detector
  import dfe_pkg::*;
(
  input  dval_t  d [0:2],
  output phase_t phx,
  output logic   phx_valid
);

  localparam int unsigned HALF = 2**(PH_W-1);   // half a UI in phase units

  logic                 x01, x12;    // sign change between samples
  logic [D_W-1:0]       mag_a, mag_b;
  logic [D_W+PH_W-1:0]  num;
  logic [D_W:0]         den;
  logic [D_W+PH_W-1:0]  frac;

  function automatic logic [D_W-1:0] magnitude(dval_t v);
    return v[D_W-1] ? D_W'(-v) : D_W'(v);
  endfunction

  always_comb begin
    x01       = d[0][D_W-1] ^ d[1][D_W-1];
    x12       = d[1][D_W-1] ^ d[2][D_W-1];
    phx_valid = x01 ^ x12;
    mag_a     = x01 ? magnitude(d[0]) : magnitude(d[1]);
    mag_b     = x01 ? magnitude(d[1]) : magnitude(d[2]);
    num       = (D_W+PH_W)'(mag_a) * (D_W+PH_W)'(HALF);
    den       = (D_W+1)'(mag_a) + (D_W+1)'(mag_b);
    // Samples are odd (see dfe_pkg), so den >= 2 whenever a crossing exists.
    frac      = (den == '0) ? '0 : num / (D_W+PH_W)'(den);
    phx       = x01 ? phase_t'(frac) : phase_t'(frac) + phase_t'(HALF);
  end

endmodule
