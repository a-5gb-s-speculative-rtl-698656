// dfe_coef_sel: DFE Coefficient Selector (DCS).
//
// A blind sampling clock puts the two samples of a UI anywhere in it, and the
// interference left by the previous bit depends on where. The UI is split
// into 8 equal intervals I0..I7, counted backwards from the end of the UI
// (I0 is the interval just before the next UI boundary), and one coefficient
// alpha[j] holds the post-cursor interference of the previous bit in I_j.
//
// PHI_AVG is reduced modulo one UI (PHI_AVG1): the distance from the second
// sample S2 of a UI to the next nominal UI boundary. Its top three bits give
// the interval j of S2, and S1, half a UI earlier, lies in interval
// (j+4) mod 8. The selector therefore returns
//   c2 = alpha[j]            (used for all even samples)
//   c1 = alpha[(j+4) mod 8]  (used for all odd samples).
// Both 8:1 multiplexers and their input order follow the published selector:
// with mux select m, c1 = alpha[m] and c2 = alpha[(m+4) mod 8]; here
// m = (j+4) mod 8, which reproduces the published example (S2 in I2 uses
// alpha2 for S2 and alpha6 for S1).
//
// Purely combinational; PHI_AVG is constant for a whole 8-UI frame.
module dfe_coef_sel
  import dfe_pkg::*;
(
  input  phase_avg_t  phi_avg,          // average transition phase
  input  coef_t       alpha [N_INT],    // alpha[0:7]
  output logic [2:0]  s2_interval,      // interval j of S2 (debug/coverage)
  output coef_t       c1,               // coefficient for odd samples
  output coef_t       c2                // coefficient for even samples
);

  phase_t     phi_avg1;  // PHI_AVG modulo 1 UI
  logic [2:0] mux_sel;   // select of the two 8:1 multiplexers

  always_comb begin
    phi_avg1    = phi_avg[PH_W-1:0];
    s2_interval = phi_avg1[PH_W-1 -: 3];
    mux_sel     = s2_interval + 3'd4;
    c1          = alpha[mux_sel];
    c2          = alpha[mux_sel + 3'd4];
  end

endmodule
