// data_decision: Data Decision part of a PD/DD unit.
//
// Picks the sample of the current UI that lies nearest the centre of the eye
// and slices it. With PHI_AVG1 = p (distance from sample 2 to the next UI
// boundary, in UI) sample 2 sits at 1-p and sample 1 at 1/2-p from the start
// of the UI. Sample 1 belongs to the current UI and is nearer the centre
// only when p < 1/4; otherwise sample 2 is used. The bit is the sign of the
// corrected sample (1 for positive). The published design gives the block's
// name and inputs (the corrected samples, PHI_X and PHI_AVG) but not its
// rule; this nearest-to-centre rule is this implementation's choice and does
// not need PHI_X.
//
// Purely combinational.
module data_decision
  import dfe_pkg::*;
(
  input  dval_t  d1,          // first sample of the UI, corrected
  input  dval_t  d2,          // second sample of the UI, corrected
  input  phase_t phi_avg1,    // PHI_AVG modulo 1 UI
  output logic   b,           // recovered bit
  output logic   use_s1       // sample 1 was used (coverage)
);

  always_comb begin
    use_s1 = (phi_avg1 < phase_t'(2**(PH_W-2)));
    b      = use_s1 ? ~d1[D_W-1] : ~d2[D_W-1];
  end

endmodule
