// pd_dd_array: the four PD/DD units of one UI (loop-unrolled DFE).
//
// UI k of a frame uses the samples S[2k-2], S[2k-1], S[2k]. The first is
// corrected with the bit two UIs back, b[k-2], the other two with the bit
// one UI back, b[k-1]. Neither bit is final when the frame is processed, so
// the array holds one Phase Detection + Data Decision unit for each of the
// four combinations and the 4:1 MUX behind it keeps the right one. Unit u
// (u = 0..3) assumes {b[k-2], b[k-1]} = u and takes d^b[k-2] of S[2k-2] and
// d^b[k-1] of S[2k-1], S[2k] from the ISI subtractor.
//
// Purely combinational.
module pd_dd_array
  import dfe_pkg::*;
(
  input  dval_t  d_s0 [2],     // S[2k-2] corrected for b[k-2] = 0 / 1
  input  dval_t  d_s1 [2],     // S[2k-1] corrected for b[k-1] = 0 / 1
  input  dval_t  d_s2 [2],     // S[2k]   corrected for b[k-1] = 0 / 1
  input  phase_t phi_avg1,
  output pdd_t   res  [N_SPEC],// indexed by {b[k-2], b[k-1]}
  output logic   use_s1
);

  logic use_s1_u [N_SPEC];

  for (genvar u = 0; u < N_SPEC; u++) begin : g_unit
    localparam int unsigned B2 = u / 2;   // assumed b[k-2]
    localparam int unsigned B1 = u % 2;   // assumed b[k-1]
    dval_t d_win [0:2];
    assign d_win[0] = d_s0[B2];
    assign d_win[1] = d_s1[B1];
    assign d_win[2] = d_s2[B1];

    phase_detector u_pd (
      .d         (d_win),
      .phx       (res[u].phx),
      .phx_valid (res[u].phx_valid)
    );

    data_decision u_dd (
      .d1       (d_win[1]),
      .d2       (d_win[2]),
      .phi_avg1 (phi_avg1),
      .b        (res[u].b),
      .use_s1   (use_s1_u[u])
    );
  end

  // All four units see the same PHI_AVG, so they agree on the sample used.
  assign use_s1 = use_s1_u[0];

endmodule
