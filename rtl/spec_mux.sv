// spec_mux: the 32:8 MUX (eight 4:1 MUXes) that resolves the speculation.
//
// For UI k the PD/DD array offers four (PHI_X, b) results, one per assumed
// value of {b[k-2], b[k-1]}. The MUX for UI 1 is steered by the last two
// bits of the previous frame (b7, b8, kept in a register); the MUX for UI 2
// by b8 of the previous frame and the just-resolved b1; and so on down the
// frame, each select made of the two bits resolved before it. This serial
// chain of 4:1 MUXes is the only part of the decision feedback that remains
// in the critical path of the loop-unrolled DFE.
//
// Interface/timing: b, phx and phx_valid are combinational from res and the
// b7/b8 register. The register takes b7, b8 of the current frame on
// frame_valid and resets to 0.
module spec_mux
  import dfe_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   frame_valid,
  input  pdd_t   res       [1:N_UI][N_SPEC],
  output logic   b         [1:N_UI],      // final recovered bits b[1:8]
  output phase_t phx       [1:N_UI],      // final instantaneous phases
  output logic   phx_valid [1:N_UI],
  output logic [1:0] sel   [1:N_UI]       // select used per UI (coverage)
);

  logic b7_q, b8_q;   // last two bits of the previous frame

  always_comb begin
    logic prev2, prev1;
    prev2 = b7_q;
    prev1 = b8_q;
    for (int k = 1; k <= N_UI; k++) begin
      sel[k]       = {prev2, prev1};
      b[k]         = res[k][sel[k]].b;
      phx[k]       = res[k][sel[k]].phx;
      phx_valid[k] = res[k][sel[k]].phx_valid;
      prev2        = prev1;
      prev1        = b[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b7_q <= 1'b0;
      b8_q <= 1'b0;
    end else if (frame_valid) begin
      b7_q <= b[N_UI-1];
      b8_q <= b[N_UI];
    end
  end

endmodule
