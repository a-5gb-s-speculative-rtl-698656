// avg_phase_recovery: average phase recovery, producing PHI_AVG.
//
// Once per 8-UI frame the valid instantaneous phases PHI_X[1:8] are compared
// with the current PHI_AVG. Each phase error is taken modulo one UI into
// [-1/2, +1/2) UI, the errors are summed, and the sum, scaled by
// 2^-KP_SHIFT, is added to a phase accumulator with ACC_FRAC bits below the
// 1/64-UI phase LSB. PHI_AVG is the accumulator without those fraction bits:
// PH_W bits of phase within the UI plus PH_INT_W bits that count whole UIs
// (they change when the phase wraps). This is a first-order digital loop; its
// gain sets the loop bandwidth. The published design says only that this
// block turns PHI_X[1:8] into PHI_AVG for the next frame: the loop form, the
// gain and the reset phase are this implementation's choices.
//
// Timing: PHI_AVG changes in the cycle after a frame_valid and is constant
// for the whole next frame.
module avg_phase_recovery
  import dfe_pkg::*;
#(
  parameter int unsigned ACC_FRAC = 8,      // accumulator bits below 1/64 UI
  parameter int unsigned KP_SHIFT = 7,      // loop gain 2^-KP_SHIFT (<= ACC_FRAC)
  parameter phase_avg_t  PHI_INIT = '0      // PHI_AVG after reset
)
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       frame_valid,
  input  phase_t     phx       [1:N_UI],
  input  logic       phx_valid [1:N_UI],
  output phase_avg_t phi_avg,
  output logic [$clog2(N_UI+1)-1:0] n_valid  // valid phases this frame
);

  localparam int unsigned ACC_W = PH_INT_W + PH_W + ACC_FRAC;
  localparam int unsigned SUM_W = PH_W + $clog2(N_UI) + 1;

  logic [ACC_W-1:0]        acc;
  logic signed [SUM_W-1:0] err_sum;

  always_comb begin
    err_sum = '0;
    n_valid = '0;
    for (int k = 1; k <= N_UI; k++) begin
      logic signed [PH_W-1:0] err;
      err = signed'(phx[k] - phi_avg[PH_W-1:0]);   // modulo 1 UI
      if (phx_valid[k]) begin
        err_sum = err_sum + SUM_W'(err);
        n_valid = n_valid + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      acc <= {PHI_INIT, ACC_FRAC'(0)};
    else if (frame_valid)
      acc <= acc + ACC_W'(signed'({{(ACC_W-SUM_W){err_sum[SUM_W-1]}}, err_sum})
                          <<< (ACC_FRAC - KP_SHIFT));
  end

  assign phi_avg = acc[ACC_W-1 -: PH_INT_W + PH_W];

  initial assert (KP_SHIFT <= ACC_FRAC) else $error("KP_SHIFT must not exceed ACC_FRAC");

endmodule
