// spike_detector -- nonlinear-energy-operator (NEO) spike detector.
//
// For the latest DET_TAPS (7) samples x[0] (newest) .. x[6] it computes the
// energy psi[k] = x[k]^2 - x[k-1]*x[k+1] at the five inner points k = 1..5 and
// fires when the centre energy psi[3] reaches the programmed threshold and is
// the peak of the five (strictly above the newer neighbours psi[1], psi[2], at
// least equal to the older ones psi[4], psi[5], so a flat top fires once).
// The source description gives the operator, the 7-sample span, the 16-bit
// threshold and "fires at the peak of the convex curve"; the exact peak test
// and tie rule are this design's choice.  Purely combinational: the channel
// locked in the current cycle is judged in that cycle.
module spike_detector
  import neusort_pkg::*;
#(
  parameter int unsigned W  = SAMPLE_W,
  parameter int unsigned TW = THR_W
) (
  input  logic signed [W-1:0]   win [DET_TAPS],
  input  logic        [TW-1:0]  threshold,
  output logic                  fire,
  output logic signed [2*W:0]   energy
);

  logic signed [2*W:0] psi [1:DET_TAPS-2];

  always_comb begin
    for (int k = 1; k <= DET_TAPS - 2; k++) begin
      psi[k] = (2*W+1)'(win[k] * win[k]) - (2*W+1)'(win[k-1] * win[k+1]);
    end
    energy = psi[3];
    fire = (psi[3] >= $signed({{(2*W+1-TW){1'b0}}, threshold}))
         && (psi[3] >  psi[1]) && (psi[3] >  psi[2])
         && (psi[3] >= psi[4]) && (psi[3] >= psi[5]);
  end

endmodule
