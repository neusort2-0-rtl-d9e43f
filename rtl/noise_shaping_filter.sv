// noise_shaping_filter -- 32-tap programmable noise shaping FIR.
//
// y = (sum_{k=0}^{TAPS-1} coef[k] * x[k]) >>> SHIFT, where x[0] is the newest
// of the 32 samples it sees (the window positions after the 7 used by the
// spike detector).  All taps are multiplied and summed in the same cycle, so
// one filtered sample of the locked channel is produced per clock; the filter
// is shared by all channels because its inputs come from the systolic buffer.
// Trained coefficients give a band-pass response whose output approximates
// the spike derivative.
// From the source description: 32 taps, 9-bit coefficients, one result per
// cycle.  Own choices: two's complement coefficients and samples, a full
// precision accumulator (2*9+5 = 23 bits) and the output scaling, an
// arithmetic right shift by 7 that keeps the top 16 accumulator bits (no
// overflow is possible).  Purely combinational.
module noise_shaping_filter
  import neusort_pkg::*;
#(
  parameter int unsigned W     = SAMPLE_W,
  parameter int unsigned CW    = COEF_W,
  parameter int unsigned TAPS  = FIR_TAPS,
  parameter int unsigned OW    = FEAT_W,
  parameter int unsigned SHIFT = 7
) (
  input  logic signed [W-1:0]  x    [TAPS],
  input  logic signed [CW-1:0] coef [TAPS],
  output logic signed [OW-1:0] y
);

  localparam int unsigned ACC_W = W + CW + $clog2(TAPS);

  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] shifted;

  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++) acc += ACC_W'(x[k] * coef[k]);
    shifted = acc >>> SHIFT;
    y = OW'(shifted);
  end

endmodule
