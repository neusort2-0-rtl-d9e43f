// coef_reg_array -- coefficient register array.
//
// Holds the 32 noise shaping filter coefficients and the spike detection
// threshold, programmed from the system bus during configuration (values are
// trained off-line from a few seconds of recording).  Write port: when we is
// high at a rising clock edge, addr 0..31 loads coefficient addr from the low
// COEF_W bits of wdata, addr THR_ADDR (32) loads the threshold; other addresses are
// ignored.  Read port: all values are continuously available to the datapath.
// One coefficient set and one threshold serve all 16 channels.  The register
// contents and widths follow the source description; the address map and the
// reset values (coefficients 0, threshold all ones so nothing fires before
// programming) are this design's choice.
module coef_reg_array
  import neusort_pkg::*;
#(
  parameter int unsigned TAPS = FIR_TAPS,
  parameter int unsigned CW   = COEF_W,
  parameter int unsigned TW   = THR_W,
  parameter int unsigned AW   = CFG_ADDR_W,
  parameter int unsigned THR_ADDR = CFG_THR_ADDR
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [AW-1:0]        addr,
  input  logic [15:0]          wdata,
  output logic signed [CW-1:0] coef [TAPS],
  output logic [TW-1:0]        threshold
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) coef[k] <= '0;
      threshold <= '1;
    end else if (we) begin
      if (addr < AW'(TAPS)) coef[addr[$clog2(TAPS)-1:0]] <= wdata[CW-1:0];
      else if (addr == AW'(THR_ADDR)) threshold <= TW'(wdata);
    end
  end

endmodule
