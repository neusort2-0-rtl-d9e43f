// systolic_input_buffer -- input systolic array buffer for channel-interleaved
// neural samples.
//
// N_CH rows by (WIN-1) columns of sample registers.  Each column is a chain of
// N_CH registers; the frontend sample enters the top of the first column and
// the bottom register of every column feeds both the top of the next column
// and the processing units.  Every enabled cycle everything moves one place,
// so the bottom of column j always holds the sample of the arriving channel
// taken j sampling periods earlier.  Together with the arriving sample the
// column bottoms form the WIN most recent samples of the channel being
// processed, and successive cycles present successive channels with no
// reload latency.
//
// Interface: din/shift_en in, win[0] = din (newest, combinational),
// win[j] = same channel j periods earlier (registered), j = 1..WIN-1.
// Timing: registers update on the rising clock edge when shift_en is high.
// The structure and sizes (16 rows, 39-sample window) follow the source
// description; the reset to zero is this design's choice.
module systolic_input_buffer
  import neusort_pkg::*;
#(
  parameter int unsigned N     = N_CH,
  parameter int unsigned W     = SAMPLE_W,
  parameter int unsigned DEPTH = WIN
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift_en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] win [DEPTH]
);

  localparam int unsigned NREG = N * (DEPTH - 1);

  // One long chain; column j (1-based) is chain[(j-1)*N +: N], its bottom is
  // chain[j*N-1].
  logic signed [W-1:0] chain [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) chain[i] <= '0;
    end else if (shift_en) begin
      chain[0] <= din;
      for (int i = 1; i < NREG; i++) chain[i] <= chain[i-1];
    end
  end

  always_comb begin
    win[0] = din;
    for (int j = 1; j < DEPTH; j++) win[j] = chain[j*N-1];
  end

endmodule
