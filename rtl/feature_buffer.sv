// feature_buffer -- systolic ring buffer for the intermediate feature state.
//
// N_CH one-channel registers in a loop.  Every enabled cycle the processing
// unit writes the record of the channel it served into the top register,
// every record moves down one place, and the bottom register -- written
// N_CH enabled cycles earlier, i.e. the record of the channel that is served
// now -- is presented on dout.  The processing unit therefore sees each
// channel's intermediate maximum, minimum and time information again exactly
// when that channel's next sample arrives, without any addressing.
// Interface: din/shift_en in, dout out (registered).  clear empties every
// record synchronously; reset does so asynchronously.  The ring structure and
// the 16 entries follow the source description; the clear input is this
// design's choice.
module feature_buffer
  import neusort_pkg::*;
#(
  parameter int unsigned N = N_CH
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      shift_en,
  input  feat_rec_t din,
  output feat_rec_t dout
);

  feat_rec_t ring [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) ring[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < N; i++) ring[i] <= '0;
    end else if (shift_en) begin
      ring[0] <= din;
      for (int i = 1; i < N; i++) ring[i] <= ring[i-1];
    end
  end

  assign dout = ring[N-1];

endmodule
