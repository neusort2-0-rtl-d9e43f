// coder_packer -- codes a finished spike record into the output word.
//
// When done is high the completed record and the channel index are packed
// into one spike_word_t (68 bits: channel 4, timestamp 16, feature 3 16,
// minimum 16, maximum 16) and registered; out_valid is high for exactly one
// cycle per spike, one clock after the record completes.  At most one record
// completes per cycle (one channel is processed per cycle), so no queue is
// needed.  The contents (three features, timing information, channel index,
// 68 bits) follow the source description; the field order and the third
// feature, minpos - maxpos in samples, are this design's choice.
module coder_packer
  import neusort_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            done,
  input  feat_rec_t       rec,
  input  logic [CH_W-1:0] ch,
  output logic            out_valid,
  output spike_word_t     out_word
);

  spike_word_t word;

  always_comb begin
    word.ch   = ch;
    word.ts   = rec.ts;
    word.f3   = FEAT_W'($signed({1'b0, rec.minpos}) - $signed({1'b0, rec.maxpos}));
    word.fmin = rec.minv;
    word.fmax = rec.maxv;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      out_valid <= done;
      if (done) out_word <= word;
    end
  end

endmodule
