// maxmin_detector -- event-based max/min feature extraction engine.
//
// Works on the record of the locked channel that has just rotated back out of
// the feature buffer and returns the updated record to it, all in one cycle.
//   * idle record and a spike event (fire): the record is reset, marked
//     active and stamped with the current timestamp;
//   * active record: the filtered sample y is compared with the stored
//     maximum and minimum (the first sample initialises both; later ties keep
//     the earlier position) and the sample counter advances; with the
//     FEAT_WIN-th (32nd) sample the record is finished: done pulses, the
//     record goes idle and its final values are on rec_out for the packer;
//   * a spike event on an active record is not taken and is flagged on
//     ignored.
// When en is low (buffer still filling) the record passes through unchanged.
// From the source description: reset on a spike event, maximum and minimum of
// the filtered samples of the next 32 cycles of the channel, intermediate
// values and time information kept in the feature buffer.  Own choices: the
// positions of the extremes (the third feature is their distance), the
// handling of events during a measurement.  Purely combinational.
module maxmin_detector
  import neusort_pkg::*;
#(
  parameter int unsigned NWIN = FEAT_WIN
) (
  input  feat_rec_t        rec_in,
  input  logic             en,
  input  logic             fire,
  input  feat_t            y,
  input  logic [TS_W-1:0]  ts,
  output feat_rec_t        rec_out,
  output logic             done,
  output logic             ignored
);

  always_comb begin
    rec_out = rec_in;
    done    = 1'b0;
    ignored = 1'b0;
    if (en) begin
      if (rec_in.active) begin
        ignored = fire;
        if (rec_in.cnt == '0 || y > rec_in.maxv) begin
          rec_out.maxv   = y;
          rec_out.maxpos = POS_W'(rec_in.cnt);
        end
        if (rec_in.cnt == '0 || y < rec_in.minv) begin
          rec_out.minv   = y;
          rec_out.minpos = POS_W'(rec_in.cnt);
        end
        rec_out.cnt = rec_in.cnt + 1'b1;
        if (rec_in.cnt == CNT_W'(NWIN - 1)) begin
          done           = 1'b1;
          rec_out.active = 1'b0;
        end
      end else if (fire) begin
        rec_out        = '0;
        rec_out.active = 1'b1;
        rec_out.ts     = ts;
      end
    end
  end

endmodule
