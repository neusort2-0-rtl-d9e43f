// neusort2_top -- 16-channel neural signal processor with systolic array
// buffers and a channel-interleaving processing schedule.
//
// A frontend with one ADC shared by N_CH channels delivers one 9-bit sample
// per clock, channels in fixed order.  Instead of one processor per channel,
// or a large memory that regroups the samples per channel, this design keeps
// a single set of processing units and puts the per-channel state into two
// systolic register structures that rotate with the frontend's channel order:
//   * systolic_input_buffer: the last 39 samples of every channel; in every
//     cycle it presents the window of the channel whose sample arrives;
//   * feature_buffer: a 16-entry ring holding each channel's intermediate
//     max/min/time record, which comes back to the extractor when that
//     channel is served again.
// In each cycle the spike_detector (NEO, newest 7 samples), the
// noise_shaping_filter (32 taps over the other 32 samples) and the
// maxmin_detector work for the locked channel; a finished record is packed by
// coder_packer into a 68-bit spike word.  coef_reg_array holds the filter
// coefficients and threshold written over the cfg_* port;
// system_control_unit runs the CONFIG -> PRELOAD (39 x 16 samples) -> RUN
// sequence and the channel pointer.
//
// Timing, per channel: a spike whose peak sample arrives in round n is
// detected in round n+3 (the peak must be the centre of the 7-sample NEO
// window), the next 32 filtered samples of that channel (rounds n+4..n+35)
// are examined, and out_valid rises one clock after the channel's sample of
// round n+35 is accepted: 35 x 16 + 1 clocks after the peak at full rate.
// The interleaving structure, sizes and 640 kHz rate (one sample per clock)
// follow the source description; the detection alignment, the feature window
// alignment and therefore the latency are this design's choices.
module neusort2_top
  import neusort_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   run,
  input  logic                   in_valid,
  input  logic [SAMPLE_W-1:0]    in_sample,
  input  logic                   cfg_we,
  input  logic [CFG_ADDR_W-1:0]  cfg_addr,
  input  logic [15:0]            cfg_wdata,
  output logic                   out_valid,
  output spike_word_t            out_word,
  output ctrl_state_t            state,
  output logic [CH_W-1:0]        cur_ch
);

  logic            shift_en, proc_en, clear;
  logic [TS_W-1:0] ts;

  system_control_unit u_scu (
    .clk, .rst_n, .run, .in_valid,
    .shift_en, .proc_en, .clear,
    .ch(cur_ch), .ts, .state
  );

  coef_t           coef [FIR_TAPS];
  logic [THR_W-1:0] threshold;

  coef_reg_array u_coef (
    .clk, .rst_n,
    .we(cfg_we), .addr(cfg_addr), .wdata(cfg_wdata),
    .coef, .threshold
  );

  sample_t win [WIN];

  systolic_input_buffer u_sib (
    .clk, .rst_n, .shift_en,
    .din(sample_t'(in_sample)),
    .win
  );

  sample_t det_win [DET_TAPS];
  sample_t fir_win [FIR_TAPS];

  always_comb begin
    for (int k = 0; k < DET_TAPS; k++) det_win[k] = win[k];
    for (int k = 0; k < FIR_TAPS; k++) fir_win[k] = win[DET_TAPS + k];
  end

  logic                fire;
  logic signed [NEO_W-1:0] energy;

  spike_detector u_det (
    .win(det_win), .threshold, .fire, .energy
  );

  feat_t y;

  noise_shaping_filter u_fir (
    .x(fir_win), .coef, .y
  );

  feat_rec_t rec_back, rec_new;
  logic      done, ignored;

  feature_buffer u_fbuf (
    .clk, .rst_n, .clear, .shift_en,
    .din(rec_new), .dout(rec_back)
  );

  maxmin_detector u_mm (
    .rec_in(rec_back), .en(proc_en), .fire, .y, .ts,
    .rec_out(rec_new), .done, .ignored
  );

  coder_packer u_pack (
    .clk, .rst_n, .done, .rec(rec_new), .ch(cur_ch),
    .out_valid, .out_word
  );

  // the packed output word must match the 68-bit format
  if ($bits(spike_word_t) != OUT_W) begin : g_word_check
    $error("spike word width mismatch");
  end

endmodule
