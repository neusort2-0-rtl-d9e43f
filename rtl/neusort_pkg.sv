// neusort_pkg -- shared constants and types of the 16-channel neural signal
// processor.
//
// The processor takes one 9-bit sample per clock from a frontend whose ADC is
// shared by 16 channels (channel 1, 2, ..., 16, 1, 2, ...), keeps the last 39
// samples of every channel in a systolic register array, and processes the
// channel whose sample is arriving in the same cycle: NEO spike detection on
// the newest 7 samples, a 32-tap noise shaping FIR on the other 32, and a
// max/min feature extractor whose per-channel state rotates through a
// 16-entry ring buffer.
//
// Numbers taken from the source description: 16 channels, 9-bit samples,
// 39-sample window (7 for detection + 32 for the filter), 32 9-bit
// coefficients, 16-bit threshold, 32-sample feature window, 68-bit output
// word.  Own choices: the 16-bit feature and timestamp widths, the field
// order of the output word, and the third feature (distance from the maximum
// to the minimum, in samples).
package neusort_pkg;

  localparam int unsigned N_CH      = 16;  // channels per ADC
  localparam int unsigned CH_W      = $clog2(N_CH);
  localparam int unsigned SAMPLE_W  = 9;   // ADC sample width (two's complement)
  localparam int unsigned DET_TAPS  = 7;   // samples seen by the NEO detector
  localparam int unsigned FIR_TAPS  = 32;  // noise shaping filter taps
  localparam int unsigned WIN       = DET_TAPS + FIR_TAPS; // 39-sample window
  localparam int unsigned COEF_W    = 9;   // filter coefficient width
  localparam int unsigned THR_W     = 16;  // detection threshold width
  localparam int unsigned FEAT_W    = 16;  // width of one feature / filtered sample
  localparam int unsigned TS_W      = 16;  // event timestamp width
  localparam int unsigned FEAT_WIN  = 32;  // filtered samples examined per spike
  localparam int unsigned POS_W     = $clog2(FEAT_WIN);
  localparam int unsigned CNT_W     = POS_W + 1;
  localparam int unsigned OUT_W     = CH_W + TS_W + 3 * FEAT_W; // 68
  localparam int unsigned PRELOAD   = WIN * N_CH; // 39 x 16 cycles to fill the buffer
  localparam int unsigned NEO_W     = 2 * SAMPLE_W + 1; // signed NEO value

  // configuration address map of the coefficient register array
  localparam int unsigned CFG_ADDR_W   = 6;
  localparam int unsigned CFG_THR_ADDR = FIR_TAPS; // 0..31 coefficients, 32 threshold

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic signed [FEAT_W-1:0]   feat_t;

  typedef enum logic [1:0] {
    ST_CONFIG  = 2'd0,  // not running: coefficients may be programmed
    ST_PRELOAD = 2'd1,  // filling the input systolic buffer (39 x 16 samples)
    ST_RUN     = 2'd2   // every sample is processed
  } ctrl_state_t;

  // Intermediate feature-extraction state of one channel (one entry of the
  // feature buffer ring).
  typedef struct packed {
    logic             active;  // a spike is being measured
    logic [CNT_W-1:0] cnt;     // filtered samples already examined
    feat_t            maxv;    // largest filtered sample so far
    feat_t            minv;    // smallest filtered sample so far
    logic [POS_W-1:0] maxpos;  // window position (0..31) of maxv
    logic [POS_W-1:0] minpos;  // window position (0..31) of minv
    logic [TS_W-1:0]  ts;      // sample index of the channel at detection
  } feat_rec_t;

  // Output word towards the system bus, 68 bits, MSB first.
  typedef struct packed {
    logic [CH_W-1:0] ch;    // channel index 0..15 (channel #01 is 0)
    logic [TS_W-1:0] ts;    // timestamp of the detection
    feat_t           f3;    // minpos - maxpos, samples, sign-extended
    feat_t           fmin;  // minimum of the filtered spike
    feat_t           fmax;  // maximum of the filtered spike
  } spike_word_t;

endpackage
