// tb_neusort2_top -- end-to-end, cycle-exact test of the 16-channel processor
// at its default (full) size.
//
// The testbench plays the shared-ADC frontend: one 9-bit sample per clock,
// channels 0..15 in turn, each channel small random noise plus injected
// biphasic spikes of random amplitude.  It programs the filter coefficients
// and the threshold over the configuration port, then runs:
//   1. full-rate operation (preload, then 2500 rounds),
//   2. operation with random gaps in in_valid (stalls),
//   3. a stop (run low), a new threshold, and a restart with a new preload.
// A reference model written here with plain integers keeps each channel's
// sample history, evaluates the NEO detector, the 32-tap filter and the
// max/min extraction for the channel of every accepted sample, and predicts
// out_valid and the 68-bit word of every clock; the DUT must match it on every
// cycle, as must its state and channel pointer.  Where no stall intervenes,
// the time from a spike's peak sample to its output word must be 35*16+1
// clocks.  Every mechanism (preload, detection, sub-threshold peak, event
// ignored while a channel is busy, stall, stop/restart, configuration write,
// output from every channel) is counted and must occur at least once.
module tb_neusort2_top;
  import neusort_pkg::*;

  localparam int LAT = 35 * N_CH + 1;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, in_valid = 1'b0;
  logic [SAMPLE_W-1:0] in_sample = '0;
  logic cfg_we = 1'b0;
  logic [CFG_ADDR_W-1:0] cfg_addr = '0;
  logic [15:0] cfg_wdata = '0;
  logic out_valid;
  spike_word_t out_word;
  ctrl_state_t state;
  logic [CH_W-1:0] cur_ch;

  neusort2_top dut (.clk, .rst_n, .run, .in_valid, .in_sample, .cfg_we, .cfg_addr,
                    .cfg_wdata, .out_valid, .out_word, .state, .cur_ch);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model state ----------------
  int coef_m [FIR_TAPS];
  int thr_m;
  int hist [N_CH][$];        // accepted samples per channel (since run)
  longint hcyc [N_CH][$];    // cycle each of them was presented
  int accepted;              // samples accepted since run went high
  int m_ch, m_ts;
  // per-channel record
  bit r_act [N_CH];
  int r_cnt [N_CH], r_max [N_CH], r_min [N_CH], r_pmax [N_CH], r_pmin [N_CH], r_ts [N_CH];
  longint r_peak_cyc [N_CH];
  int r_stalls [N_CH];
  // expectation for the next clock
  bit exp_valid;
  logic [OUT_W-1:0] exp_word;
  bit exp_lat_check;
  longint exp_peak_cyc;

  // mechanism counters
  int n_preload = 0, n_detect = 0, n_subthr = 0, n_ignored = 0, n_stall = 0;
  int n_restart = 0, n_cfg = 0, n_out = 0, n_lat = 0;
  int n_out_ch [N_CH];

  // stimulus state per channel
  int sp_pos [N_CH], sp_amp [N_CH];
  int tpl [15] = '{0, 20, 60, 130, 200, 160, 60, -40, -110, -140, -120, -80, -45, -20, -5};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s", cycle, what);
    end
  endtask

  task automatic cfg_write(int a, int d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = CFG_ADDR_W'(a); cfg_wdata = 16'(d);
    @(posedge clk);
    @(negedge clk);
    cfg_we = 1'b0;
    if (a < FIR_TAPS) coef_m[a] = d;
    else if (a == FIR_TAPS) thr_m = d;
    n_cfg++;
  endtask

  function automatic int next_sample(int c);
    int v;
    v = $urandom_range(0, 12) - 6;
    if (sp_pos[c] < 0) begin
      int r;
      r = $urandom_range(0, 999);
      if (r < 12) begin sp_pos[c] = 0; sp_amp[c] = $urandom_range(10, 20); end  // large spike
      else if (r < 16) begin sp_pos[c] = 0; sp_amp[c] = $urandom_range(2, 4); end // small spike
    end else if (sp_pos[c] == 20 && $urandom_range(0, 3) == 0) begin
      sp_pos[c] = 0; sp_amp[c] = $urandom_range(10, 20);  // a second spike close behind
    end
    if (sp_pos[c] >= 0) begin
      if (sp_pos[c] < 15) v += tpl[sp_pos[c]] * sp_amp[c] / 16;
      sp_pos[c]++;
      if (sp_pos[c] >= 40) sp_pos[c] = -1;
    end
    if (v > 255) v = 255;
    if (v < -256) v = -256;
    return v;
  endfunction

  function automatic void model_stop();
    accepted = 0; m_ch = 0; m_ts = 0;
    for (int c = 0; c < N_CH; c++) begin
      hist[c].delete(); hcyc[c].delete(); r_act[c] = 0;
    end
  endfunction

  // model one accepted sample x for channel m_ch, presented in this cycle
  function automatic void model_accept(int x);
    int c, w [WIN], psi [1:5], y;
    longint acc;
    bit fire;
    c = m_ch;
    exp_valid = 0; exp_lat_check = 0;
    if (accepted >= PRELOAD) begin
      w[0] = x;
      for (int j = 1; j < WIN; j++) w[j] = (hist[c].size() >= j) ? hist[c][hist[c].size() - j] : 0;
      for (int k = 1; k <= 5; k++) psi[k] = w[k]*w[k] - w[k-1]*w[k+1];
      fire = psi[3] > psi[1] && psi[3] > psi[2] && psi[3] >= psi[4] && psi[3] >= psi[5];
      if (fire && psi[3] < thr_m) n_subthr++;
      fire = fire && psi[3] >= thr_m;
      acc = 0;
      for (int k = 0; k < FIR_TAPS; k++) acc += longint'(w[DET_TAPS + k]) * coef_m[k];
      y = int'(acc >>> 7);
      if (r_act[c]) begin
        if (fire) n_ignored++;
        if (r_cnt[c] == 0 || y > r_max[c]) begin r_max[c] = y; r_pmax[c] = r_cnt[c]; end
        if (r_cnt[c] == 0 || y < r_min[c]) begin r_min[c] = y; r_pmin[c] = r_cnt[c]; end
        r_cnt[c]++;
        if (r_cnt[c] == FEAT_WIN) begin
          r_act[c] = 0;
          exp_valid = 1;
          exp_word = {CH_W'(c), TS_W'(r_ts[c]), 16'(r_pmin[c] - r_pmax[c]), 16'(r_min[c]), 16'(r_max[c])};
          exp_lat_check = (r_stalls[c] == n_stall);
          exp_peak_cyc = r_peak_cyc[c];
        end
      end else if (fire) begin
        n_detect++;
        r_act[c] = 1; r_cnt[c] = 0; r_ts[c] = m_ts;
        r_peak_cyc[c] = hcyc[c][hcyc[c].size() - 3];
        r_stalls[c] = n_stall;
      end
    end
    hist[c].push_back(x);
    hcyc[c].push_back(cycle);
    if (hist[c].size() > WIN) begin void'(hist[c].pop_front()); void'(hcyc[c].pop_front()); end
    accepted++;
    if (accepted == PRELOAD) n_preload++;
    m_ch = (m_ch + 1) % N_CH;
    if (m_ch == 0) m_ts = (m_ts + 1) % (1 << TS_W);
  endfunction

  // compare the DUT with the expectation of the previous clock (at negedge)
  task automatic compare_outputs();
    check(out_valid == exp_valid, $sformatf("out_valid %0b expected %0b", out_valid, exp_valid));
    if (exp_valid && out_valid) begin
      check(out_word == exp_word, $sformatf("word %h expected %h", out_word, exp_word));
      n_out++;
      n_out_ch[out_word.ch]++;
      if (exp_lat_check) begin
        n_lat++;
        check(cycle - exp_peak_cyc == longint'(LAT),
              $sformatf("latency %0d expected %0d", cycle - exp_peak_cyc, LAT));
      end
    end
  endtask

  // one clock: drive inputs at negedge, update model, advance
  task automatic step(bit v);
    int x;
    @(negedge clk);
    compare_outputs();
    check(int'(cur_ch) == (run ? m_ch : 0), "channel pointer");
    check(int'(state) == (!run || (accepted == 0) ? int'(ST_CONFIG)
                          : (accepted < PRELOAD ? int'(ST_PRELOAD) : int'(ST_RUN))), "state");
    run = 1'b1;
    in_valid = v;
    exp_valid = 0;
    if (v) begin
      x = next_sample(m_ch);
      in_sample = SAMPLE_W'(x);
      #1;
      model_accept(x);
    end else begin
      n_stall++;
    end
  endtask

  task automatic stop(int cycles);
    @(negedge clk);
    compare_outputs();
    run = 1'b0; in_valid = 1'b0; exp_valid = 0;
    model_stop();
    repeat (cycles) begin
      @(negedge clk);
      compare_outputs();
      check(state == ST_CONFIG, "state while stopped");
    end
  endtask

  initial begin
    for (int c = 0; c < N_CH; c++) begin sp_pos[c] = -1; n_out_ch[c] = 0; end
    for (int k = 0; k < FIR_TAPS; k++) coef_m[k] = 0;
    thr_m = 65535;
    model_stop();
    exp_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // configuration: coefficients c[k] = ((29k+7) mod 255) - 127, threshold 3000
    for (int k = 0; k < FIR_TAPS; k++) cfg_write(k, (((29 * k + 7) % 255) - 127) & 32'h1ff);
    for (int k = 0; k < FIR_TAPS; k++) coef_m[k] = ((29 * k + 7) % 255) - 127;
    cfg_write(FIR_TAPS, 3000);
    // phase 1: full rate
    repeat (PRELOAD + 2500 * N_CH) step(1'b1);
    // phase 2: random stalls
    repeat (800 * N_CH) step($urandom_range(0, 4) != 0);
    // phase 3: stop, lower threshold, restart
    stop(20);
    n_restart++;
    cfg_write(FIR_TAPS, 1000);
    repeat (PRELOAD + 600 * N_CH) step(1'b1);
    repeat (40 * N_CH) step(1'b1);
    @(negedge clk);
    compare_outputs();

    $display("preloads %0d, detections %0d, sub-threshold peaks %0d, ignored while busy %0d",
             n_preload, n_detect, n_subthr, n_ignored);
    $display("stall cycles %0d, restarts %0d, config writes %0d, spike words %0d, latency checks %0d",
             n_stall, n_restart, n_cfg, n_out, n_lat);
    check(n_preload >= 2, "preload completed twice");
    check(n_detect >= 1, "spike detected");
    check(n_subthr >= 1, "sub-threshold peak seen");
    check(n_ignored >= 1, "event ignored while busy");
    check(n_stall >= 1, "input stall");
    check(n_restart >= 1, "restart");
    check(n_cfg >= 1, "configuration write");
    check(n_lat >= 1, "latency measured");
    for (int c = 0; c < N_CH; c++) check(n_out_ch[c] >= 1, $sformatf("spike word from channel %0d", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
