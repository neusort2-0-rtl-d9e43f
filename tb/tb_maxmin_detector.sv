// tb_maxmin_detector -- self-checking test of the max/min feature extractor.
// Keeps a reference record in the testbench, drives it into the block with
// random enables, events, filtered samples and timestamps, and compares the
// returned record, done and ignored with the reference update.  Also checks
// that a finished record holds the true maximum/minimum of the 32 samples
// and their first positions, computed from the list of samples fed in.
module tb_maxmin_detector;
  import neusort_pkg::*;

  feat_rec_t rec_in, rec_out, ref_rec;
  logic en, fire, done, ignored;
  feat_t y;
  logic [TS_W-1:0] ts;
  int checks = 0, failures = 0, n_done = 0, n_ign = 0;
  int samples [$];
  logic clk = 1'b0;

  maxmin_detector dut (.rec_in, .en, .fire, .y, .ts, .rec_out, .done, .ignored);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_rec = '0;
    for (int t = 0; t < 50000; t++) begin
      feat_rec_t nxt;
      bit exp_done, exp_ign;
      en   = ($urandom_range(0, 7) != 0);
      fire = ($urandom_range(0, 9) == 0);
      y    = FEAT_W'($urandom_range(0, 2000) - 1000);
      ts   = TS_W'($urandom);
      rec_in = ref_rec;
      nxt = ref_rec; exp_done = 0; exp_ign = 0;
      if (en) begin
        if (ref_rec.active) begin
          exp_ign = fire;
          samples.push_back(int'(y));
          if (ref_rec.cnt == 0 || y > ref_rec.maxv) begin nxt.maxv = y; nxt.maxpos = POS_W'(ref_rec.cnt); end
          if (ref_rec.cnt == 0 || y < ref_rec.minv) begin nxt.minv = y; nxt.minpos = POS_W'(ref_rec.cnt); end
          nxt.cnt = ref_rec.cnt + 1;
          if (int'(ref_rec.cnt) == FEAT_WIN - 1) begin exp_done = 1; nxt.active = 0; end
        end else if (fire) begin
          nxt = '0; nxt.active = 1; nxt.ts = ts; samples.delete();
        end
      end
      @(posedge clk);
      checks += 3;
      if (rec_out !== nxt) begin failures++; if (failures < 10) $display("t=%0d record mismatch %h vs %h", t, rec_out, nxt); end
      if (done !== exp_done) failures++;
      if (ignored !== exp_ign) failures++;
      if (exp_ign) n_ign++;
      if (exp_done) begin
        int mx, mn, pmx, pmn;
        n_done++;
        mx = samples[0]; mn = samples[0]; pmx = 0; pmn = 0;
        foreach (samples[i]) begin
          if (samples[i] > mx) begin mx = samples[i]; pmx = i; end
          if (samples[i] < mn) begin mn = samples[i]; pmn = i; end
        end
        checks += 2;
        if (samples.size() != FEAT_WIN) failures++;
        if (int'(rec_out.maxv) != mx || int'(rec_out.minv) != mn ||
            int'(rec_out.maxpos) != pmx || int'(rec_out.minpos) != pmn) begin
          failures++;
          $display("t=%0d features wrong: max %0d@%0d min %0d@%0d", t, rec_out.maxv, rec_out.maxpos, rec_out.minv, rec_out.minpos);
        end
      end
      ref_rec = nxt;
    end
    checks++;
    if (n_done < 50 || n_ign < 50) begin failures++; $display("too few events: done %0d ignored %0d", n_done, n_ign); end
    $display("completed records %0d, ignored events %0d", n_done, n_ign);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
