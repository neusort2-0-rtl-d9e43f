// tb_spike_detector -- self-checking test of the NEO spike detector.
// Random 7-sample windows (small noise, large spikes and full-scale values)
// and random thresholds; the expected decision is recomputed here with
// integer arithmetic: psi(k) = x(k)^2 - x(k-1)x(k+1), fire when psi(3) >= thr,
// psi(3) > psi(1), psi(2) and psi(3) >= psi(4), psi(5).
module tb_spike_detector;
  import neusort_pkg::*;

  logic signed [SAMPLE_W-1:0] win [DET_TAPS];
  logic [THR_W-1:0] threshold;
  logic fire;
  logic signed [NEO_W-1:0] energy;
  int checks = 0, failures = 0, fires = 0;
  logic clk = 1'b0;

  spike_detector dut (.win, .threshold, .fire, .energy);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int x [DET_TAPS];
      int psi [1:5];
      bit exp_fire;
      int mode;
      mode = $urandom_range(0, 2);
      for (int k = 0; k < DET_TAPS; k++) begin
        case (mode)
          0: x[k] = $urandom_range(0, 20) - 10;
          1: x[k] = (k == 3) ? $urandom_range(60, 255) : $urandom_range(0, 60) - 30;
          default: x[k] = $urandom_range(0, 511) - 256;
        endcase
        win[k] = SAMPLE_W'(x[k]);
      end
      threshold = (mode == 0) ? THR_W'($urandom_range(0, 200)) : THR_W'($urandom_range(0, 65535));
      for (int k = 1; k <= 5; k++) psi[k] = x[k]*x[k] - x[k-1]*x[k+1];
      exp_fire = (psi[3] >= int'(threshold)) && psi[3] > psi[1] && psi[3] > psi[2]
                 && psi[3] >= psi[4] && psi[3] >= psi[5];
      @(posedge clk);
      checks += 2;
      if (fire !== exp_fire) begin
        failures++;
        if (failures < 10) $display("t=%0d fire=%0b expected %0b (psi3=%0d thr=%0d)", t, fire, exp_fire, psi[3], threshold);
      end
      if (int'(energy) != psi[3]) failures++;
      if (exp_fire) fires++;
    end
    checks++;
    if (fires < 100) begin failures++; $display("too few detections: %0d", fires); end
    $display("detections %0d", fires);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
