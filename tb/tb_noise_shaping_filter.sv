// tb_noise_shaping_filter -- self-checking test of the 32-tap FIR.
// Random samples and coefficients, including all-extreme corner cases; the
// expected output is the integer convolution shifted right by 7 (floor).
module tb_noise_shaping_filter;
  import neusort_pkg::*;

  logic signed [SAMPLE_W-1:0] x    [FIR_TAPS];
  logic signed [COEF_W-1:0]   coef [FIR_TAPS];
  logic signed [FEAT_W-1:0]   y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  noise_shaping_filter dut (.x, .coef, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 10000; t++) begin
      longint acc;
      int expv;
      acc = 0;
      for (int k = 0; k < FIR_TAPS; k++) begin
        int xs, cs;
        case (t)
          0: begin xs = -256; cs = -256; end
          1: begin xs = 255;  cs = -256; end
          2: begin xs = 255;  cs = 255;  end
          default: begin xs = $urandom_range(0, 511) - 256; cs = $urandom_range(0, 511) - 256; end
        endcase
        x[k] = SAMPLE_W'(xs); coef[k] = COEF_W'(cs);
        acc += longint'(xs) * cs;
      end
      expv = int'(acc >>> 7);
      @(posedge clk);
      checks++;
      if (int'(y) != expv) begin
        failures++;
        if (failures < 10) $display("t=%0d y=%0d expected %0d", t, y, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
