// tb_systolic_input_buffer -- self-checking test of the input systolic buffer.
// Streams random samples with random gaps in shift_en and, every cycle,
// compares each window position j with the sample accepted 16*j shifts
// earlier (zero before that), kept in an independent history queue.
module tb_systolic_input_buffer;
  import neusort_pkg::*;

  localparam int N = N_CH;
  localparam int D = WIN;

  logic clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0;
  logic signed [SAMPLE_W-1:0] din = '0;
  logic signed [SAMPLE_W-1:0] win [D];
  int checks = 0, failures = 0;
  int hist [$];

  systolic_input_buffer dut (.clk, .rst_n, .shift_en, .din, .win);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      din      = SAMPLE_W'($urandom);
      shift_en = ($urandom_range(0, 9) != 0);
      #1;
      for (int j = 0; j < D; j++) begin
        int m, expv;
        m = hist.size() - N * j;
        expv = (j == 0) ? int'(din) : ((m >= 0) ? hist[m] : 0);
        checks++;
        if (int'(win[j]) != expv) begin
          failures++;
          if (failures < 10) $display("cycle %0d win[%0d]=%0d expected %0d", cyc, j, win[j], expv);
        end
      end
      @(posedge clk);
      if (shift_en) hist.push_back(int'(din));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
