// tb_system_control_unit -- self-checking test of the control unit.
// Runs the sequence CONFIG -> PRELOAD -> RUN with random input gaps, checks
// that exactly 39 x 16 accepted samples pass before the first processed one,
// that the channel pointer walks 0..15 and the timestamp counts rounds, that
// proc_en/shift_en/clear follow run, in_valid and the state, and that
// dropping run returns to CONFIG and restarts the preload.
module tb_system_control_unit;
  import neusort_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, in_valid = 1'b0;
  logic shift_en, proc_en, clear;
  logic [CH_W-1:0] ch;
  logic [TS_W-1:0] ts;
  ctrl_state_t state;
  int checks = 0, failures = 0;

  system_control_unit dut (.clk, .rst_n, .run, .in_valid, .shift_en, .proc_en,
                           .clear, .ch, .ts, .state);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("%s = %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    int accepted;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int session = 0; session < 3; session++) begin
      @(negedge clk);
      run = 1'b0; in_valid = 1'b1;
      #1;
      expect_eq(int'(clear), 1, "clear while stopped");
      expect_eq(int'(shift_en), 0, "shift while stopped");
      @(posedge clk); #1;
      expect_eq(int'(state), int'(ST_CONFIG), "state after stop");
      expect_eq(int'(ch), 0, "channel after stop");
      accepted = 0;
      for (int t = 0; t < 2500 + session * 300; t++) begin
        @(negedge clk);
        run = 1'b1;
        in_valid = ($urandom_range(0, 5) != 0);
        #1;
        expect_eq(int'(ch), accepted % N_CH, "ch");
        expect_eq(int'(ts), (accepted / N_CH) % (1 << TS_W), "ts");
        expect_eq(int'(shift_en), int'(in_valid), "shift_en");
        expect_eq(int'(clear), 0, "clear");
        expect_eq(int'(proc_en), int'(in_valid && accepted >= PRELOAD), "proc_en");
        expect_eq(int'(state), accepted == 0 ? int'(ST_CONFIG)
                                : (accepted < PRELOAD ? int'(ST_PRELOAD) : int'(ST_RUN)), "state");
        @(posedge clk);
        if (in_valid) accepted++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
