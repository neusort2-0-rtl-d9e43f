// tb_coef_reg_array -- self-checking test of the coefficient register array.
// Checks reset values, random writes to every coefficient and the threshold
// against a shadow copy, and that writes to unused addresses and cycles
// without the strobe change nothing.
module tb_coef_reg_array;
  import neusort_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [CFG_ADDR_W-1:0] addr = '0;
  logic [15:0] wdata = '0;
  logic signed [COEF_W-1:0] coef [FIR_TAPS];
  logic [THR_W-1:0] threshold;
  int checks = 0, failures = 0;
  int shadow [FIR_TAPS + 1];

  coef_reg_array dut (.clk, .rst_n, .we, .addr, .wdata, .coef, .threshold);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int k = 0; k < FIR_TAPS; k++) begin
      checks++;
      if (int'(coef[k]) != shadow[k]) begin
        failures++;
        if (failures < 10) $display("%s: coef[%0d]=%0d expected %0d", what, k, coef[k], shadow[k]);
      end
    end
    checks++;
    if (int'(threshold) != shadow[FIR_TAPS]) begin
      failures++;
      $display("%s: threshold=%0d expected %0d", what, threshold, shadow[FIR_TAPS]);
    end
  endtask

  initial begin
    for (int k = 0; k < FIR_TAPS; k++) shadow[k] = 0;
    shadow[FIR_TAPS] = 65535;
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    compare("reset");
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 3) != 0);
      addr  = CFG_ADDR_W'($urandom_range(0, 40));
      wdata = 16'($urandom);
      @(posedge clk); #1;
      if (we) begin
        if (int'(addr) < FIR_TAPS) shadow[addr] = int'($signed(wdata[COEF_W-1:0]));
        else if (int'(addr) == FIR_TAPS) shadow[FIR_TAPS] = int'(wdata);
      end
      compare("run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
