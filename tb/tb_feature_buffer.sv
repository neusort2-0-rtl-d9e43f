// tb_feature_buffer -- self-checking test of the 16-entry feature ring.
// Writes random records with random shift enables and checks that dout is
// always the record written 16 enabled shifts earlier (idle before that and
// after a clear), using a testbench queue as reference.
module tb_feature_buffer;
  import neusort_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, shift_en = 1'b0;
  feat_rec_t din, dout;
  int checks = 0, failures = 0;
  feat_rec_t q [$];

  feature_buffer dut (.clk, .rst_n, .clear, .shift_en, .din, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reset_ref();
    q.delete();
    for (int i = 0; i < N_CH; i++) q.push_back('0);
  endtask

  initial begin
    din = '0;
    reset_ref();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      checks++;
      if (dout !== q[0]) begin
        failures++;
        if (failures < 10) $display("t=%0d dout %h expected %h", t, dout, q[0]);
      end
      din      = feat_rec_t'({$urandom, $urandom, $urandom});
      shift_en = ($urandom_range(0, 4) != 0);
      clear    = ($urandom_range(0, 999) == 0);
      @(posedge clk);
      if (clear) reset_ref();
      else if (shift_en) begin
        void'(q.pop_front());
        q.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
