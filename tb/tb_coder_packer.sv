// tb_coder_packer -- self-checking test of the spike word packer.
// Random completed records and channel numbers; checks that out_valid
// follows done by one clock and that the 68-bit word carries, from MSB down,
// channel (4), timestamp (16), minpos - maxpos (16), minimum (16) and
// maximum (16), assembled here bit by bit.
module tb_coder_packer;
  import neusort_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, done = 1'b0;
  feat_rec_t rec;
  logic [CH_W-1:0] ch;
  logic out_valid;
  spike_word_t out_word;
  int checks = 0, failures = 0;

  coder_packer dut (.clk, .rst_n, .done, .rec, .ch, .out_valid, .out_word);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [67:0] expw;
    bit exp_valid;
    rec = '0; ch = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    exp_valid = 0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      done = ($urandom_range(0, 2) == 0);
      rec  = feat_rec_t'({$urandom, $urandom, $urandom});
      ch   = CH_W'($urandom);
      if (done) begin
        int d;
        d = int'(rec.minpos) - int'(rec.maxpos);
        expw = {ch, rec.ts, 16'(d), 16'(rec.minv), 16'(rec.maxv)};
      end
      exp_valid = done;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== exp_valid) failures++;
      if (exp_valid) begin
        checks++;
        if (out_word !== expw) begin
          failures++;
          if (failures < 10) $display("t=%0d word %h expected %h", t, out_word, expw);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
