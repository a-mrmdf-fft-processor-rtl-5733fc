// tb_module1_reorder: drives four streams with samples tagged by stream and
// index (re = 256*stream + index, im = its negation) with random stalls, and
// checks after the 3-cycle latency that every output cycle holds samples
// 4m..4m+3 of stream (T-3) mod 4 in lanes 0..3, T being the input count.
module tb_module1_reorder;
  import fft_pkg::*;
  logic clk = 0;
  logic en;
  logic [1:0] t;
  lanes_t din, dout;
  int checks = 0, failures = 0;
  int total = 0;

  module1_reorder dut (.clk, .en, .t, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0;
    t = 0;
    din = '0;
    while (total < 1000) begin
      @(negedge clk);
      en = ($urandom_range(4, 0) != 0);
      t = 2'(total);
      for (int s = 0; s < LANES; s++) begin
        din[s].re = word_t'(256 * s + (total % 128));
        din[s].im = -word_t'(256 * s + (total % 128));
      end
      if (en && total >= 3) begin
        int lbl, s, m;
        #1;
        lbl = total - 3;
        s = lbl % 4;
        m = (lbl % 128) / 4;
        for (int p = 0; p < LANES; p++) begin
          checks++;
          if (int'(dout[p].re) != 256 * s + 4 * m + p || int'(dout[p].im) != -(256 * s + 4 * m + p)) begin
            failures++;
            if (failures < 5)
              $display("T=%0d lane %0d got %0d want %0d", total, p, dout[p].re, 256 * s + 4 * m + p);
          end
        end
      end
      @(posedge clk);
      if (en) total++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
