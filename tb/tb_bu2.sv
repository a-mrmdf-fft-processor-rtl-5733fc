// tb_bu2: checks the radix-2 butterfly on random complex words, including
// values near the ends of the word range, against integer sums and
// differences computed here.
module tb_bu2;
  import fft_pkg::*;
  logic clk = 0;
  cplx_t a, b, s, d;
  int checks = 0, failures = 0;

  bu2 dut (.a, .b, .s, .d);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int ar, ai, br, bi, lim;
      lim = (i < 500) ? 1000 : (1 << (DW - 2)) - 1;
      ar = int'($urandom_range(2 * lim, 0)) - lim;
      ai = int'($urandom_range(2 * lim, 0)) - lim;
      br = int'($urandom_range(2 * lim, 0)) - lim;
      bi = int'($urandom_range(2 * lim, 0)) - lim;
      a.re = word_t'(ar); a.im = word_t'(ai);
      b.re = word_t'(br); b.im = word_t'(bi);
      @(posedge clk);
      checks++;
      if (int'(s.re) != ar + br || int'(s.im) != ai + bi ||
          int'(d.re) != ar - br || int'(d.im) != ai - bi) begin
        failures++;
        if (failures < 5) $display("bu2 mismatch %0d %0d %0d %0d", ar, ai, br, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
