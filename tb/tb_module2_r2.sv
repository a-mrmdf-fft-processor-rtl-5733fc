// tb_module2_r2: feeds Module 2 with random data in the Module 1 order (lane p
// at label t holds sample 4*t[6:2] + p of stream t[1:0]) with random stalls.
// After the 64-cycle latency, output label o = t - 64 must hold, for
// n2 = 4*o[5:2] + p, x(n2) + x(n2+64) when o[6] = 0 and
// (x(n2) - x(n2+64)) * W128^n2 when o[6] = 1, computed here in real
// arithmetic.
module tb_module2_r2;
  import fft_pkg::*;
  localparam int NT = 128 * 5;
  logic clk = 0;
  logic en;
  logic [6:0] t;
  lanes_t din, dout;
  int checks = 0, failures = 0;
  int total = 0;
  int hr [NT][LANES];
  int hi [NT][LANES];
  real max_err = 0.0;

  module2_r2 dut (.clk, .en, .t, .din, .dout);

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
    while (total < NT) begin
      @(negedge clk);
      en = ($urandom_range(4, 0) != 0);
      t = 7'(total);
      for (int p = 0; p < LANES; p++) begin
        hr[total][p] = int'($urandom_range(8000, 0)) - 4000;
        hi[total][p] = int'($urandom_range(8000, 0)) - 4000;
        din[p].re = word_t'(hr[total][p]);
        din[p].im = word_t'(hi[total][p]);
      end
      if (en && total >= 64) begin
        int o, base, s, m;
        #1;
        o = (total - 64) % 128;
        base = (total - 64) - o;
        s = o % 4;
        m = (o % 64) / 4;
        for (int p = 0; p < LANES; p++) begin
          real ar, ai, br, bi, er, ei, ang, e;
          int n2;
          n2 = 4 * m + p;
          ar = hr[base + 4 * m + s][p];      ai = hi[base + 4 * m + s][p];
          br = hr[base + 64 + 4 * m + s][p]; bi = hi[base + 64 + 4 * m + s][p];
          if (o < 64) begin
            er = ar + br;
            ei = ai + bi;
          end else begin
            ang = 2.0 * 3.14159265358979 * n2 / 128.0;
            er = (ar - br) * $cos(ang) + (ai - bi) * $sin(ang);
            ei = (ai - bi) * $cos(ang) - (ar - br) * $sin(ang);
          end
          e = $sqrt((er - dout[p].re) ** 2 + (ei - dout[p].im) ** 2);
          if (e > max_err) max_err = e;
          checks++;
          if (e > 1.5) begin
            failures++;
            if (failures < 5) $display("T=%0d lane %0d got %0d,%0d want %f,%f", total, p, dout[p].re, dout[p].im, er, ei);
          end
        end
      end
      @(posedge clk);
      if (en) total++;
    end
    $display("max error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
