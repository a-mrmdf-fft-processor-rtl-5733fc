// tb_module3_r2x3: Module 3 with random data in the Module 1 order (lane p at
// label t holds 64-point sample n = 4*t[5:2] + p of stream t[1:0]) and random
// stalls. After 56 enabled cycles, lane p with output label
// l = {k0, k1, k2, n2, s} must hold
//   W64^(n_lo*k') * sum_j x(8j + n_lo) W8^(j*k'),  n_lo = 4*n2 + p,
// k' = k0 + 2k1 + 4k2, computed here in real arithmetic.
module tb_module3_r2x3;
  import fft_pkg::*;
  localparam int NT = 64 * 6;
  logic clk = 0;
  logic en;
  logic [5:0] t;
  lanes_t din, dout;
  int checks = 0, failures = 0;
  int total = 0;
  int hr [NT][LANES];
  int hi [NT][LANES];
  real max_err = 0.0;

  module3_r2x3 dut (.clk, .en, .t, .din, .dout);

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
      t = 6'(total);
      for (int p = 0; p < LANES; p++) begin
        hr[total][p] = int'($urandom_range(8000, 0)) - 4000;
        hi[total][p] = int'($urandom_range(8000, 0)) - 4000;
        din[p].re = word_t'(hr[total][p]);
        din[p].im = word_t'(hi[total][p]);
      end
      if (en && total >= 56) begin
        int l, base, kp, n2, s;
        #1;
        l = (total - 56) % 64;
        base = (total - 56) - l;
        kp = ((l >> 5) & 1) + 2 * ((l >> 4) & 1) + 4 * ((l >> 3) & 1);
        n2 = (l >> 2) & 1;
        s = l % 4;
        for (int p = 0; p < LANES; p++) begin
          real yr, yi, er, ei, ang, e;
          int nlo;
          nlo = 4 * n2 + p;
          yr = 0.0; yi = 0.0;
          for (int j = 0; j < 8; j++) begin
            int tt;
            tt = base + 4 * (2 * j + n2) + s;     // slot m = 2j + n2
            ang = 2.0 * 3.14159265358979 * ((j * kp) % 8) / 8.0;
            yr += hr[tt][p] * $cos(ang) + hi[tt][p] * $sin(ang);
            yi += hi[tt][p] * $cos(ang) - hr[tt][p] * $sin(ang);
          end
          ang = 2.0 * 3.14159265358979 * (nlo * kp) / 64.0;
          er = yr * $cos(ang) + yi * $sin(ang);
          ei = yi * $cos(ang) - yr * $sin(ang);
          e = $sqrt((er - dout[p].re) ** 2 + (ei - dout[p].im) ** 2);
          if (e > max_err) max_err = e;
          checks++;
          if (e > 3.0) begin
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
