// tb_module4_r2x3: Module 4 with random data and random stalls. Label
// t = {g[2:0], n2, s[1:0]}: every (g, s) pair is an independent 8-point DFT
// over n_lo = 4*n2 + lane. After 4 enabled cycles, output lane q with label
// {g, k0, s} must hold sum_n_lo v(n_lo) W8^(n_lo*k''), where
// k'' = k0 + 2*q[1] + 4*q[0], computed here in real arithmetic.
module tb_module4_r2x3;
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

  module4_r2x3 dut (.clk, .en, .t, .din, .dout);

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
      if (en && total >= 4) begin
        int l, base, k0;
        #1;
        l = total - 4;
        k0 = (l >> 2) & 1;
        base = l - (l % 8) + (l % 4);        // label with n2 = 0
        for (int q = 0; q < LANES; q++) begin
          real er, ei, ang, e;
          int kk;
          kk = k0 + 2 * ((q >> 1) & 1) + 4 * (q & 1);
          er = 0.0; ei = 0.0;
          for (int n2 = 0; n2 < 2; n2++)
            for (int p = 0; p < LANES; p++) begin
              ang = 2.0 * 3.14159265358979 * (((4 * n2 + p) * kk) % 8) / 8.0;
              er += hr[base + 4 * n2][p] * $cos(ang) + hi[base + 4 * n2][p] * $sin(ang);
              ei += hi[base + 4 * n2][p] * $cos(ang) - hr[base + 4 * n2][p] * $sin(ang);
            end
          e = $sqrt((er - dout[q].re) ** 2 + (ei - dout[q].im) ** 2);
          if (e > max_err) max_err = e;
          checks++;
          if (e > 2.5) begin
            failures++;
            if (failures < 5) $display("T=%0d lane %0d got %0d,%0d want %f,%f", total, q, dout[q].re, dout[q].im, er, ei);
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
