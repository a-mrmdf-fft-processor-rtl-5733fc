// tb_bu8_sdf: one Module 3 lane. Random data enter with label t = total mod 64
// ({a, b, c, n2, stream}) and random stalls. After 56 enabled cycles the
// output with label l = {k0, k1, k2, n2, s} must equal the 8-point DFT
// sum over j = 4a+2b+c of x(8-slot j, n2, s) * W8^(j*k'), k' = k0+2k1+4k2,
// computed here in real arithmetic.
module tb_bu8_sdf;
  import fft_pkg::*;
  localparam int NT = 64 * 6;
  logic clk = 0;
  logic en;
  logic [5:0] t;
  cplx_t din, dout;
  int checks = 0, failures = 0;
  int total = 0;
  int hr [NT];
  int hi [NT];
  real max_err = 0.0;

  bu8_sdf dut (.clk, .en, .t, .din, .dout);

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
      hr[total] = int'($urandom_range(8000, 0)) - 4000;
      hi[total] = int'($urandom_range(8000, 0)) - 4000;
      din.re = word_t'(hr[total]);
      din.im = word_t'(hi[total]);
      if (en && total >= 56) begin
        int l, base, kp, low;
        real er, ei, ang, e;
        #1;
        l = (total - 56) % 64;
        base = (total - 56) - l;
        kp = ((l >> 5) & 1) + 2 * ((l >> 4) & 1) + 4 * ((l >> 3) & 1);
        low = l % 8;                       // {n2, s}
        er = 0.0; ei = 0.0;
        for (int j = 0; j < 8; j++) begin
          ang = 2.0 * 3.14159265358979 * ((j * kp) % 8) / 8.0;
          er += hr[base + 8 * j + low] * $cos(ang) + hi[base + 8 * j + low] * $sin(ang);
          ei += hi[base + 8 * j + low] * $cos(ang) - hr[base + 8 * j + low] * $sin(ang);
        end
        e = $sqrt((er - dout.re) ** 2 + (ei - dout.im) ** 2);
        if (e > max_err) max_err = e;
        checks++;
        if (e > 2.5) begin
          failures++;
          if (failures < 5) $display("T=%0d got %0d,%0d want %f,%f", total, dout.re, dout.im, er, ei);
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
