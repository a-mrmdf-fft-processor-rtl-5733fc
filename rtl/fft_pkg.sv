// fft_pkg: word formats and arithmetic shared by the MRMDF FFT processor.
//
// Complex samples travel as a struct of two signed DW-bit words. The input
// word is IN_W bits; the datapath does not scale between stages, so DW leaves
// room for the growth of a 128-point transform (7 bits) plus one bit for the
// magnitude of a complex number. Twiddle factors are Q1.14 in CW = 16 bits,
// products are rounded to the nearest integer (ties towards +inf). These word
// lengths are this design's choice; the architecture does not fix them.
// The package also holds the trivial twiddle multiplier (1, W8^1, -j, W8^3)
// used between butterfly stages and the elaboration-time twiddle functions.
package fft_pkg;

  localparam int IN_W = 12;          // input word (real and imaginary parts)
  localparam int DW   = 20;          // datapath word
  localparam int CW   = 16;          // twiddle coefficient word
  localparam int FRAC = 14;          // fractional bits of a coefficient
  localparam int LANES = 4;          // parallel data paths

  // Fixed-point value of v with FRAC fractional bits, rounded to nearest.
  // Used only at elaboration to fill constant tables.
  function automatic int qfix(input real v);
    real s;
    s = v * real'(1 << FRAC);
    return (s >= 0.0) ? int'($floor(s + 0.5)) : -int'($floor(-s + 0.5));
  endfunction

  localparam int C707  = qfix(0.70710678118654752);   // 1/sqrt(2)

  typedef logic signed [DW-1:0] word_t;
  typedef logic signed [CW-1:0] coef_t;

  typedef struct packed {
    word_t re;
    word_t im;
  } cplx_t;

  typedef struct packed {
    logic signed [IN_W-1:0] re;
    logic signed [IN_W-1:0] im;
  } cin_t;

  typedef cplx_t [LANES-1:0] lanes_t;

  // Round a product with FRAC fractional bits back to a DW-bit word.
  function automatic word_t rnd(input logic signed [DW+CW:0] p);
    logic signed [DW+CW:0] r;
    r = p + (DW+CW+1)'(1 <<< (FRAC-1));
    return word_t'(r >>> FRAC);
  endfunction

  function automatic cplx_t c_add(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cplx_t c_sub(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  // Multiply by -j: (a + jb)(-j) = b - ja.
  function automatic cplx_t c_negj(input cplx_t a);
    cplx_t r;
    r.re = a.im;
    r.im = -a.re;
    return r;
  endfunction

  // Trivial twiddle: sel 0 -> 1, 1 -> W8^1, 2 -> -j (W8^2), 3 -> W8^3.
  // W8^1 = (1 - j)/sqrt2 and W8^3 = (-1 - j)/sqrt2 take one add/subtract
  // pair and two multiplications by the constant 1/sqrt2.
  function automatic cplx_t c_w8(input cplx_t a, input logic [1:0] sel);
    cplx_t r;
    logic signed [DW:0] sre, sim;
    case (sel)
      2'd0: r = a;
      2'd2: r = c_negj(a);
      2'd1: begin
        sre = (DW+1)'(a.re) + (DW+1)'(a.im);
        sim = (DW+1)'(a.im) - (DW+1)'(a.re);
        r.re = rnd((DW+CW+1)'(sre) * (DW+CW+1)'(C707));
        r.im = rnd((DW+CW+1)'(sim) * (DW+CW+1)'(C707));
      end
      default: begin
        sre = (DW+1)'(a.im) - (DW+1)'(a.re);
        sim = -((DW+1)'(a.re) + (DW+1)'(a.im));
        r.re = rnd((DW+CW+1)'(sre) * (DW+CW+1)'(C707));
        r.im = rnd((DW+CW+1)'(sim) * (DW+CW+1)'(C707));
      end
    endcase
    return r;
  endfunction

  // General complex product a * (wr + j wi), rounded once per part.
  function automatic cplx_t c_mul(input cplx_t a, input coef_t wr, input coef_t wi);
    cplx_t r;
    logic signed [DW+CW:0] pr, pi;
    pr = (DW+CW+1)'(a.re) * (DW+CW+1)'(wr) - (DW+CW+1)'(a.im) * (DW+CW+1)'(wi);
    pi = (DW+CW+1)'(a.re) * (DW+CW+1)'(wi) + (DW+CW+1)'(a.im) * (DW+CW+1)'(wr);
    r.re = rnd(pr);
    r.im = rnd(pi);
    return r;
  endfunction

  // Real and imaginary parts of W_n^e = cos(2*pi*e/n) - j sin(2*pi*e/n) in
  // the coefficient format.
  function automatic int tw_re(input int e, input int n);
    return qfix($cos(2.0 * 3.14159265358979323846 * real'(e) / real'(n)));
  endfunction

  function automatic int tw_im(input int e, input int n);
    return qfix(-$sin(2.0 * 3.14159265358979323846 * real'(e) / real'(n)));
  endfunction

endpackage
