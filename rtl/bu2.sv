// bu2: radix-2 butterfly, the BU_2 used throughout the processor.
//
// Combinational: s = a + b and d = a - b on complex words. No scaling is
// applied (the word length of fft_pkg leaves room for the full growth of a
// 128-point transform). Every stage of Modules 2, 3 and 4 is built from it.
module bu2
  import fft_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t s,
  output cplx_t d
);
  always_comb begin
    s = c_add(a, b);
    d = c_sub(a, b);
  end
endmodule
