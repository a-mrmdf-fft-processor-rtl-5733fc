// bu8_sdf: one BU_8 lane of Module 3, a radix-2^3 8-point DFT in SDF form.
//
// Within a 64-cycle frame a lane carries 16 samples of each of four
// interleaved streams; the time label t = {a, b, c, n2, s[1:0]} gives the
// stream s and the sample index 32a + 16b + 8c + 4n2 + lane. Three
// delay-feedback stages of depth 32, 16 and 8 compute the 8-point DFT over
// (a, b, c). Between them sit the trivial twiddles of the radix-2^3
// factorisation: -j after stage 1 when k0 = 1 and b = 1, and
// W8^(c*(k0 + 2*k1)) (1, W8^1, -j, W8^3) after stage 2. The output has label
// t - 56 = {k0, k1, k2, n2, s}. The delays and twiddle set follow the
// processor's description; the exact placement of the factors is this
// design's derivation of the radix-2^3 algorithm.
module bu8_sdf
  import fft_pkg::*;
#(
  parameter int D1 = 32
) (
  input  logic       clk,
  input  logic       en,
  input  logic [5:0] t,
  input  cplx_t      din,
  output cplx_t      dout
);
  localparam int D2 = D1 / 2;
  localparam int D3 = D1 / 4;
  localparam int B1 = $clog2(D1);

  cplx_t o1, o2, x2, x3;
  logic [5:0] l1, l2;

  assign l1 = t - 6'(D1);
  assign l2 = l1 - 6'(D2);

  sdf_stage #(.D(D1), .TW(6)) u_s1 (.clk, .en, .t(t), .din(din), .dout(o1));

  // -j when k0 (bit B1) and b (bit B1-1) of the stage-1 output label are set
  assign x2 = (l1[B1] && l1[B1-1]) ? c_negj(o1) : o1;

  sdf_stage #(.D(D2), .TW(6)) u_s2 (.clk, .en, .t(l1), .din(x2), .dout(o2));

  // W8^(c*(k0 + 2*k1)): c = bit B1-2, k0 = bit B1, k1 = bit B1-1
  assign x3 = c_w8(o2, l2[B1-2] ? {l2[B1-1], l2[B1]} : 2'd0);

  sdf_stage #(.D(D3), .TW(6)) u_s3 (.clk, .en, .t(l2), .din(x3), .dout(dout));
endmodule
