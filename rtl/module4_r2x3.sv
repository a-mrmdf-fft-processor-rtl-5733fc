// module4_r2x3: Module 4, the last 8-point radix-2^3 DFT of the 64-point FFT.
//
// The 8-point DFT runs over n_lo = 4*n2 + 2*p1 + p0, where n2 is the time bit
// of label bit 2 and p1 p0 the lane number. Stage 1 is a BU_2 per lane with a
// 4-word delay feedback (pairs n2 = 0/1, four cycles apart), followed by -j on
// lanes 2 and 3 when its output index k0 is 1. Stage 2 pairs lanes (0,2) and
// (1,3); lane 1 is then multiplied by W8^k0 and lane 3 by W8^(k0+2). Stage 3
// pairs lanes (0,1) and (2,3). Output lane q holds 8-point index
// k'' = k0 + 2*q[1] + 4*q[0]; the label is t - 4 with k0 in bit 2.
// Stages 2 and 3 are combinational.
module module4_r2x3
  import fft_pkg::*;
#(
  parameter int DLY = 4
) (
  input  logic       clk,
  input  logic       en,
  input  logic [5:0] t,
  input  lanes_t     din,
  output lanes_t     dout
);
  lanes_t a, b, y, z;
  logic [5:0] lo;
  logic       k0;

  for (genvar p = 0; p < LANES; p++) begin : g_lane
    sdf_stage #(.D(DLY), .TW(6)) u_s1 (.clk, .en, .t(t), .din(din[p]), .dout(a[p]));
  end

  assign lo = t - 6'(DLY);
  assign k0 = lo[$clog2(DLY)];

  always_comb begin
    b[0] = a[0];
    b[1] = a[1];
    b[2] = k0 ? c_negj(a[2]) : a[2];
    b[3] = k0 ? c_negj(a[3]) : a[3];
  end

  bu2 u_b20 (.a(b[0]), .b(b[2]), .s(y[0]), .d(y[2]));
  bu2 u_b21 (.a(b[1]), .b(b[3]), .s(y[1]), .d(y[3]));

  cplx_t y1t, y3t;
  assign y1t = c_w8(y[1], {1'b0, k0});
  assign y3t = c_w8(y[3], {1'b1, k0});

  bu2 u_b30 (.a(y[0]), .b(y1t), .s(z[0]), .d(z[1]));
  bu2 u_b31 (.a(y[2]), .b(y3t), .s(z[2]), .d(z[3]));

  assign dout = z;
endmodule
