// module3_r2x3: Module 3, four BU_8 lanes and the modified complex multiplier.
//
// Each lane runs the same radix-2^3 SDF pipeline (delays 32, 16, 8) on the
// samples n = 4m + lane of the four interleaved streams, computing an 8-point
// DFT over the top three index bits. The results are then multiplied by the
// non-trivial twiddle W64^((4*n2 + lane) * k'), where k' = k0 + 2k1 + 4k2 is
// the 8-point output index and n2 the remaining time bit; the four factors of
// one cycle are served by the shared constant bank of mod_cmult.
// Timing: label t = {a, b, c, n2, stream}; output label t - 56, no register
// after the multiplier. An assertion checks on every enabled clock edge that
// the constant bank never has two lanes asking for the same unit.
module module3_r2x3
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       en,
  input  logic [5:0] t,
  input  lanes_t     din,
  output lanes_t     dout
);
  lanes_t     bo;
  logic [5:0] lo;
  logic [2:0] kk;
  logic [5:0] exps [LANES];
  logic       conflict;

  for (genvar p = 0; p < LANES; p++) begin : g_lane
    bu8_sdf #(.D1(32)) u_bu8 (.clk, .en, .t(t), .din(din[p]), .dout(bo[p]));
  end

  assign lo = t - 6'd56;
  assign kk = {lo[3], lo[4], lo[5]};          // k' = k0 + 2k1 + 4k2

  always_comb begin
    for (int p = 0; p < LANES; p++)
      exps[p] = 6'(({3'b0, lo[2], 2'(p)}) * {3'b0, kk});
  end

  mod_cmult u_mcm (.din(bo), .exps(exps), .dout(dout), .conflict(conflict));

  always_ff @(posedge clk) begin
    if (en) assert (!conflict) else $error("constant bank conflict at label %0d", lo);
  end
endmodule
