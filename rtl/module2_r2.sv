// module2_r2: Module 2, the radix-2 first stage of the 128-point FFT.
//
// Implements the 2-point DFT of X(2k2 + k1) = sum over n2 of
// {x(n2) + (-1)^k1 x(n2 + 64)} W128^(n2 k1) W64^(n2 k2). With the Module 1
// order, x(n2) and x(n2 + 64) of one lane are 64 cycles apart, so a memory of
// 64 x 4 complex words acts as a delay-feedback line, read and written at the
// same address (label bits [5:0]) every cycle.
//   First half of a frame (label bit 6 = 0): incoming x(n2) is stored; the
//   differences Y of the previous frame are read and leave the module, lanes
//   2 and 3 being multiplied by their twiddle on the way out.
//   Second half (bit 6 = 1): the BU (four BU_2) adds the stored x(n2) and the
//   incoming x(n2 + 64); the sums X leave at once, the differences Y are
//   stored, lanes 0 and 1 being multiplied by their twiddle before storing.
// The two complex multipliers are thus busy in both halves. The twiddle of
// lane p in group m is W128^(4m + p); each multiplier has a 32-entry ROM,
// computed at elaboration. Output label t - 64: bit 6 is k1, so the output is
// a stream of 64-point frames, the sums (k1 = 0) then the twiddled
// differences (k1 = 1).
module module2_r2
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       en,
  input  logic [6:0] t,
  input  lanes_t     din,
  output lanes_t     dout
);
  localparam int MEM_WORDS = 256;             // complex words
  localparam int DEPTH     = MEM_WORDS / LANES;   // 64 addresses

  typedef struct packed {
    coef_t re;
    coef_t im;
  } tw_t;

  // ROM A serves lane 0 (write side) and lane 2 (read side), ROM B lanes 1 and 3.
  // Address {half, m}: exponent 4m + lane.
  function automatic tw_t rom_entry(input int half, input int m, input int lane_w, input int lane_r);
    tw_t w;
    int e;
    e = 4 * m + (half != 0 ? lane_w : lane_r);
    w.re = coef_t'(tw_re(e, 128));
    w.im = coef_t'(tw_im(e, 128));
    return w;
  endfunction

  function automatic tw_t [31:0] make_rom(input int lane_w, input int lane_r);
    tw_t [31:0] r;
    for (int a = 0; a < 32; a++) r[a] = rom_entry(a / 16, a % 16, lane_w, lane_r);
    return r;
  endfunction

  localparam tw_t [31:0] ROM_A = make_rom(0, 2);
  localparam tw_t [31:0] ROM_B = make_rom(1, 3);

  lanes_t mem [DEPTH];
  lanes_t rd, s, d, wr;
  logic       half;
  logic [5:0] addr;
  tw_t        wa, wb;
  cplx_t      ma_in, mb_in, ma_out, mb_out;

  assign half = t[6];
  assign addr = t[5:0];
  assign rd   = mem[addr];
  assign wa   = ROM_A[{half, t[5:2]}];
  assign wb   = ROM_B[{half, t[5:2]}];

  for (genvar p = 0; p < LANES; p++) begin : g_bu
    bu2 u_bu (.a(rd[p]), .b(din[p]), .s(s[p]), .d(d[p]));
  end

  // the two shared complex multipliers
  assign ma_in  = half ? d[0] : rd[2];
  assign mb_in  = half ? d[1] : rd[3];
  assign ma_out = c_mul(ma_in, wa.re, wa.im);
  assign mb_out = c_mul(mb_in, wb.re, wb.im);

  always_comb begin
    if (half) begin
      dout = s;
      wr   = {d[3], d[2], mb_out, ma_out};
    end else begin
      dout = {mb_out, ma_out, rd[1], rd[0]};
      wr   = din;
    end
  end

  always_ff @(posedge clk) begin
    if (en) mem[addr] <= wr;
  end
endmodule
