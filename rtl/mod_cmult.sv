// mod_cmult: modified complex multiplier of Module 3.
//
// Multiplies the four lanes at once by W64^e, e = exps[p] (0..63). Any such
// factor is (-j)^q times either C_i = cos(a_i) - j sin(a_i) or, with real and
// imaginary parts exchanged, sin(a_i) - j cos(a_i), where a_i = 2*pi*i/64 and
// i = 0..8 (e = 16q + r; i = r for r <= 8, i = 16 - r otherwise). Only
// i = 1..8 need hardware. A bank of nine constant units (constants 1, 2, 3,
// 4, 4, 5, 6, 7, 8) each forms v*cos(a_i) and v*sin(a_i); one bank serves the
// real parts and a second the imaginary parts. An input mux routes each lane
// to the unit of its constant, an output mux returns the four products, and
// per lane a sign/swap stage and two adders form the result, which is rounded
// once. Two units hold constant 4 because the Module 1 order makes two lanes
// need it in the same cycle; no other constant is ever needed twice, and
// `conflict` flags a set of exponents that breaks this rule.
// Combinational. The constants are written as constant multiplications,
// which synthesis reduces to shifts and adds.
module mod_cmult
  import fft_pkg::*;
(
  input  lanes_t         din,
  input  logic [5:0]     exps [LANES],
  output lanes_t         dout,
  output logic           conflict
);
  localparam int NU = 9;
  localparam int UNIT_I [NU] = '{1, 2, 3, 4, 4, 5, 6, 7, 8};

  typedef logic signed [DW+CW:0] prod_t;

  logic [3:0] idx  [LANES];    // constant index 0..8
  logic       swp  [LANES];    // exchange cos and sin
  logic [1:0] quad [LANES];    // power of -j
  logic [3:0] unit [LANES];    // unit used by the lane (NU = none)
  logic [1:0] src  [NU];       // lane feeding each unit
  prod_t re_c [NU], re_s [NU], im_c [NU], im_s [NU];

  // exponent decode and constant-unit assignment
  always_comb begin
    logic used4;
    logic [NU-1:0] busy;
    used4    = 1'b0;
    busy     = '0;
    conflict = 1'b0;
    for (int p = 0; p < LANES; p++) begin
      logic [3:0] r;
      r       = exps[p][3:0];
      quad[p] = exps[p][5:4];
      swp[p]  = (r > 4'd8);
      idx[p]  = swp[p] ? 4'(5'd16 - {1'b0, r}) : r;
      if (idx[p] == 4'd0)       unit[p] = 4'(NU);
      else if (idx[p] < 4'd4)   unit[p] = idx[p] - 4'd1;
      else if (idx[p] == 4'd4)  unit[p] = used4 ? 4'd4 : 4'd3;
      else                      unit[p] = idx[p];
      if (idx[p] == 4'd4) used4 = 1'b1;
      if (unit[p] != 4'(NU)) begin
        if (busy[unit[p]]) conflict = 1'b1;
        busy[unit[p]] = 1'b1;
      end
    end
    for (int u = 0; u < NU; u++) begin
      src[u] = 2'd0;
      for (int p = 0; p < LANES; p++)
        if (unit[p] == 4'(u)) src[u] = 2'(p);
    end
  end

  // constant bank: real parts (bank 1) and imaginary parts (bank 2)
  for (genvar u = 0; u < NU; u++) begin : g_unit
    localparam int    KCI = tw_re(UNIT_I[u], 64);
    localparam int    KSI = -tw_im(UNIT_I[u], 64);
    localparam prod_t KC  = prod_t'(KCI);
    localparam prod_t KS  = prod_t'(KSI);
    always_comb begin
      re_c[u] = prod_t'(din[src[u]].re) * KC;
      re_s[u] = prod_t'(din[src[u]].re) * KS;
      im_c[u] = prod_t'(din[src[u]].im) * KC;
      im_s[u] = prod_t'(din[src[u]].im) * KS;
    end
  end

  // per lane: sign, swap, add, round, rotate by (-j)^q
  for (genvar p = 0; p < LANES; p++) begin : g_post
    prod_t ac, as, bc, bs, pr, pi;
    cplx_t z;
    logic  triv;
    assign triv = (unit[p] == 4'(NU));
    // output mux: the four products of the lane's constant unit
    assign ac = triv ? '0 : re_c[unit[p]];
    assign as = triv ? '0 : re_s[unit[p]];
    assign bc = triv ? '0 : im_c[unit[p]];
    assign bs = triv ? '0 : im_s[unit[p]];
    // sign and swap: (a + jb)(c - js) or (a + jb)(s - jc)
    assign pr = swp[p] ? as + bc : ac + bs;
    assign pi = swp[p] ? bs - ac : bc - as;
    always_comb begin
      if (triv) begin
        z = din[p];
      end else begin
        z.re = rnd(pr);
        z.im = rnd(pi);
      end
      case (quad[p])
        2'd0:    dout[p] = z;
        2'd1:    begin dout[p].re =  z.im; dout[p].im = -z.re; end
        2'd2:    begin dout[p].re = -z.re; dout[p].im = -z.im; end
        default: begin dout[p].re = -z.im; dout[p].im =  z.re; end
      endcase
    end
  end
endmodule
