// sdf_stage: one single-path delay-feedback radix-2 stage of depth D.
//
// The stage pairs samples whose time labels differ by D (label bit log2(D)).
// While that bit of the input label is 0 the input is written into the delay
// line and the line's output (a difference computed D cycles earlier) is
// passed on. While the bit is 1 the butterfly combines the delayed sample with
// the input: the sum leaves at once and the difference goes into the delay
// line. The output thus carries label t - D, with bit log2(D) equal to the
// butterfly output index (0 sum, 1 difference). The delay line is a shift
// register that moves only when en is high. Twiddles are applied by the
// instantiating module.
module sdf_stage
  import fft_pkg::*;
#(
  parameter int D  = 32,
  parameter int TW = 6            // width of the time label
) (
  input  logic          clk,
  input  logic          en,
  input  logic [TW-1:0] t,        // label of din
  input  cplx_t         din,
  output cplx_t         dout      // label t - D
);
  localparam int B = $clog2(D);

  cplx_t line [D];
  cplx_t s, d, line_in;

  bu2 u_bu (.a(line[D-1]), .b(din), .s(s), .d(d));

  always_comb begin
    if (t[B]) begin
      dout    = s;
      line_in = d;
    end else begin
      dout    = line[D-1];
      line_in = din;
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      line[0] <= line_in;
      for (int i = 1; i < D; i++) line[i] <= line[i-1];
    end
  end
endmodule
