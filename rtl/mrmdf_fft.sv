// mrmdf_fft: 64/128-point FFT/IFFT processor for one to four simultaneous
// sequences, built as a mixed-radix multi-path delay-feedback (MRMDF) pipeline.
//
// Four lanes carry one sample of each of up to four streams per cycle.
//   input MUX  : in IFFT mode the imaginary parts are negated (conjugate).
//   Module 1   : reorders so each cycle holds four samples of one stream.
//   Module 2   : radix-2 first stage of the 128-point split (eq. n = 64n1 + n2);
//                in 64-point mode the mode MUX takes Module 1's output instead.
//   Module 3/4 : 64-point FFT as two radix-2^3 8-point DFTs with the
//                W64 twiddle of the modified complex multiplier between them.
//   output     : in IFFT mode conjugate and divide by N (arithmetic shift by
//                6 or 7), then a register.
// Interface: in_valid marks a cycle with one sample of every stream; the whole
// pipeline advances only on such cycles, so gaps stall it. The first valid
// sample after reset is sample 0 of a frame, and frames follow back to back.
// mode128, ifft and num_streams are static between resets. Results come out
// in the pipeline's natural order: each out_valid cycle gives four bins of
// stream out_stream, lane q holding bin out_bin[q]. out_valid is high only for
// streams below num_streams. Latency: 63 (64-point) or 127 (128-point)
// enabled cycles from a sample's entry to the output register, which loads
// on that same enabled cycle. A frame's last results therefore need the
// samples of the following frame (or zeros) to be pushed.
// The block structure follows the MRMDF architecture; word lengths, this
// interface, the stall scheme and the output tagging are this design's own.
module mrmdf_fft
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mode128,
  input  logic       ifft,
  input  logic [2:0] num_streams,
  input  logic       in_valid,
  input  cin_t       in_data   [LANES],
  output logic       out_valid,
  output logic [1:0] out_stream,
  output logic [6:0] out_bin   [LANES],
  output cplx_t      out_data  [LANES]
);
  localparam int N_MAX = 128;            // largest transform; labels are 7 bits
  localparam int LOGN  = $clog2(N_MAX);

  logic            en;
  logic [LOGN-1:0] c1;        // sample index at the input
  logic [7:0]      ecnt;      // enabled cycles since reset, saturating
  logic [7:0]      lat;
  lanes_t          x_in, m1_out, m2_out, m3_in, m3_out, m4_out;
  logic [6:0]      u, o;

  assign en  = in_valid;
  assign lat = mode128 ? 8'd127 : 8'd63;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1   <= '0;
      ecnt <= '0;
    end else if (en) begin
      c1 <= c1 + 1'b1;
      if (ecnt != 8'hFF) ecnt <= ecnt + 8'd1;
    end
  end

  // input MUX: data or its conjugate
  always_comb begin
    for (int s = 0; s < LANES; s++) begin
      x_in[s].re = word_t'(in_data[s].re);
      x_in[s].im = ifft ? -word_t'(in_data[s].im) : word_t'(in_data[s].im);
    end
  end

  module1_reorder u_m1 (.clk, .en, .t(c1[1:0]), .din(x_in), .dout(m1_out));

  assign u = c1 - 7'd3;

  // Module 2 only advances in 128-point mode
  module2_r2 u_m2 (.clk, .en(en && mode128), .t(u), .din(m1_out), .dout(m2_out));

  // mode MUX
  assign m3_in = mode128 ? m2_out : m1_out;

  module3_r2x3 u_m3 (.clk, .en, .t(u[5:0]), .din(m3_in), .dout(m3_out));
  module4_r2x3 #(.DLY(4)) u_m4 (.clk, .en, .t(u[5:0] - 6'd56), .din(m3_out), .dout(m4_out));

  // output label: {k1, k0, k1', k2', k0'', stream}
  assign o = c1 - lat[6:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= en && (ecnt >= lat) && ({1'b0, o[1:0]} < num_streams);
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      out_stream <= o[1:0];
      for (int q = 0; q < LANES; q++) begin
        logic [5:0] k64;
        k64 = {q[0], q[1], o[2], o[3], o[4], o[5]};
        out_bin[q] <= mode128 ? {k64, o[6]} : {1'b0, k64};
        if (ifft) begin
          out_data[q].re <= m4_out[q].re >>> (mode128 ? 7 : 6);
          out_data[q].im <= (-m4_out[q].im) >>> (mode128 ? 7 : 6);
        end else begin
          out_data[q] <= m4_out[q];
        end
      end
    end
  end
endmodule
