// module1_reorder: Module 1, reorders four simultaneous input sequences.
//
// Input lane s carries sample t of stream s (all streams in step). Lane i is
// first delayed by i samples, so that at the switch lane s holds sample t - s.
// The switch then rotates the lanes: output p takes switch input
// (t - p) mod 4. Finally lane p is delayed by 3 - p. After this, each cycle
// holds four consecutive samples 4m .. 4m+3 of one stream on lanes 0..3, and
// the streams A, B, C, D take turns cycle by cycle:
//   lane 0: A0 B0 C0 D0 A4 B4 ...   lane 1: A1 B1 C1 D1 A5 ...
// Timing: latency 3 enabled cycles; if the full sample index is T, the output
// holds stream (T - 3) mod 4, group m = (T - 3) div 4. Delay elements of length 0
// are plain wires, so lane 3 of the output is combinational from lane 0 of
// the input through the switch.
module module1_reorder
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       en,
  input  logic [1:0] t,         // sample index mod 4
  input  lanes_t     din,
  output lanes_t     dout
);
  // delay lines: pre[i] holds i words, post[p] holds 3 - p words
  cplx_t pre1 [1], pre2 [2], pre3 [3];
  cplx_t post0 [3], post1 [2], post2 [1];
  lanes_t sw_in, sw_out;

  always_comb begin
    sw_in[0] = din[0];
    sw_in[1] = pre1[0];
    sw_in[2] = pre2[1];
    sw_in[3] = pre3[2];
    for (int p = 0; p < LANES; p++)
      sw_out[p] = sw_in[2'(t - 2'(p))];
    dout[0] = post0[2];
    dout[1] = post1[1];
    dout[2] = post2[0];
    dout[3] = sw_out[3];
  end

  always_ff @(posedge clk) begin
    if (en) begin
      pre1[0]  <= din[1];
      pre2[0]  <= din[2];
      pre2[1]  <= pre2[0];
      pre3[0]  <= din[3];
      pre3[1]  <= pre3[0];
      pre3[2]  <= pre3[1];
      post0[0] <= sw_out[0];
      post0[1] <= post0[0];
      post0[2] <= post0[1];
      post1[0] <= sw_out[1];
      post1[1] <= post1[0];
      post2[0] <= sw_out[2];
    end
  end
endmodule
