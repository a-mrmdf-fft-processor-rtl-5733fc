// tb_mrmdf_fft: end-to-end test of the MRMDF FFT/IFFT processor at its
// default size.
//
// Runs a series of configurations (128/64 points, FFT/IFFT, one to four
// streams), each after a reset, with random 12-bit complex inputs and random
// gaps in in_valid. The last three use full-scale input (random corners of the
// 12-bit range, and the constant -2048-2048j whose DC bin is the largest value
// a 128-point transform can produce) to show that the datapath cannot
// overflow. Every output lane is compared with a floating-point DFT
// (or inverse DFT divided by N) of the matching stream and frame; the frame
// is recovered by counting how often each (stream, bin) has appeared. The
// test also checks that every bin of every active stream comes out exactly
// once per frame, that inactive streams never do, and the latency of the
// first result. It counts how often each mechanism occurred (stall, 64-point
// bypass of Module 2, 128-point mode, IFFT, each stream count, two lanes on
// constant 4) and fails if one never did.
module tb_mrmdf_fft;
  import fft_pkg::*;

  localparam int NF   = 2;           // random frames per configuration
  localparam int NMAX = 128;

  logic       clk = 0;
  logic       rst_n;
  logic       mode128, ifft, in_valid;
  logic [2:0] num_streams;
  cin_t       in_data [LANES];
  logic       out_valid;
  logic [1:0] out_stream;
  logic [6:0] out_bin [LANES];
  cplx_t      out_data [LANES];

  mrmdf_fft dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [NF+1][4][NMAX];
  int xi [NF+1][4][NMAX];
  int seen [4][NMAX];
  int n_pts;
  real max_err = 0.0;
  int cnt_stall = 0, cnt_m64 = 0, cnt_m128 = 0, cnt_ifft = 0, cnt_fft = 0;
  int cnt_ns [5];
  int cnt_dup4 = 0;
  int en_count, first_out, chk_en;
  logic cur_ifft;

  // watchdog
  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // two lanes served by the two constant-4 units in the same cycle
  always @(posedge clk) begin
    if (in_valid) begin
      int c4;
      c4 = 0;
      for (int p = 0; p < LANES; p++)
        if (dut.u_m3.exps[p] == 6'd4 || dut.u_m3.exps[p] == 6'd12 ||
            dut.u_m3.exps[p] == 6'd20 || dut.u_m3.exps[p] == 6'd28 ||
            dut.u_m3.exps[p] == 6'd36 || dut.u_m3.exps[p] == 6'd44) c4++;
      if (c4 == 2) cnt_dup4++;
    end
  end

  // reference: forward DFT, or inverse DFT divided by N
  task automatic ref_bin(input int f, input int s, input int k, output real rr, output real ri);
    real a;
    rr = 0.0; ri = 0.0;
    for (int n = 0; n < n_pts; n++) begin
      a = 2.0 * 3.14159265358979 * real'((n * k) % n_pts) / real'(n_pts);
      if (!cur_ifft) begin
        rr += xr[f][s][n] * $cos(a) + xi[f][s][n] * $sin(a);
        ri += xi[f][s][n] * $cos(a) - xr[f][s][n] * $sin(a);
      end else begin
        rr += xr[f][s][n] * $cos(a) - xi[f][s][n] * $sin(a);
        ri += xi[f][s][n] * $cos(a) + xr[f][s][n] * $sin(a);
      end
    end
    if (cur_ifft) begin
      rr = rr / n_pts;
      ri = ri / n_pts;
    end
  endtask

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid && first_out < 0) first_out = chk_en;
    if (in_valid) chk_en++;
    if (rst_n && out_valid) begin
      for (int q = 0; q < LANES; q++) begin
        int k, f;
        real rr, ri, e, tol;
        k = int'(out_bin[q]);
        f = seen[out_stream][k];
        seen[out_stream][k]++;
        checks++;
        if (k >= n_pts || f > NF) begin
          failures++;
          $display("bad bin %0d frame %0d stream %0d", k, f, out_stream);
        end else begin
          ref_bin(f, int'(out_stream), k, rr, ri);
          e = $sqrt((rr - out_data[q].re) ** 2 + (ri - out_data[q].im) ** 2);
          tol = cur_ifft ? 3.0 : 20.0;
          if (e > max_err) max_err = e;
          if (e > tol) begin
            failures++;
            if (failures < 10)
              $display("mismatch s%0d f%0d k%0d: got %0d,%0d want %f,%f",
                       out_stream, f, k, out_data[q].re, out_data[q].im, rr, ri);
          end
        end
      end
    end
  end

  task automatic run_config(input logic m128, input logic inv, input int ns, input int amp);
    int lat;
    n_pts = m128 ? 128 : 64;
    lat = m128 ? 127 : 63;
    cur_ifft = inv;
    for (int f = 0; f <= NF; f++)
      for (int s = 0; s < 4; s++)
        for (int n = 0; n < NMAX; n++) begin
          if (f == NF) begin
            xr[f][s][n] = 0;
            xi[f][s][n] = 0;
          end else if (amp == -1) begin         // full-scale corners
            xr[f][s][n] = $urandom_range(1, 0) ? 2047 : -2048;
            xi[f][s][n] = $urandom_range(1, 0) ? 2047 : -2048;
          end else if (amp == -2) begin         // constant full scale: extreme DC bin
            xr[f][s][n] = -2048;
            xi[f][s][n] = -2048;
          end else begin
            xr[f][s][n] = int'($urandom_range(2 * amp, 0)) - amp;
            xi[f][s][n] = int'($urandom_range(2 * amp, 0)) - amp;
          end
        end
    foreach (seen[s, k]) seen[s][k] = 0;
    in_valid = 0;
    rst_n = 0;
    mode128 = m128;
    ifft = inv;
    num_streams = 3'(ns);
    en_count = 0;
    first_out = -1;
    chk_en = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f <= NF; f++) begin
      for (int n = 0; n < n_pts; n++) begin
        while ($urandom_range(9, 0) < 2) begin
          @(negedge clk);
          in_valid = 0;
          cnt_stall++;
        end
        @(negedge clk);
        in_valid = 1;
        for (int s = 0; s < 4; s++) begin
          in_data[s].re = (IN_W)'(xr[f][s][n]);
          in_data[s].im = (IN_W)'(xi[f][s][n]);
        end
        @(posedge clk);
        en_count++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    // latency: the result of the first sample is registered on enabled cycle
    // lat (0-based), so it is visible once lat + 1 samples have been taken
    checks++;
    if (first_out != lat + 1) begin
      failures++;
      $display("latency: first output after %0d samples, expected %0d", first_out, lat + 1);
    end
    // every active (stream, bin) exactly NF times (the zero flush frame may add one)
    for (int s = 0; s < 4; s++)
      for (int k = 0; k < n_pts; k++) begin
        checks++;
        if (s < ns ? (seen[s][k] < NF || seen[s][k] > NF + 1) : (seen[s][k] != 0)) begin
          failures++;
          $display("stream %0d bin %0d seen %0d times", s, k, seen[s][k]);
        end
      end
    if (m128) cnt_m128++; else cnt_m64++;
    if (inv) cnt_ifft++; else cnt_fft++;
    cnt_ns[ns]++;
    $display("config N=%0d ifft=%0d streams=%0d done, max error so far %f", n_pts, inv, ns, max_err);
  endtask

  initial begin
    rst_n = 0;
    in_valid = 0;
    mode128 = 1;
    ifft = 0;
    num_streams = 4;
    foreach (in_data[s]) in_data[s] = '0;
    foreach (cnt_ns[i]) cnt_ns[i] = 0;
    run_config(1, 0, 4, 2047);
    run_config(0, 0, 4, 2047);
    run_config(1, 1, 3, 2047);
    run_config(0, 1, 2, 2047);
    run_config(1, 0, 1, 300);
    run_config(1, 0, 4, -1);
    run_config(1, 0, 2, -2);
    run_config(0, 1, 4, -2);
    // mechanisms
    checks++; if (cnt_stall == 0) begin failures++; $display("no stall"); end
    checks++; if (cnt_m64 == 0)   begin failures++; $display("no 64-point run"); end
    checks++; if (cnt_m128 == 0)  begin failures++; $display("no 128-point run"); end
    checks++; if (cnt_ifft == 0)  begin failures++; $display("no IFFT run"); end
    checks++; if (cnt_fft == 0)   begin failures++; $display("no FFT run"); end
    checks++; if (cnt_dup4 == 0)  begin failures++; $display("constant 4 never shared"); end
    for (int i = 1; i <= 4; i++) begin
      checks++;
      if (cnt_ns[i] == 0) begin failures++; $display("never ran %0d streams", i); end
    end
    $display("stalls=%0d m64=%0d m128=%0d ifft=%0d fft=%0d dup4=%0d max_err=%f",
             cnt_stall, cnt_m64, cnt_m128, cnt_ifft, cnt_fft, cnt_dup4, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
