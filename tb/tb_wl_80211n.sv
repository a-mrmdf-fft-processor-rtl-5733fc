// tb_wl_80211n: the processor on back-to-back IEEE 802.11n OFDM symbols.
//
// Clock 40 MHz (25 ns). One symbol lasts 4 us = 160 cycles: 32 cycles of
// guard interval, during which in_valid is low, then the FFT samples of all
// four streams. Two phases run after a reset each: 40 MHz channel (128
// points, 4 streams, 128 valid cycles per symbol) and 20 MHz channel
// (64 points, 4 streams, 64 valid cycles in the 160-cycle symbol). Every result
// is compared with a floating-point DFT. Throughput is checked too: every
// symbol's last result must come out exactly one symbol period (160 cycles)
// after the previous symbol's, and within two symbol periods of its own
// first sample, i.e. the processor keeps up in real time.
module tb_wl_80211n;
  import fft_pkg::*;

  localparam int NSYM = 5;           // symbols with data, then one of zeros
  localparam int TSYM = 160;         // cycles per 4 us symbol at 40 MHz
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

  always #12.5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [NSYM+1][4][NMAX];
  int xi [NSYM+1][4][NMAX];
  int seen [4][NMAX];
  int done_cnt [NSYM+1];
  longint done_cyc [NSYM+1];
  longint start_cyc [NSYM+1];
  longint cyc = 0;
  int n_pts;
  real max_err = 0.0;

  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      for (int q = 0; q < LANES; q++) begin
        int k, f;
        real rr, ri, a, e;
        k = int'(out_bin[q]);
        f = seen[out_stream][k];
        seen[out_stream][k]++;
        checks++;
        if (k >= n_pts || f > NSYM) begin
          failures++;
          $display("bad bin %0d symbol %0d", k, f);
        end else begin
          rr = 0.0; ri = 0.0;
          for (int n = 0; n < n_pts; n++) begin
            a = 2.0 * 3.14159265358979 * real'((n * k) % n_pts) / real'(n_pts);
            rr += xr[f][out_stream][n] * $cos(a) + xi[f][out_stream][n] * $sin(a);
            ri += xi[f][out_stream][n] * $cos(a) - xr[f][out_stream][n] * $sin(a);
          end
          e = $sqrt((rr - out_data[q].re) ** 2 + (ri - out_data[q].im) ** 2);
          if (e > max_err) max_err = e;
          if (e > 20.0) begin
            failures++;
            if (failures < 10) $display("mismatch sym %0d s%0d k%0d", f, out_stream, k);
          end
          done_cnt[f]++;
          if (done_cnt[f] == 4 * n_pts) done_cyc[f] = cyc;
        end
      end
    end
  end

  task automatic run_phase(input logic m128);
    n_pts = m128 ? 128 : 64;
    for (int f = 0; f <= NSYM; f++) begin
      done_cnt[f] = 0;
      done_cyc[f] = -1;
      for (int s = 0; s < 4; s++)
        for (int n = 0; n < NMAX; n++) begin
          xr[f][s][n] = (f == NSYM) ? 0 : int'($urandom_range(4094, 0)) - 2047;
          xi[f][s][n] = (f == NSYM) ? 0 : int'($urandom_range(4094, 0)) - 2047;
        end
    end
    foreach (seen[s, k]) seen[s][k] = 0;
    @(negedge clk);
    rst_n = 0;
    in_valid = 0;
    mode128 = m128;
    ifft = 0;
    num_streams = 3'd4;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f <= NSYM; f++) begin
      for (int c = 0; c < TSYM; c++) begin
        @(negedge clk);
        if (c < TSYM - n_pts) begin
          in_valid = 0;                          // guard interval
        end else begin
          int n;
          n = c - (TSYM - n_pts);
          if (n == 0) start_cyc[f] = cyc;
          in_valid = 1;
          for (int s = 0; s < 4; s++) begin
            in_data[s].re = (IN_W)'(xr[f][s][n]);
            in_data[s].im = (IN_W)'(xi[f][s][n]);
          end
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    for (int f = 0; f < NSYM; f++) begin
      checks++;
      if (done_cnt[f] != 4 * n_pts || done_cyc[f] - start_cyc[f] > 2 * TSYM) begin
        failures++;
        $display("symbol %0d: %0d results, done %0d cycles after its start", f, done_cnt[f], done_cyc[f] - start_cyc[f]);
      end
      if (f > 0) begin
        checks++;
        if (done_cyc[f] - done_cyc[f-1] != TSYM) begin
          failures++;
          $display("symbol %0d finished %0d cycles after the previous one", f, done_cyc[f] - done_cyc[f-1]);
        end
      end
    end
    $display("N=%0d: symbol 0 done %0d cycles after its first sample", n_pts, done_cyc[0] - start_cyc[0]);
  endtask

  initial begin
    rst_n = 0;
    in_valid = 0;
    mode128 = 1;
    ifft = 0;
    num_streams = 4;
    foreach (in_data[s]) in_data[s] = '0;
    run_phase(1);
    run_phase(0);
    $display("max error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
