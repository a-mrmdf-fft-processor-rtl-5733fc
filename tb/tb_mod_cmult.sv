// tb_mod_cmult: checks the modified complex multiplier with random data.
// Exponent sets are (a) those Module 3 produces, e_p = (4*n2 + p)*k' for all
// n2 and k', and (b) one random exponent 0..63 on a random lane with the
// others at 0. Each lane is compared with din * W64^e computed here in real
// arithmetic (tolerance: output rounding plus the Q1.14 coefficient error),
// and the conflict flag must stay low. Finally a set in which all
// four lanes need constant 1 must raise the conflict flag.
module tb_mod_cmult;
  import fft_pkg::*;
  logic clk = 0;
  lanes_t din, dout;
  logic [5:0] exps [LANES];
  logic conflict;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  mod_cmult dut (.din, .exps, .dout, .conflict);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    #1;
    checks++;
    if (conflict) begin
      failures++;
      $display("unexpected conflict");
    end
    for (int p = 0; p < LANES; p++) begin
      real ang, er, ei, e, tol;
      int gr, gi;
      ang = 2.0 * 3.14159265358979 * exps[p] / 64.0;
      er = din[p].re * $cos(ang) + din[p].im * $sin(ang);
      ei = din[p].im * $cos(ang) - din[p].re * $sin(ang);
      gr = int'(dout[p].re);
      gi = int'(dout[p].im);
      e = $sqrt((er - gr) ** 2 + (ei - gi) ** 2);
      // rounding of the result plus Q1.14 rounding of cos and sin
      tol = 1.0 + $sqrt(real'(din[p].re) ** 2 + real'(din[p].im) ** 2) / 8192.0;
      if (e > max_err) max_err = e;
      checks++;
      if (e > tol) begin
        failures++;
        if (failures < 5) $display("lane %0d e=%0d got %0d,%0d want %f,%f", p, exps[p], gr, gi, er, ei);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < 20; r++)
      for (int n2 = 0; n2 < 2; n2++)
        for (int k = 0; k < 8; k++) begin
          @(posedge clk);
          for (int p = 0; p < LANES; p++) begin
            din[p].re = word_t'(int'($urandom_range(200000, 0)) - 100000);
            din[p].im = word_t'(int'($urandom_range(200000, 0)) - 100000);
            exps[p] = 6'((4 * n2 + p) * k);
          end
          check_all();
        end
    for (int r = 0; r < 500; r++) begin
      int lane;
      @(posedge clk);
      lane = int'($urandom_range(3, 0));
      for (int p = 0; p < LANES; p++) begin
        din[p].re = word_t'(int'($urandom_range(200000, 0)) - 100000);
        din[p].im = word_t'(int'($urandom_range(200000, 0)) - 100000);
        exps[p] = (p == lane) ? 6'($urandom_range(63, 0)) : 6'd0;
      end
      check_all();
    end
    @(posedge clk);
    foreach (exps[p]) exps[p] = 6'd1;
    #1;
    checks++;
    if (!conflict) begin
      failures++;
      $display("conflict not flagged");
    end
    $display("max error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
