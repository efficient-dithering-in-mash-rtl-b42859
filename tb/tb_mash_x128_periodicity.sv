// tb_mash_x128_periodicity: spur workload of the dithered MASH 1-1-1.
//
// Feeds the critical constant word X = 128 (one half of the 8-bit range) for
// 2^13 output samples, first with dither off and then, after a reset, with
// dither on, at the modulator's default size. The same is repeated for the
// words 64, 1 and 85, to show that the dithered output has no short period
// whatever the input. For each record it measures
//   - the shortest period P of the last 4096 samples (P <= 2048 searched),
//   - the largest normalized autocorrelation of the mean-removed record over
//     lags 1..64,
//   - the output average.
// Expected: without dither the output repeats with a period of at most 512
// (2M for odd words, shorter for even ones; spur tones), for X = 128 one of
// 4 with an autocorrelation reaching 1; with dither no period up to 2048
// exists and, for X = 128, the autocorrelation stays well below 1. Every
// record must average X / 256 (sum of y within 4 of N * X / 256).
module tb_mash_x128_periodicity;
  import mash_pkg::*;

  localparam int W = 8;
  localparam int M = 1 << W;
  localparam int N = 1 << 13;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         dither_en;
  logic [W-1:0] x;
  mash_out_t    y;

  int checks = 0;
  int failures = 0;

  mash111_dithered dut (.clk(clk), .rst_n(rst_n), .dither_en(dither_en), .x(x), .y(y));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int rec [0:N-1];

  task automatic record(input int xconst, input bit de);
    @(negedge clk);
    rst_n = 1'b0;
    x = W'(xconst);
    dither_en = de;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Skip the registered reset value.
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      rec[n] = int'(y);
    end
  endtask

  function automatic int period_of_tail();
    for (int p = 1; p <= 2048; p++) begin
      bit same = 1'b1;
      for (int n = N - 4096; n + p < N; n++)
        if (rec[n] != rec[n + p]) begin
          same = 1'b0;
          break;
        end
      if (same) return p;
    end
    return 0;
  endfunction

  function automatic real max_autocorr();
    real mean, r0, rk, best;
    mean = 0.0;
    for (int n = 0; n < N; n++) mean += real'(rec[n]);
    mean /= real'(N);
    r0 = 0.0;
    for (int n = 0; n < N; n++) r0 += (real'(rec[n]) - mean) ** 2;
    best = 0.0;
    for (int k = 1; k <= 64; k++) begin
      rk = 0.0;
      for (int n = 0; n + k < N; n++) rk += (real'(rec[n]) - mean) * (real'(rec[n + k]) - mean);
      rk = rk / r0;
      if (rk > best) best = rk;
    end
    return best;
  endfunction

  function automatic int sum_rec();
    int s = 0;
    for (int n = 0; n < N; n++) s += rec[n];
    return s;
  endfunction

  int xlist [4] = '{128, 64, 1, 85};

  initial begin
    int p_plain, p_dith, s_plain, s_dith, xc;
    real a_plain, a_dith;
    foreach (xlist[i]) begin
      xc = xlist[i];
      record(xc, 1'b0);
      p_plain = period_of_tail();
      a_plain = max_autocorr();
      s_plain = sum_rec();
      record(xc, 1'b1);
      p_dith = period_of_tail();
      a_dith = max_autocorr();
      s_dith = sum_rec();
      $display("X=%0d undithered: period %0d, max autocorrelation %f, sum %0d", xc, p_plain, a_plain, s_plain);
      $display("X=%0d dithered:   period %0d (0 = none up to 2048), max autocorrelation %f, sum %0d",
               xc, p_dith, a_dith, s_dith);
      check(p_plain > 0 && p_plain <= 512, $sformatf("X=%0d: undithered output is periodic", xc));
      check(p_dith == 0, $sformatf("X=%0d: dithered output has no period up to 2048", xc));
      if (xc == 128) begin
        check(p_plain == 4, "X=128: undithered period 4");
        check(a_plain > 0.99, "X=128: undithered autocorrelation reaches 1");
        check(a_dith < 0.5, "X=128: dithered autocorrelation stays low");
      end
      check(s_plain * M >= N * xc - 4 * M && s_plain * M <= N * xc + 4 * M,
            $sformatf("X=%0d: undithered average X/256", xc));
      check(s_dith * M >= N * xc - 4 * M && s_dith * M <= N * xc + 4 * M,
            $sformatf("X=%0d: dithered average X/256", xc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * N) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
