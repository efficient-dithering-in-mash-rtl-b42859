// tb_mash111_dithered: end-to-end testbench of the dithered MASH 1-1-1.
//
// Runs the modulator at its default size (8-bit accumulators, 8-bit LFSR)
// and compares every output sample with an integer model written from the
// modulator's equations: three cascaded modulo-256 accumulators, the LSB of
// the stage-2 and stage-3 inputs replaced by the dither bit when dither is
// enabled, and y[n] = c1 + (1-z^-1) c2 + (1-z^-1)^2 c3 appearing one clock
// later. The model's dither bit comes from the LFSR recurrence
// o[t+8] = o[t] ^ o[t+2] ^ o[t+3] ^ o[t+4] started from the seed, advancing
// only on dithered clocks.
//
// Phases: constant X = 128 undithered, the same dithered, then random words
// with dither switched on and off at random, and a reset in the middle. For
// the constant-input phases it also checks that the output average equals
// X / 256 (sum of y within 4 of N * X / 256), with and without dither.
// Mechanisms counted (each must occur): dithered and undithered clocks, dither
// switches on and off, an LSB substitution that changed the stage-2 and the
// stage-3 input, a carry from each stage, and the output extremes -3 and +4.
module tb_mash111_dithered;
  import mash_pkg::*;

  localparam int W = 8;
  localparam int M = 1 << W;
  localparam int NSEQ = 20000;

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

  // Dither bit sequence from the polynomial.
  bit o [0:NSEQ-1];
  int idx;

  // Model state.
  int s1, s2, s3;
  int c2p, c3p, c3pp;
  int yexp;
  bit yvalid;

  // Mechanism counters.
  int n_dith, n_plain, n_on, n_off, n_sub2, n_sub3, n_c1, n_c2, n_c3, n_min, n_max;
  bit prev_de;

  task automatic model_reset();
    s1 = 0; s2 = 0; s3 = 0;
    c2p = 0; c3p = 0; c3pp = 0;
    idx = 0;
    yexp = 0;
  endtask

  // One sample: drive at the falling edge, check the previous result, then
  // advance the model.
  task automatic sample(input int xv, input bit de, output int yout);
    int sum1, sum2, sum3, e1, e2, in2, in3, c1, c2, c3, dv;
    @(negedge clk);
    // Output registered at the last rising edge.
    check(int'(y) == yexp, $sformatf("t=%0t y=%0d expected %0d de=%0d", $time, int'(y), yexp, prev_de));
    yout = int'(y);
    if (int'(y) == -3) n_min++;
    if (int'(y) == 4) n_max++;
    x = W'(xv);
    dither_en = de;
    if (de && !prev_de) n_on++;
    if (!de && prev_de) n_off++;
    prev_de = de;
    dv = int'(o[idx]);
    sum1 = xv + s1;  c1 = int'(sum1 >= M); e1 = sum1 % M;
    in2 = de ? ((e1 / 2) * 2 + dv) : e1;
    if (in2 != e1) n_sub2++;
    sum2 = in2 + s2; c2 = int'(sum2 >= M); e2 = sum2 % M;
    in3 = de ? ((e2 / 2) * 2 + dv) : e2;
    if (in3 != e2) n_sub3++;
    sum3 = in3 + s3; c3 = int'(sum3 >= M);
    n_c1 += c1; n_c2 += c2; n_c3 += c3;
    yexp = c1 + c2 - c2p + c3 - 2 * c3p + c3pp;
    s1 = e1; s2 = e2; s3 = sum3 % M;
    c2p = c2; c3pp = c3p; c3p = c3;
    if (de) begin
      idx++;
      n_dith++;
    end else n_plain++;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    x = '0;
    dither_en = 1'b0;
    prev_de = 1'b0;
    repeat (2) @(negedge clk);
    check(y == '0, "output zero in reset");
    rst_n = 1'b1;
    model_reset();
  endtask

  // Runs n samples of a constant word and checks the output average.
  task automatic constant_run(input int xv, input bit de, input int n);
    int ysum, yv;
    ysum = 0;
    for (int k = 0; k < n; k++) begin
      sample(xv, de, yv);
      if (k > 0) ysum += yv;
    end
    // The first sample checked holds the result of the previous word, so the
    // sum covers the first n-1 outputs of this word.
    check(ysum * M >= (n - 1) * xv - 4 * M && ysum * M <= (n - 1) * xv + 4 * M,
          $sformatf("average: sum %0d over %0d samples, X=%0d de=%0d", ysum, n, xv, de));
  endtask

  initial begin
    int yv;
    for (int t = 0; t < 8; t++) o[t] = (t == 7);
    for (int t = 0; t + 8 < NSEQ; t++) o[t+8] = o[t] ^ o[t+2] ^ o[t+3] ^ o[t+4];
    {n_dith, n_plain, n_on, n_off, n_sub2, n_sub3, n_c1, n_c2, n_c3, n_min, n_max} = '0;
    do_reset();
    constant_run(128, 1'b0, 1000);
    do_reset();
    constant_run(128, 1'b1, 1000);
    do_reset();
    constant_run(37, 1'b1, 2000);
    for (int k = 0; k < 8000; k++) begin
      if (k == 4000) do_reset();
      sample(int'($urandom_range(0, M - 1)),
             ($urandom_range(0, 49) == 0) ? !prev_de : prev_de, yv);
    end
    $display("mechanisms: dithered=%0d plain=%0d on=%0d off=%0d sub2=%0d sub3=%0d c1=%0d c2=%0d c3=%0d ymin=%0d ymax=%0d",
             n_dith, n_plain, n_on, n_off, n_sub2, n_sub3, n_c1, n_c2, n_c3, n_min, n_max);
    check(n_dith > 0, "dithered clocks occurred");
    check(n_plain > 0, "undithered clocks occurred");
    check(n_on > 0, "dither switched on");
    check(n_off > 0, "dither switched off");
    check(n_sub2 > 0, "dither changed stage-2 input");
    check(n_sub3 > 0, "dither changed stage-3 input");
    check(n_c1 > 0 && n_c2 > 0 && n_c3 > 0, "every stage produced a carry");
    check(n_min > 0, "output reached -3");
    check(n_max > 0, "output reached +4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
