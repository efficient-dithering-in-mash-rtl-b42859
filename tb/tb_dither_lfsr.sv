// tb_dither_lfsr: self-checking testbench for the dither LFSR.
//
// Checks, at the default 8-bit size: the seed after reset; that the output
// bit sequence o[t] obeys the recurrence of x^8 + x^6 + x^5 + x^4 + 1,
// o[t+8] = o[t] ^ o[t+2] ^ o[t+3] ^ o[t+4], worked out from the polynomial
// rather than from the register; that the register returns to its seed after
// exactly 255 clocks and never sooner; that one period holds 128 ones; and
// that the register holds still while en is low. It also runs one instance
// of every width from 3 to 16 bits with its default taps and checks that each
// returns to its seed after exactly 2^n - 1 clocks with 2^(n-1) ones.
module tb_dither_lfsr;
  import mash_pkg::*;

  localparam int W = 8;
  localparam int PERIOD = (1 << W) - 1;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         en;
  logic [W-1:0] state;
  logic         d;

  int checks = 0;
  int failures = 0;

  dither_lfsr dut (.clk(clk), .rst_n(rst_n), .en(en), .state(state), .d(d));

  always #5 clk = ~clk;

  // All widths 3..16, free-running from a common reset.
  logic rst_w_n;
  int   widths_done = 0;

  for (genvar g = 3; g <= 16; g++) begin : g_width
    logic [g-1:0] st;
    logic         dd;
    dither_lfsr #(.WIDTH(g)) u_lfsr (.clk(clk), .rst_n(rst_w_n), .en(1'b1), .state(st), .d(dd));
    initial begin
      int len, n_ones;
      bit zero_seen;
      len = 0;
      n_ones = 0;
      zero_seen = 1'b0;
      @(posedge rst_w_n);
      #1;
      do begin
        n_ones += int'(dd);
        if (st == '0) zero_seen = 1'b1;
        @(negedge clk);
        len++;
      end while (st != g'(LFSR_SEED) && len < (1 << g));
      check(len == (1 << g) - 1, $sformatf("width %0d: period %0d, expected %0d", g, len, (1 << g) - 1));
      check(n_ones == (1 << (g - 1)), $sformatf("width %0d: %0d ones per period", g, n_ones));
      check(!zero_seen, $sformatf("width %0d: all-zero state reached", g));
      widths_done++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bit o [0:3*PERIOD];
  int ones;
  int first_return;
  logic [W-1:0] held;

  initial begin
    rst_w_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_w_n = 1'b1;
  end

  initial begin
    rst_n = 1'b0;
    en    = 1'b0;
    repeat (2) @(posedge clk);
    #1 check(state == W'(LFSR_SEED), "seed loaded at reset");
    rst_n = 1'b1;
    en    = 1'b1;
    first_return = -1;
    ones = 0;
    for (int t = 0; t <= 3 * PERIOD; t++) begin
      #1;
      o[t] = d;
      if (t < PERIOD && d) ones++;
      if (t > 0 && first_return < 0 && state == W'(LFSR_SEED)) first_return = t;
      check(state != '0, "register never all-zero");
      @(posedge clk);
    end
    for (int t = 0; t + 8 <= 3 * PERIOD; t++)
      check(o[t+8] == (o[t] ^ o[t+2] ^ o[t+3] ^ o[t+4]),
            $sformatf("recurrence at t=%0d", t));
    check(first_return == PERIOD,
          $sformatf("period %0d, expected %0d", first_return, PERIOD));
    check(ones == 128, $sformatf("%0d ones per period, expected 128", ones));
    // Hold while disabled.
    #1 en = 1'b0;
    #1 held = state;
    repeat (10) @(posedge clk);
    #1 check(state == held, "register holds while en is low");
    en = 1'b1;
    @(posedge clk);
    #1 check(state != held, "register advances when en returns");
    wait (widths_done == 14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
