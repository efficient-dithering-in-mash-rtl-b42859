// tb_mash_accumulator: self-checking testbench for one MASH accumulator stage.
//
// Drives random input words, random dither bits and random LSB substitution
// and compares carry and residue every cycle with an integer model: the
// effective input is x with its LSB forced to d when substitution is on,
// sum = x_eff + residue, carry = sum >= 256, residue = sum mod 256. Also checks
// the zero reset of the residue and that a constant input X gives exactly
// X carries in 256 clocks (the mean of the quantizer output is X / 2^8).
module tb_mash_accumulator;

  localparam int W = 8;
  localparam int M = 1 << W;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] x;
  logic         dither_sel;
  logic         d;
  logic         c;
  logic [W-1:0] e;

  int checks = 0;
  int failures = 0;
  int acc;
  int xe;
  int sum;
  int carries;
  int mode_sub = 0;

  mash_accumulator dut (.clk(clk), .rst_n(rst_n), .x(x), .dither_sel(dither_sel),
                        .d(d), .c(c), .e(e));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    x = '0;
    dither_sel = 1'b0;
    d = 1'b0;
    repeat (2) @(posedge clk);
    #1 check(e == '0 && c == 1'b0, "residue zero after reset");
    rst_n = 1'b1;
    acc = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      x = W'($urandom);
      dither_sel = 1'($urandom);
      d = 1'($urandom);
      xe = dither_sel ? ((int'(x) / 2) * 2 + int'(d)) : int'(x);
      if (dither_sel && (x[0] != d)) mode_sub++;
      sum = xe + acc;
      #1;
      check(c == (sum >= M), $sformatf("carry n=%0d", n));
      check(int'(e) == sum % M, $sformatf("residue n=%0d got %0d exp %0d", n, e, sum % M));
      acc = sum % M;
    end
    check(mode_sub > 0, "LSB substitution changed the input at least once");
    // Mean of the carry for a constant input.
    @(negedge clk);
    rst_n = 1'b0;
    dither_sel = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    x = 8'd77;
    carries = 0;
    for (int n = 0; n < M; n++) begin
      #1 carries += int'(c);
      @(negedge clk);
    end
    check(carries == 77, $sformatf("carries per 256 clocks %0d, expected 77", carries));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
