// tb_mash_ncl: self-checking testbench for the noise cancellation network.
//
// Drives random carry triples and compares the registered output with the
// expanded formula y[n] = c1[n] + c2[n] - c2[n-1] + c3[n] - 2 c3[n-1] + c3[n-2]
// one clock later. Also drives the carry patterns that reach the two ends of
// the output range, -3 and +4, and checks the one-clock latency.
module tb_mash_ncl;
  import mash_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n;
  logic      c1, c2, c3;
  mash_out_t y;

  int checks = 0;
  int failures = 0;
  int c2_1, c3_1, c3_2;
  int expv;
  int seen_min = 0;
  int seen_max = 0;

  mash_ncl dut (.clk(clk), .rst_n(rst_n), .c1(c1), .c2(c2), .c3(c3), .y(y));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Apply one carry triple, clock it, and compare the registered result.
  task automatic step(input bit a, input bit b, input bit cc);
    c1 = a; c2 = b; c3 = cc;
    expv = int'(a) + int'(b) - c2_1 + int'(cc) - 2 * c3_1 + c3_2;
    @(posedge clk);
    #1;
    check(int'(y) == expv, $sformatf("y=%0d expected %0d", int'(y), expv));
    if (expv == -3) seen_min++;
    if (expv == 4) seen_max++;
    c2_1 = int'(b);
    c3_2 = c3_1;
    c3_1 = int'(cc);
  endtask

  initial begin
    rst_n = 1'b0;
    c1 = 0; c2 = 0; c3 = 0;
    repeat (2) @(posedge clk);
    #1 check(y == '0, "output zero after reset");
    rst_n = 1'b1;
    c2_1 = 0; c3_1 = 0; c3_2 = 0;
    // Extreme values: +4 needs c3[n-2]=1, c3[n-1]=0, c2[n-1]=0, all of c[n]=1.
    step(0, 0, 1);
    step(0, 0, 0);
    step(1, 1, 1);
    // -3 needs c1=c2=c3=0 now, c2[n-1]=1, c3[n-1]=1, c3[n-2]=0.
    step(0, 0, 0);
    step(0, 1, 1);
    step(0, 0, 0);
    for (int n = 0; n < 3000; n++)
      step(1'($urandom), 1'($urandom), 1'($urandom));
    check(seen_min > 0, "output reached -3");
    check(seen_max > 0, "output reached +4");
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
