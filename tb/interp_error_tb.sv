// interp_error_tb: interpolation error against table size.
//
// Runs interp_error_lane for K = 1 to 9 with a 10-bit uniform integer
// (X up to 1023), which measures the mean squared error that linear
// interpolation adds for a uniform, an exponential and a Gaussian
// distribution. Expected: the uniform error is only rounding (below
// 1e-9, since its inverse CDF is a straight line), and the exponential
// and Gaussian errors fall as K grows. Every generated number is also
// compared bit-exactly with the interpolation formula inside the lanes.
// K = 10 would leave no interpolation bits (M_BITS-K = 0), which the
// generator does not support.
module interp_error_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  int   checks = 0;
  int   failures = 0;
  always #5 clk = ~clk;

  logic [9:1] done;
  real mse [1:9][3];

  for (genvar k = 1; k <= 9; k++) begin : g_lane
    interp_error_lane #(.K(k)) u (.clk, .rst_n, .start, .done(done[k]));
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : main
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (&done);
    @(negedge clk);
    `define LANE(k) \
      mse[k] = g_lane[k].u.mse; \
      checks += g_lane[k].u.checks; \
      failures += g_lane[k].u.failures;
    `LANE(1) `LANE(2) `LANE(3) `LANE(4) `LANE(5) `LANE(6) `LANE(7) `LANE(8) `LANE(9)
    `undef LANE
    $display(" K   uniform       exponential   gaussian");
    for (int k = 1; k <= 9; k++)
      $display("%2d   %.4e    %.4e    %.4e", k, mse[k][0], mse[k][1], mse[k][2]);
    for (int k = 1; k <= 9; k++) begin
      check(mse[k][0] < 1e-9, $sformatf("uniform error at K=%0d: %e", k, mse[k][0]));
      if (k > 1) begin
        check(mse[k][1] < mse[k-1][1], $sformatf("exponential error not falling at K=%0d", k));
        check(mse[k][2] < mse[k-1][2], $sformatf("gaussian error not falling at K=%0d", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
