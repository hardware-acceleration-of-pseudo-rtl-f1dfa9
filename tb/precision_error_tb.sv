// precision_error_tb: output precision against table entry width.
//
// Runs precision_lane for W = 4, 8, 16, 24 and 32 bits (1000 exponential
// numbers each, FRAC = W-4 fractional bits). Rounding to a step of q
// gives a mean squared error of about q^2/12, and truncation in the
// interpolation shift adds a bias of up to half a step, so each measured
// error must lie between q^2/24 and q^2. The errors must also fall as W
// grows. Every number is compared bit-exactly with the integer formula
// inside the lanes.
module precision_error_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  int   checks = 0;
  int   failures = 0;
  always #5 clk = ~clk;

  localparam int NW = 5;
  localparam int WS [NW] = '{4, 8, 16, 24, 32};

  logic [NW-1:0] done;
  real mse [NW];
  real lsb [NW];

  for (genvar j = 0; j < NW; j++) begin : g_lane
    precision_lane #(.W(WS[j])) u (.clk, .rst_n, .start, .done(done[j]));
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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
    `define LANE(j) \
      mse[j] = g_lane[j].u.mse; \
      lsb[j] = g_lane[j].u.lsb; \
      checks += g_lane[j].u.checks; \
      failures += g_lane[j].u.failures;
    `LANE(0) `LANE(1) `LANE(2) `LANE(3) `LANE(4)
    `undef LANE
    $display("  W   step         mean sq. error   error / step^2");
    for (int j = 0; j < NW; j++)
      $display("%3d   %.3e    %.3e        %.3f", WS[j], lsb[j], mse[j], mse[j] / (lsb[j] * lsb[j]));
    for (int j = 0; j < NW; j++) begin
      check(mse[j] > lsb[j] * lsb[j] / 24.0 && mse[j] < lsb[j] * lsb[j],
            $sformatf("W=%0d error %e outside bounds", WS[j], mse[j]));
      if (j > 0) check(mse[j] < mse[j-1], $sformatf("error not falling at W=%0d", WS[j]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
