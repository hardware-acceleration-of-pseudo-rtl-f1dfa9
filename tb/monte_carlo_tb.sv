// monte_carlo_tb: the generator feeding two Monte Carlo applications.
//
// rng_top at its default size (32-bit X, 65537-entry table, W=32) is
// loaded with a uniform table (entry i = i * 2^16, so a number is a 32-bit
// fraction of 1) and read continuously. Consecutive numbers form points
// (x, y) in the unit square.
//   * Pi estimator: C counts points with x^2 + y^2 < 1; pi ~ 4 C / N.
//   * Monte Carlo integrator: for F(x) = x^2 on [0,1] with the y window
//     [0,1], C counts points with y < F(x); the integral ~ C / N (= 1/3).
// With N = 40000 points the standard deviation of the pi estimate is about
// 0.008 and that of the integral about 0.0024; the checks allow four
// standard deviations. Every number is also compared with the LFSR value
// X computed here (polynomial x^32+x^22+x^2+x+1, 32 shifts per number):
// with this table the interpolation returns X exactly, except in the last
// table interval where the saturated last entry makes it slightly smaller.
module monte_carlo_tb;
  localparam int NPTS = 40000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  always #5 clk = ~clk;

  logic        run = 1'b0, seed_we = 1'b0, lut_we = 1'b0, rd_en;
  logic [31:0] seed = 32'h1234_5678;
  logic [16:0] lut_waddr = '0;
  logic [31:0] lut_wdata = '0, rd_data;
  logic        rd_valid, stalled;
  logic [4:0]  fill_level;

  rng_top dut (
    .clk, .rst_n, .run, .seed_we, .seed, .lut_we, .lut_waddr, .lut_wdata,
    .rd_en, .rd_data, .rd_valid, .fill_level, .stalled
  );

  assign rd_en = rd_valid;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : main
    real x, y, pi_est, integral;
    int  n, c_pi, c_int, nxt;
    bit  have_x;
    logic [31:0] mx;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i <= 65536; i++) begin
      lut_we = 1'b1; lut_waddr = 17'(i);
      lut_wdata = (i == 65536) ? 32'hFFFF_FFFF : 32'(i) << 16;
      @(negedge clk);
    end
    lut_we = 1'b0;
    seed_we = 1'b1;
    @(negedge clk);
    seed_we = 1'b0;
    mx = seed;
    run = 1'b1;
    n = 0; c_pi = 0; c_int = 0; have_x = 0;
    while (n < NPTS) begin
      @(negedge clk);
      if (rd_valid) begin
        if (mx[31:16] != 16'hFFFF) check(rd_data == mx, $sformatf("got %h want %h", rd_data, mx));
        else check(rd_data <= mx, "last interval");
        for (int i = 0; i < 32; i++) mx = {mx[30:0], mx[31] ^ mx[21] ^ mx[1] ^ mx[0]};
        if (!have_x) begin
          x = real'(rd_data) / 4294967296.0;
          have_x = 1;
        end else begin
          y = real'(rd_data) / 4294967296.0;
          have_x = 0;
          if (x * x + y * y < 1.0) c_pi++;
          if (y < x * x) c_int++;
          n++;
        end
      end
    end
    pi_est = 4.0 * real'(c_pi) / real'(n);
    integral = real'(c_int) / real'(n);
    $display("pi estimate %f, integral of x^2 on [0,1] %f, from %0d points", pi_est, integral, n);
    check(pi_est > 3.14159 - 0.032 && pi_est < 3.14159 + 0.032, "pi estimate");
    check(integral > 0.33333 - 0.0095 && integral < 0.33333 + 0.0095, "integral estimate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
