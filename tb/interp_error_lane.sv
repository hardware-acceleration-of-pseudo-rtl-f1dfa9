// interp_error_lane: one table size of the interpolation-error experiment.
//
// Instantiates rng_top with a 10-bit LFSR (X from 1 to 1023, 10 shifts per
// number, so one period gives every non-zero X once) and a table of
// 2^K+1 entries of 32 bits with 16 fractional bits. For each of three
// distributions (uniform on [0,1), exponential with mean 1, standard
// Gaussian) it loads the table sampled at i/2^K, generates one full period
// of 1023 numbers and accumulates the squared difference between each
// number and the exact inverse CDF at X/1024. Entries are unsigned; the
// Gaussian is stored with an offset of 2^31. Where the inverse CDF is
// infinite (exponential at u = 1, Gaussian at u = 0 and 1) the table holds
// its value at 1/2048 or 1-1/2048.
// Every number is also compared bit-exactly with the interpolation formula.
//
// Interface: start (one pulse) begins the run; done rises at the end;
// mse[d] holds the mean squared error per number for distribution d and
// checks/failures count the bit-exact comparisons.
module interp_error_lane #(
  parameter int K = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done
);
  localparam int M    = 10;
  localparam int W    = 32;
  localparam int FRAC = 16;
  localparam int N    = (1 << K) + 1;
  localparam real OFS = 2147483648.0;

  real mse [3];
  int  checks = 0;
  int  failures = 0;

  logic          run, active = 1'b0, seed_we = 1'b0, lut_we = 1'b0, rd_en;
  logic [M-1:0]  seed = 10'd1;
  logic [K:0]    lut_waddr = '0;
  logic [W-1:0]  lut_wdata = '0, rd_data;
  logic          rd_valid, stalled;
  logic [4:0]    fill_level;

  rng_top #(.M_BITS(M), .K(K), .W(W)) dut (
    .clk, .rst_n, .run, .seed_we, .seed, .lut_we, .lut_waddr, .lut_wdata,
    .rd_en, .rd_data, .rd_valid, .fill_level, .stalled
  );

  assign rd_en = rd_valid;

  // numbers generated since the last seed load; run stops after one period
  int gen = 0;
  always @(posedge clk) begin
    if (seed_we) gen <= 0;
    else if (run && !stalled) gen <= gen + 1;
  end
  assign run = active && (gen < 1023);

  // erf after Abramowitz and Stegun 7.1.26 (absolute error below 1.5e-7)
  function automatic real erf_approx(input real x);
    real t, y, ax;
    ax = (x < 0.0) ? -x : x;
    t = 1.0 / (1.0 + 0.3275911 * ax);
    y = 1.0 - (((((1.061405429 * t - 1.453152027) * t) + 1.421413741) * t
                - 0.284496736) * t + 0.254829592) * t * $exp(-ax * ax);
    return (x < 0.0) ? -y : y;
  endfunction

  function automatic real inv_cdf(input int d, input real u);
    real lo, hi, mid;
    if (d > 0 && u < 1.0 / 2048.0) u = 1.0 / 2048.0;
    if (d > 0 && u > 1.0 - 1.0 / 2048.0) u = 1.0 - 1.0 / 2048.0;
    case (d)
      0: return u;
      1: return -$ln(1.0 - u);
      default: begin
        lo = -10.0; hi = 10.0;
        for (int i = 0; i < 60; i++) begin
          mid = 0.5 * (lo + hi);
          if (0.5 * (1.0 + erf_approx(mid / $sqrt(2.0))) < u) lo = mid; else hi = mid;
        end
        return 0.5 * (lo + hi);
      end
    endcase
  endfunction

  function automatic real to_real(input int d, input logic [W-1:0] v);
    real r;
    r = real'(v);
    if (d == 2) r = r - OFS;
    return r / real'(1 << FRAC);
  endfunction

  function automatic logic [W-1:0] from_real(input int d, input real v);
    real r;
    r = v * real'(1 << FRAC);
    if (d == 2) r = r + OFS;
    return W'(longint'(r + ((r < 0.0) ? -0.5 : 0.5)));
  endfunction

  logic [W-1:0] table_m [N];

  function automatic logic [W-1:0] model_z(input logic [M-1:0] xv);
    longint a, b;
    int unsigned r, s;
    r = 32'(xv) >> (M - K);
    s = 32'(xv) & ((1 << (M - K)) - 1);
    a = longint'(table_m[r]);
    b = longint'(table_m[r+1]);
    return W'(a + (((b - a) * longint'(s)) >>> (M - K)));
  endfunction

  function automatic logic [M-1:0] model_next(input logic [M-1:0] v);
    for (int i = 0; i < M; i++) v = {v[M-2:0], v[9] ^ v[6]};
    return v;
  endfunction

  initial begin : run_all
    logic [M-1:0] mx;
    real acc, e;
    int got;
    done = 1'b0;
    @(posedge start);
    for (int d = 0; d < 3; d++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        table_m[i] = from_real(d, inv_cdf(d, real'(i) / real'(1 << K)));
        lut_we = 1'b1; lut_waddr = (K+1)'(i); lut_wdata = table_m[i];
        @(negedge clk);
      end
      lut_we = 1'b0;
      seed_we = 1'b1;                    // restart the sequence at X = 1
      @(negedge clk);
      seed_we = 1'b0;
      mx = 10'd1;
      acc = 0.0;
      got = 0;
      active = 1'b1;
      while (got < 1023) begin
        @(negedge clk);
        if (rd_valid) begin
          checks++;
          if (rd_data != model_z(mx)) begin
            failures++;
            if (failures < 10) $display("K=%0d d=%0d X=%0d: got %h want %h", K, d, mx, rd_data, model_z(mx));
          end
          e = to_real(d, rd_data) - inv_cdf(d, real'(mx) / 1024.0);
          acc += e * e;
          mx = model_next(mx);
          got++;
        end
      end
      active = 1'b0;
      @(negedge clk);
      checks++;
      if (rd_valid || gen != 1023) begin
        failures++;
        $display("K=%0d d=%0d: %0d numbers generated, buffer empty %0b", K, d, gen, !rd_valid);
      end
      mse[d] = acc / 1023.0;
    end
    done = 1'b1;
  end
endmodule
