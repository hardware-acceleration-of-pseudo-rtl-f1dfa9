// precision_lane: one entry width of the precision-error experiment.
//
// Instantiates rng_top with a 16-bit LFSR, K=8 (257 entries) and entries of
// W bits holding an exponential inverse CDF (mean 1) with FRAC = W-4
// fractional bits, so one step of the last bit is 2^-(W-4). It generates
// 1000 numbers and accumulates, per number, the squared difference between
// the generator's output and the same interpolation done in real
// arithmetic on the unrounded table values. What remains is the error
// caused by the W-bit representation alone (rounding of the table entries
// and truncation in the interpolation shift).
// The inverse CDF at u = 1 is infinite; the last entry holds its value at
// 1 - 2^-17.
//
// Interface: start (one pulse) begins the run, done rises at the end, mse
// holds the mean squared error, lsb the step of one last bit, and
// checks/failures count bit-exact comparisons with the integer formula.
module precision_lane #(
  parameter int W = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done
);
  localparam int M    = 16;
  localparam int K    = 8;
  localparam int FRAC = W - 4;
  localparam int N    = (1 << K) + 1;
  localparam int NUMS = 1000;

  real mse;
  real lsb;
  int  checks = 0;
  int  failures = 0;

  logic          run, active = 1'b0, seed_we = 1'b0, lut_we = 1'b0, rd_en;
  logic [M-1:0]  seed = 16'h2545;
  logic [K:0]    lut_waddr = '0;
  logic [W-1:0]  lut_wdata = '0, rd_data;
  logic          rd_valid, stalled;
  logic [4:0]    fill_level;

  rng_top #(.M_BITS(M), .K(K), .W(W)) dut (
    .clk, .rst_n, .run, .seed_we, .seed, .lut_we, .lut_waddr, .lut_wdata,
    .rd_en, .rd_data, .rd_valid, .fill_level, .stalled
  );

  assign rd_en = rd_valid;

  int gen = 0;
  always @(posedge clk) begin
    if (seed_we) gen <= 0;
    else if (run && !stalled) gen <= gen + 1;
  end
  assign run = active && (gen < NUMS);

  real          exact [N];
  logic [W-1:0] table_m [N];

  function automatic logic [M-1:0] model_next(input logic [M-1:0] v);
    for (int i = 0; i < M; i++) v = {v[M-2:0], v[15] ^ v[14] ^ v[12] ^ v[3]};
    return v;
  endfunction

  initial begin : run_all
    logic [M-1:0] mx;
    real u, acc, e, zr;
    longint a, b, zi;
    int got, r, s;
    done = 1'b0;
    lsb = 1.0 / real'(longint'(1) << FRAC);
    @(posedge start);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      u = real'(i) / real'(1 << K);
      if (i == N - 1) u = 1.0 - 1.0 / 131072.0;
      exact[i] = -$ln(1.0 - u);
      table_m[i] = W'(longint'(exact[i] / lsb + 0.5));
      lut_we = 1'b1; lut_waddr = (K+1)'(i); lut_wdata = table_m[i];
      @(negedge clk);
    end
    lut_we = 1'b0;
    seed_we = 1'b1;
    @(negedge clk);
    seed_we = 1'b0;
    mx = seed;
    acc = 0.0;
    got = 0;
    active = 1'b1;
    while (got < NUMS) begin
      @(negedge clk);
      if (rd_valid) begin
        r = int'(32'(mx) >> (M - K));
        s = int'(mx) & ((1 << (M - K)) - 1);
        a = longint'(table_m[r]);
        b = longint'(table_m[r+1]);
        zi = a + (((b - a) * longint'(s)) >>> (M - K));
        checks++;
        if (rd_data != W'(zi)) begin
          failures++;
          if (failures < 10) $display("W=%0d: got %h want %h", W, rd_data, W'(zi));
        end
        zr = exact[r] + (exact[r+1] - exact[r]) * real'(s) / real'(1 << (M - K));
        e = real'(rd_data) * lsb - zr;
        acc += e * e;
        mx = model_next(mx);
        got++;
      end
    end
    active = 1'b0;
    mse = acc / real'(NUMS);
    done = 1'b1;
  end
endmodule
