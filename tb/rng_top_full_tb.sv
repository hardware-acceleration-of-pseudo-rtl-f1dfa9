// rng_top_full_tb: end-to-end testbench of the generator at its default size.
//
// rng_top is instantiated with all parameters at their defaults: M_BITS=32,
// K=16 (a table of 65537 entries), W=32, 32 LFSR shifts per number and a
// 16-word buffer. The testbench loads all 65537 entries of an exponential
// inverse CDF (27 fractional bits, last entry saturated), then runs the
// same sequence as rng_top_tb: latency (4 clocks), one number per clock,
// 20000 numbers read at random and compared one by one with a model
// written here (LFSR polynomial x^32+x^22+x^2+x+1, table copy and
// Z = A + floor(S*(B-A)/2^16)), the exponential mean, a pause, a reseed
// and a switch to a uniform table. The reseed value starts on the last
// table index. Stalls and the use of the last table
// index are counted and must happen.
module rng_top_full_tb;
  localparam int M     = 32;
  localparam int K     = 16;
  localparam int W     = 32;
  localparam int D     = 16;
  localparam int FRAC  = 27;           // fractional bits of the table entries
  localparam int N     = (1 << K) + 1;
  localparam int NUMS  = 20000;        // numbers to read and compare

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  always #5 clk = ~clk;

  logic               run = 1'b0, seed_we = 1'b0, lut_we = 1'b0, rd_en = 1'b0;
  logic [M-1:0]       seed = '0;
  logic [K:0]         lut_waddr = '0;
  logic [W-1:0]       lut_wdata = '0, rd_data;
  logic               rd_valid, stalled;
  logic [$clog2(D):0] fill_level;

  rng_top dut (
    .clk, .rst_n, .run, .seed_we, .seed, .lut_we, .lut_waddr, .lut_wdata,
    .rd_en, .rd_data, .rd_valid, .fill_level, .stalled
  );

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
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

  // ---------------- reference model ----------------
  logic [W-1:0] table_m [N];
  logic [M-1:0] mx = 32'd1;
  logic [W-1:0] expq[$];
  int n_stall = 0, n_top_idx = 0, n_reseed = 0, n_pause = 0, n_switch = 0;

  function automatic logic [M-1:0] model_next(input logic [M-1:0] v);
    for (int i = 0; i < M; i++) v = {v[M-2:0], v[31] ^ v[21] ^ v[1] ^ v[0]};
    return v;
  endfunction

  function automatic logic [W-1:0] model_z(input logic [M-1:0] xv);
    int unsigned r, s;
    longint a, b, q;
    r = 32'(xv) >> (M - K);
    s = 32'(xv) & ((1 << (M - K)) - 1);
    a = longint'(table_m[r]);
    b = longint'(table_m[r+1]);
    q = ((b - a) * longint'(s)) >>> (M - K);
    return W'(a + q);
  endfunction

  // model of generation, sampled at every clock edge
  always @(posedge clk) begin
    if (rst_n) begin
      if (seed_we) begin
        mx <= (seed == '0) ? M'(1) : seed;
      end else if (run && !stalled) begin
        expq.push_back(model_z(mx));
        if ((mx >> (M - K)) == (1 << K) - 1) n_top_idx++;
        mx <= model_next(mx);
      end
      if (stalled) n_stall++;
    end
  end

  task automatic load_table(input bit expo);
    real u, v;
    for (int i = 0; i < N; i++) begin
      u = real'(i) / real'(1 << K);
      if (!expo) v = u * real'(1 << FRAC);
      else if (i == N - 1) v = 2.0 ** W - 1.0;
      else v = -$ln(1.0 - u) * real'(1 << FRAC);
      table_m[i] = W'(longint'(v + 0.5));
      lut_we = 1'b1; lut_waddr = (K+1)'(i); lut_wdata = table_m[i];
      @(negedge clk);
    end
    lut_we = 1'b0;
  endtask

  int n_read = 0;
  real sum_exp = 0.0;
  int  n_exp = 0;

  // read one number if available (rd_en decided by `want`), compare it
  task automatic reader_cycle(input bit want, input bit expo);
    rd_en = want && rd_valid;
    if (rd_en) begin
      if (expq.size() == 0) check(1'b0, "output without a generated number");
      else begin
        check(rd_data == expq[0], $sformatf("number %0d: got %h want %h", n_read, rd_data, expq[0]));
        if (expo) begin sum_exp += real'(rd_data); n_exp++; end
        void'(expq.pop_front());
      end
      n_read++;
    end
    @(negedge clk);
    rd_en = 1'b0;
  endtask

  initial begin : main
    int lat, got;
    real mean;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load_table(1'b1);
    repeat (3) @(negedge clk);
    check(!rd_valid && fill_level == 0, "buffer empty before run");

    // latency: run high, count edges until the first number is readable
    run = 1'b1;
    lat = 0;
    while (!rd_valid && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 4, $sformatf("latency %0d, want 4", lat));

    // throughput: reader never waits, one number per clock
    got = 0;
    for (int c = 0; c < 200; c++) begin
      if (rd_valid) got++;
      reader_cycle(1'b1, 1'b1);
    end
    check(got == 200, $sformatf("throughput %0d numbers in 200 clocks", got));

    // slow random reader: buffer fills, generator stalls
    while (n_read < NUMS / 2) reader_cycle(($urandom % 3) == 0, 1'b1);

    // pause: run low for a while, nothing is generated
    run = 1'b0;
    for (int c = 0; c < 30; c++) begin
      reader_cycle(1'b1, 1'b1);
      n_pause++;
    end
    check(!rd_valid && expq.size() == 0, "drained during pause");

    // reseed while running
    run = 1'b1;
    repeat (50) reader_cycle(($urandom % 2) == 0, 1'b1);
    seed = 32'hFFFFC0DE;   // top K bits all ones: last table index
    seed_we = 1'b1;
    reader_cycle(1'b1, 1'b1);
    seed_we = 1'b0;
    n_reseed++;
    repeat (500) reader_cycle(($urandom % 2) == 0, 1'b1);

    mean = sum_exp / real'(n_exp) / real'(1 << FRAC);
    $display("exponential mean %f over %0d numbers", mean, n_exp);
    check(mean > 0.93 && mean < 1.07, "exponential mean near 1");

    // switch the distribution: drain, load a uniform table, run again
    run = 1'b0;
    repeat (30) reader_cycle(1'b1, 1'b1);
    load_table(1'b0);
    n_switch++;
    run = 1'b1;
    while (n_read < NUMS) reader_cycle(($urandom % 2) == 0, 1'b0);
    run = 1'b0;
    repeat (30) reader_cycle(1'b1, 1'b0);
    check(expq.size() == 0, "all generated numbers read");

    $display("stall cycles %0d, last-index uses %0d, reseeds %0d, pause cycles %0d, table switches %0d",
             n_stall, n_top_idx, n_reseed, n_pause, n_switch);
    check(n_stall > 0, "stall never happened");
    check(n_top_idx > 0, "last table index never used");
    check(n_reseed > 0, "reseed never happened");
    check(n_pause > 0, "pause never happened");
    check(n_switch > 0, "table switch never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
