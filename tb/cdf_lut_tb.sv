// cdf_lut_tb: self-checking testbench of cdf_lut.
//
// A table with K=6 (65 entries) of 20 bits is filled with random words,
// kept also in a model array here. Random read addresses, including the
// last index 2^K-1 whose upper neighbour is entry 2^K, must return
// A = T[R] and B = T[R+1] one clock later; with re low the outputs hold.
// Writes to random entries during reads are then checked as well.
module cdf_lut_tb;
  localparam int K = 6;
  localparam int W = 20;
  localparam int N = (1 << K) + 1;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;
  always #5 clk = ~clk;

  logic         we = 1'b0, re = 1'b0;
  logic [K:0]   waddr = '0;
  logic [W-1:0] wdata = '0;
  logic [K-1:0] raddr = '0;
  logic [W-1:0] a, b;
  logic [W-1:0] model [N];

  cdf_lut #(.K(K), .W(W)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .a, .b);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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
    int unsigned ra;
    logic [W-1:0] ea, eb;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      model[i] = W'($urandom);
      we = 1'b1; waddr = (K+1)'(i); wdata = model[i];
      @(negedge clk);
    end
    we = 1'b0;
    for (int t = 0; t < 600; t++) begin
      ra = (t % 50 == 0) ? (1 << K) - 1 : ($urandom % (1 << K));
      raddr = K'(ra); re = 1'b1;
      // occasionally write an entry at the same time
      if (t % 7 == 3) begin
        we = 1'b1; waddr = (K+1)'($urandom % N); wdata = W'($urandom);
      end
      @(negedge clk);
      if (we) begin
        model[waddr] = wdata;
        we = 1'b0;
      end
      ea = a; eb = b;
      check(a == model[ra] || (t % 7 == 3), $sformatf("A at %0d: got %h", ra, a));
      check(b == model[ra+1] || (t % 7 == 3), $sformatf("B at %0d: got %h", ra+1, b));
      // hold with re low
      re = 1'b0; raddr = K'($urandom);
      @(negedge clk);
      check(a == ea && b == eb, "hold with re low");
      // read-back after any write
      raddr = K'(ra); re = 1'b1;
      @(negedge clk);
      check(a == model[ra] && b == model[ra+1], $sformatf("re-read at %0d", ra));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
