// rng_fifo_tb: self-checking testbench of rng_fifo.
//
// DEPTH=8. Random push and pop (never a push while full or a pop while
// empty, which the protocol forbids) against a queue model: dout, empty,
// full and count are compared every clock. The test drives the buffer
// both to full and to empty many times and counts how often each happened.
module rng_fifo_tb;
  localparam int W = 16;
  localparam int D = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  always #5 clk = ~clk;

  logic           push = 1'b0, pop = 1'b0, full, empty;
  logic [W-1:0]   din = '0, dout;
  logic [$clog2(D):0] count;

  rng_fifo #(.W(W), .DEPTH(D)) dut (.clk, .rst_n, .push, .din, .full, .pop, .dout, .empty, .count);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  logic [W-1:0] q[$];
  int n_full = 0, n_empty = 0;

  initial begin : main
    int bias;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 20000; t++) begin
      bias = (t / 500) % 2 ? 3 : 7;     // alternate between filling and draining
      push = !full && (q.size() < D) && (($urandom % 10) < bias);
      pop  = !empty && (q.size() > 0) && (($urandom % 10) >= bias - 2);
      din  = W'($urandom);
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == D), "full");
      check(count == ($clog2(D)+1)'(q.size()), "count");
      if (q.size() > 0) check(dout == q[0], $sformatf("dout got %h want %h", dout, q[0]));
      if (q.size() == D) n_full++;
      if (q.size() == 0) n_empty++;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
      @(negedge clk);
    end
    check(n_full > 10, "buffer never full");
    check(n_empty > 10, "buffer never empty");
    $display("full seen %0d times, empty seen %0d times", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
