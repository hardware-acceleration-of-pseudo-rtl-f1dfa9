// lfsr_tb: self-checking testbench of lfsr.
//
// 1. A 32-bit LFSR with the default STEPS=32 is compared, value by value,
//    with a reference model written here from the polynomial
//    x^32 + x^22 + x^2 + x + 1 (one shift = new bit 0 is the XOR of bits
//    31, 21, 1 and 0), including reset value, seed load, zero seed and
//    hold while en is low.
// 2. Maximal length: 8-bit (one shift per clock), 10-bit and 16-bit
//    (one output per N shifts) instances must return to their start
//    value after exactly 2^N-1 enabled clocks and never reach zero.
module lfsr_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- 32-bit, compared with the model ----------------
  logic        en32 = 1'b0, sw32 = 1'b0;
  logic [31:0] seed32 = '0, x32;
  lfsr #(.N(32)) dut32 (.clk, .rst_n, .en(en32), .seed_we(sw32), .seed(seed32), .x(x32));

  function automatic logic [31:0] ref_step32(input logic [31:0] v, input int n);
    for (int i = 0; i < n; i++) v = {v[30:0], v[31] ^ v[21] ^ v[1] ^ v[0]};
    return v;
  endfunction

  // ---------------- period checks ----------------
  logic        en_p = 1'b0;
  logic [7:0]  x8;
  logic [9:0]  x10;
  logic [15:0] x16;
  lfsr #(.N(8),  .STEPS(1))  dut8  (.clk, .rst_n, .en(en_p), .seed_we(1'b0), .seed(8'd0),  .x(x8));
  lfsr #(.N(10))             dut10 (.clk, .rst_n, .en(en_p), .seed_we(1'b0), .seed(10'd0), .x(x10));
  lfsr #(.N(16))             dut16 (.clk, .rst_n, .en(en_p), .seed_we(1'b0), .seed(16'd0), .x(x16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : main
    logic [31:0] m;
    int p8, p10, p16;
    bit zero8, zero10, zero16;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(x32 == 32'd1, "reset value");
    m = 32'd1;
    // free run
    en32 = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      m = ref_step32(m, 32);
      check(x32 == m, $sformatf("run step %0d: got %h want %h", i, x32, m));
      if (i % 97 == 13) begin           // hold for a cycle
        en32 = 1'b0;
        @(negedge clk);
        check(x32 == m, "hold while en low");
        en32 = 1'b1;
      end
    end
    // seed load
    seed32 = 32'hDEADBEEF; sw32 = 1'b1;
    @(negedge clk);
    sw32 = 1'b0;
    m = 32'hDEADBEEF;
    check(x32 == m, "seed load");
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      m = ref_step32(m, 32);
      check(x32 == m, "run after seed");
    end
    // zero seed becomes 1
    seed32 = 32'd0; sw32 = 1'b1; en32 = 1'b0;
    @(negedge clk);
    sw32 = 1'b0;
    check(x32 == 32'd1, "zero seed replaced by 1");

    // periods
    p8 = 0; p10 = 0; p16 = 0; zero8 = 0; zero10 = 0; zero16 = 0;
    en_p = 1'b1;
    for (int i = 1; i <= 65535; i++) begin
      @(negedge clk);
      if (x8 == 8'd0)   zero8 = 1;
      if (x10 == 10'd0) zero10 = 1;
      if (x16 == 16'd0) zero16 = 1;
      if (p8 == 0 && x8 == 8'd1)    p8 = i;
      if (p10 == 0 && x10 == 10'd1) p10 = i;
      if (p16 == 0 && x16 == 16'd1) p16 = i;
    end
    check(p8 == 255,    $sformatf("8-bit period %0d", p8));
    check(p10 == 1023,  $sformatf("10-bit period %0d", p10));
    check(p16 == 65535, $sformatf("16-bit period %0d", p16));
    check(!zero8 && !zero10 && !zero16, "zero state reached");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
