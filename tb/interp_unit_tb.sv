// interp_unit_tb: self-checking testbench of interp_unit.
//
// W=32, F=16 (the reference sizes). Random A, B and S, with increasing,
// decreasing and equal neighbours and the extreme fractions 0 and 2^F-1,
// are streamed in, one per clock, with random stall cycles (en low). Each
// result is compared with A + floor(S*(B-A)/2^F) computed here in 64-bit
// signed arithmetic, and must appear exactly two enabled clocks later.
module interp_unit_tb;
  localparam int W = 32;
  localparam int F = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  always #5 clk = ~clk;

  logic         en = 1'b0, in_valid = 1'b0, out_valid;
  logic [W-1:0] a = '0, b = '0, z;
  logic [F-1:0] s = '0;

  interp_unit #(.W(W), .F(F)) dut (.clk, .rst_n, .en, .in_valid, .a, .b, .s, .out_valid, .z);

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

  function automatic logic [W-1:0] ref_z(input logic [W-1:0] ra, input logic [W-1:0] rb,
                                         input logic [F-1:0] rs);
    longint d, p, q;
    d = longint'(rb) - longint'(ra);
    p = d * longint'(rs);
    q = p >>> F;                      // floor division by 2^F
    return W'(longint'(ra) + q);
  endfunction

  logic [W-1:0] expq[$];
  logic [W-1:0] p1, p2;   // expected values in the two pipeline stages
  bit           v1, v2;
  int           n_out = 0;

  initial begin : main
    int n_in;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    n_in = 0;
    v1 = 0; v2 = 0;
    while (n_in < 4000) begin
      en = ($urandom % 5) != 0;
      in_valid = ($urandom % 8) != 0;
      a = $urandom;
      case ($urandom % 4)
        0: b = a + ($urandom % 65536);          // small increase
        1: b = a - ($urandom % 65536);          // small decrease
        2: b = a;                               // flat
        default: b = $urandom;                  // anything
      endcase
      case ($urandom % 6)
        0: s = '0;
        1: s = '1;
        default: s = F'($urandom);
      endcase
      @(posedge clk);
      // model of the two-stage pipeline, updated with the same enable
      if (en) begin
        v2 = v1; p2 = p1;
        v1 = in_valid; p1 = ref_z(a, b, s);
        if (in_valid) n_in++;
      end
      @(negedge clk);
      check(out_valid == v2, "out_valid timing");
      if (v2) begin
        check(z == p2, $sformatf("z got %h want %h", z, p2));
        n_out++;
      end
    end
    check(n_out > 3900, "enough results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
