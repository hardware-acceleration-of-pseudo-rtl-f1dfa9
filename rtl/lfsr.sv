// lfsr: uniform random integer source of the generator.
//
// A Fibonacci linear feedback shift register of N bits. Each shift moves
// the register one place towards the MSB and feeds the XOR of the tap bits
// into bit 0. With the maximal-length taps of rng_pkg the register runs
// through all 2^N-1 non-zero states. Using an LFSR rather than a linear
// congruential generator, and its N-bit width, follow the reference design.
//
// This design's own choices:
//   * STEPS shifts are applied per enabled clock (unrolled XOR network).
//     The default STEPS=N makes consecutive outputs share no bits; with one
//     shift per clock, consecutive numbers would be the same bits moved by
//     one place. The period stays 2^N-1 as long as gcd(STEPS, 2^N-1) = 1,
//     which holds for the default whenever N is a power of two.
//   * Reset loads RESET_SEED; seed_we loads `seed`. The all-zero state is
//     the lock-up state of an XOR LFSR, so a zero seed is replaced by 1.
//
// Interface/timing: x is the register itself. When en is high the register
// advances on the rising clock edge; seed_we has priority over en.
module lfsr #(
  parameter int unsigned N          = rng_pkg::M_BITS_DEF,
  parameter int unsigned STEPS      = N,
  parameter logic [N-1:0] RESET_SEED = N'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         seed_we,
  input  logic [N-1:0] seed,
  output logic [N-1:0] x
);

  localparam logic [31:0] TAPS32 = rng_pkg::lfsr_taps(N);
  localparam logic [N-1:0] TAPS  = TAPS32[N-1:0];

  if (N < 2 || N > 32) begin : g_bad_width
    $error("lfsr: N must be between 2 and 32");
  end
  if (STEPS < 1) begin : g_bad_steps
    $error("lfsr: STEPS must be at least 1");
  end

  logic [N-1:0] nxt;

  always_comb begin
    nxt = x;
    for (int unsigned i = 0; i < STEPS; i++) begin
      nxt = {nxt[N-2:0], ^(nxt & TAPS)};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= (RESET_SEED == '0) ? N'(1) : RESET_SEED;
    end else if (seed_we) begin
      x <= (seed == '0) ? N'(1) : seed;
    end else if (en) begin
      x <= nxt;
    end
  end

endmodule
