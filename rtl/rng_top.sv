// rng_top: random number generator for an arbitrary distribution.
//
// Implements the table-and-interpolate method: every clock an M_BITS-wide
// uniform integer X from the LFSR is split into R (its upper K bits) and
// S (its lower M_BITS-K bits). R reads the neighbouring inverse-CDF table
// entries A = T[R] and B = T[R+1]; the interpolation unit returns
// Z = A + ((S*(B-A)) >> (M_BITS-K)). Z goes into a buffer the host reads.
// The distribution is set only by what the host loads into the table, so
// one circuit serves uniform, exponential, Gaussian or any other
// distribution. The method, the three sections (LFSR, table, interpolation)
// and the default sizes M_BITS=32, K=16, W=32 follow the reference design.
//
// This design's own choices: the pipeline and its stall, the buffer depth,
// the host-side ports (seed load, table load, run, buffer read) and
// STEPS, the number of LFSR shifts per generated number (see lfsr.sv).
//
// Pipeline (one number per clock when running and not stalled):
//   cycle 0  LFSR register holds X; table read issued at R
//   cycle 1  A, B and S registered; interpolation stage 1 (B-A, product)
//   cycle 2  interpolation stage 2 (shift, add A)
//   cycle 3  Z registered, pushed into the buffer at this edge
//   cycle 4  Z readable at rd_data (rd_valid high)
// When the buffer is full and a result waits at the end of the pipeline,
// the whole pipeline, including the LFSR, holds (stall), so no number is
// lost or skipped. With run low the LFSR holds and bubbles enter.
//
// Host interface: lut_we/lut_waddr/lut_wdata write table entry lut_waddr
// (0..2^K); seed_we loads the LFSR (zero becomes 1); rd_en pops rd_data
// when rd_valid is high. Load the table before setting run; writing the
// table while running changes numbers already in flight.
module rng_top #(
  parameter int unsigned M_BITS     = rng_pkg::M_BITS_DEF,
  parameter int unsigned K          = rng_pkg::K_BITS_DEF,
  parameter int unsigned W          = rng_pkg::W_BITS_DEF,
  parameter int unsigned STEPS      = M_BITS,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        run,
  input  logic                        seed_we,
  input  logic [M_BITS-1:0]           seed,
  input  logic                        lut_we,
  input  logic [K:0]                  lut_waddr,
  input  logic [W-1:0]                lut_wdata,
  input  logic                        rd_en,
  output logic [W-1:0]                rd_data,
  output logic                        rd_valid,
  output logic [$clog2(FIFO_DEPTH):0] fill_level,
  output logic                        stalled
);

  localparam int unsigned F = M_BITS - K;

  if (K < 1 || K >= M_BITS) begin : g_bad_k
    $error("rng_top: K must be between 1 and M_BITS-1");
  end

  logic [M_BITS-1:0] x;
  logic [K-1:0]      r;
  logic [F-1:0]      s;
  logic              adv;       // pipeline advances this clock
  logic [W-1:0]      lut_a, lut_b;
  logic [F-1:0]      s_q;
  logic              v1;
  logic              z_valid;
  logic [W-1:0]      z;
  logic              fifo_full, fifo_empty;

  assign r = x[M_BITS-1 -: K];
  assign s = x[F-1:0];

  assign adv     = !(z_valid && fifo_full);
  assign stalled = !adv;

  lfsr #(.N(M_BITS), .STEPS(STEPS)) u_lfsr (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (run && adv),
    .seed_we (seed_we),
    .seed    (seed),
    .x       (x)
  );

  cdf_lut #(.K(K), .W(W)) u_lut (
    .clk   (clk),
    .we    (lut_we),
    .waddr (lut_waddr),
    .wdata (lut_wdata),
    .re    (adv),
    .raddr (r),
    .a     (lut_a),
    .b     (lut_b)
  );

  // S and the valid bit travel alongside the table read.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
    end else if (adv) begin
      v1 <= run && !seed_we;
    end
  end

  always_ff @(posedge clk) begin
    if (adv) s_q <= s;
  end

  interp_unit #(.W(W), .F(F)) u_interp (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (adv),
    .in_valid  (v1),
    .a         (lut_a),
    .b         (lut_b),
    .s         (s_q),
    .out_valid (z_valid),
    .z         (z)
  );

  rng_fifo #(.W(W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (z_valid && !fifo_full),
    .din   (z),
    .full  (fifo_full),
    .pop   (rd_en && !fifo_empty),
    .dout  (rd_data),
    .empty (fifo_empty),
    .count (fill_level)
  );

  assign rd_valid = !fifo_empty;

endmodule
