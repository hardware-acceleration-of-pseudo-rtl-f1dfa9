// rng_fifo: buffer of generated random numbers.
//
// The host reads random numbers from this buffer while the generator keeps
// filling it, so generation runs in parallel with the application that
// consumes the numbers. A buffer between generator and host is part of the
// reference design; its depth and protocol are not given there and are
// this design's choice.
//
// How it works: a circular buffer of DEPTH words (DEPTH a power of two)
// with read and write pointers one bit wider than the address, so that
// full and empty are told apart by the extra bit.
//
// Interface/timing: show-ahead read. dout is the oldest word whenever
// empty is low; pop removes it at the clock edge. push writes din at the
// clock edge. push while full and pop while empty are ignored (and flagged
// by assertions). count is the number of stored words.
module rng_fifo #(
  parameter int unsigned W     = rng_pkg::W_BITS_DEF,
  parameter int unsigned DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  logic [W-1:0]           din,
  output logic                   full,
  input  logic                   pop,
  output logic [W-1:0]           dout,
  output logic                   empty,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  if (DEPTH < 2 || (1 << AW) != DEPTH) begin : g_bad_depth
    $error("rng_fifo: DEPTH must be a power of two, at least 2");
  end

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr, rptr;
  logic         do_push, do_pop;

  assign count   = wptr - rptr;
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rptr[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= din;
  end

  // Rules of the buffer protocol.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("rng_fifo: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("rng_fifo: pop while empty");

endmodule
