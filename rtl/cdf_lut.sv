// cdf_lut: inverse cumulative distribution table.
//
// Holds 2^K+1 entries of W bits: entry i is the inverse CDF of the target
// distribution sampled at i/2^K, in the host's fixed-point format. The
// generator reads two neighbouring entries at once, A = table[raddr] and
// B = table[raddr+1]; the extra entry 2^K exists so that the last index
// still has an upper neighbour. The table size and the two-value read
// follow the reference design, which keeps the table in a separate memory
// so that the host can load any distribution.
//
// This design's own choices: the table is a plain array with one write port
// (for loading by the host) and two synchronous read ports.
//
// Interface/timing: a write (we, waddr, wdata) takes effect at the clock
// edge. When re is high, a and b are registered at the clock edge from
// raddr and raddr+1, so they appear one cycle after the address; when re is
// low they hold. Contents are not reset: the host must load the table
// before reading from it.
module cdf_lut #(
  parameter int unsigned K = rng_pkg::K_BITS_DEF,
  parameter int unsigned W = rng_pkg::W_BITS_DEF
) (
  input  logic         clk,
  input  logic         we,
  input  logic [K:0]   waddr,
  input  logic [W-1:0] wdata,
  input  logic         re,
  input  logic [K-1:0] raddr,
  output logic [W-1:0] a,
  output logic [W-1:0] b
);

  localparam int unsigned ENTRIES = (1 << K) + 1;

  logic [W-1:0] mem [ENTRIES];

  logic [K:0] addr_a, addr_b;
  assign addr_a = {1'b0, raddr};
  assign addr_b = addr_a + 1'b1;

  always_ff @(posedge clk) begin
    if (we && waddr < (K+1)'(ENTRIES)) begin
      mem[waddr] <= wdata;
    end
    if (re) begin
      a <= mem[addr_a];
      b <= mem[addr_b];
    end
  end

endmodule
