// interp_unit: linear interpolation between two table entries.
//
// Computes Z = A + ((S * (B - A)) >> F), where A and B are neighbouring
// inverse-CDF table entries and S is an F-bit fraction (S / 2^F is the
// offset between them). The division by 2^F is a right shift because its
// remainder does not matter. One subtraction, one multiplication and one
// addition, as in the reference design.
//
// This design's own choices:
//   * Two pipeline stages: stage 1 forms B-A and the product, stage 2 shifts
//     and adds A.
//   * B-A is taken as a signed (W+1)-bit value and the shift is arithmetic,
//     so a table that decreases (e.g. -ln(u)) interpolates as well as an
//     increasing one. The result always lies between A and B and fits W
//     bits.
//
// Interface/timing: when en is high the pipeline advances; z/out_valid
// appear two enabled clocks after a/b/s/in_valid. When en is low every
// register holds. Synchronous valid bits are cleared by rst_n.
module interp_unit #(
  parameter int unsigned W = rng_pkg::W_BITS_DEF,
  parameter int unsigned F = rng_pkg::M_BITS_DEF - rng_pkg::K_BITS_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         in_valid,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [F-1:0] s,
  output logic         out_valid,
  output logic [W-1:0] z
);

  localparam int unsigned PW = W + F + 2;  // signed product width

  logic signed [W:0]    diff;
  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] prod_q;
  logic [W-1:0]         a_q;
  logic                 v_q;
  logic [W-1:0]         sum;

  assign diff = $signed({1'b0, b}) - $signed({1'b0, a});
  assign prod = PW'(diff) * $signed(PW'({1'b0, s}));

  // The true sum lies between A and B, so W-bit modular arithmetic is exact.
  always_comb begin
    sum = a_q + W'(prod_q >>> F);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
    end else if (en) begin
      v_q       <= in_valid;
      out_valid <= v_q;
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      prod_q <= prod;
      a_q    <= a;
      z      <= sum;
    end
  end

endmodule
