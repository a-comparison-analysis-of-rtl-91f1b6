// hub_tent_map: one iteration of the tent map in HUB fixed point.
//
//   x' = mu * x        if x < 1/2     (MSB of x is 0)
//   x' = mu * (1 - x)  if x >= 1/2    (MSB of x is 1)
//
// x and x' are W-bit HUB fractions (value (b + 1/2) * 2^-W).  The control
// parameter mu has an implicit integer bit '1' and an implicit LSB '1', so its
// explicit W bits m give mu = 1 + (m + 1/2) * 2^-W, always in (1, 2).
// The minuend of the subtraction is the HUB constant "1 + 1/2 ulp"; the
// subtraction adds the bit-inverted (HUB two's complement) operand.  Both the
// subtraction and the product are done on operands extended by their implicit
// '1' and then truncated to W explicit bits, as the document prescribes.
// The MSB of x drives the branch multiplexer, as in the document.
// Integer bits of the product that can only appear at the extreme corner
// mu -> 2, x -> 1/2 are discarded (the word wraps modulo 1); this is this
// design's choice, the document does not discuss it.
// Purely combinational.
module hub_tent_map #(
  parameter int unsigned W = hub_pkg::HUB_W
) (
  input  logic [W-1:0] x_i,   // x_n, HUB fraction
  input  logic [W-1:0] mu_i,  // explicit bits of mu (mu = 1.mu_i + 1/2 ulp)
  output logic [W-1:0] x_o    // x_{n+1}, HUB fraction
);
  logic [W+1:0]   one_ext;    // 1 + 1/2 ulp, extended: 1.00..01 (units 2^-(W+1))
  logic [W+1:0]   negx_ext;   // -x in two's complement, extended
  logic [W+1:0]   diff_ext;   // (1 + 1/2 ulp) - x, extended
  logic [W-1:0]   one_minus_x;
  logic [W-1:0]   operand;    // MUX output: x or (1 - x)
  logic [W+1:0]   mu_ext;     // 1.m1, W+2 bits, units 2^-(W+1)
  logic [W:0]     op_ext;
  logic [2*W+2:0] prod;       // units 2^-(2W+2)

  always_comb begin
    one_ext     = {1'b1, {W{1'b0}}, 1'b1};
    // HUB two's complement: invert every explicit bit (sign bit included),
    // keep the implicit one
    negx_ext    = {1'b1, ~x_i, 1'b1};
    // x >= 1/2 in this branch, so the difference lies in (0, 1/2]
    diff_ext    = one_ext + negx_ext;
    one_minus_x = diff_ext[W:1];
    operand     = x_i[W-1] ? one_minus_x : x_i;
    mu_ext      = {1'b1, mu_i, 1'b1};
    op_ext      = {operand, 1'b1};
    prod        = (2*W+3)'(mu_ext) * (2*W+3)'(op_ext);
    x_o         = prod[2*W+1 -: W];
  end
endmodule
