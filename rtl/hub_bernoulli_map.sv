// hub_bernoulli_map: one iteration of the Bernoulli shift map in HUB fixed point.
//
//   x' = 2x       if x < 1/2
//   x' = 2x - 1   if x >= 1/2
//
// HUB cannot hold the constant 2 exactly, so, as the document describes, the
// doubling is a one-bit left shift with the newly freed explicit LSB set to
// '1'.  The shifted value keeps the old MSB as an integer bit; the MSB of x
// selects between 2x and 2x - 1, and subtracting 1 clears that integer bit.
// The result is therefore the W-bit word {x[W-2:0], 1}.  Repeated on its own
// the map falls into the fixed point 11..1 (1 - 1/2 ulp) within W
// iterations, which is the degradation the coupled generator avoids.
// Purely combinational.
module hub_bernoulli_map #(
  parameter int unsigned W = hub_pkg::HUB_W
) (
  input  logic [W-1:0] x_i,
  output logic [W-1:0] x_o
);
  logic [W:0] twice;       // 2x, one integer bit and W explicit fraction bits
  logic [W:0] twice_m1;    // 2x - 1

  always_comb begin
    twice    = {x_i, 1'b1};
    twice_m1 = twice - {1'b1, {W{1'b0}}};
    x_o      = x_i[W-1] ? twice_m1[W-1:0] : twice[W-1:0];
  end
endmodule
