// hub_adder: adds two W-bit HUB fractions the HUB way.
//
// Each operand is extended with its implicit LSB '1', the extended words are
// added in ordinary binary and the sum is truncated back to W explicit bits,
// which is HUB round-to-nearest.  The result explicit bits equal a + b + 1.
// The integer carry is dropped, so the sum wraps modulo 1 and stays in the
// maps' domain [0, 1); the document does not say how the adder treats an
// overflow, wrapping is this design's choice.  Combinational.
module hub_adder #(
  parameter int unsigned W = hub_pkg::HUB_W
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic [W-1:0] s_o
);
  logic [W:0]   sum_ext;   // W bits and the extended LSB; the carry is dropped

  always_comb begin
    sum_ext = {a_i, 1'b1} + {b_i, 1'b1};
    s_o     = sum_ext[W:1];
  end
endmodule
