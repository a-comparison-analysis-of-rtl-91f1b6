// lfsr: Fibonacci linear feedback shift register used as the perturbation
// source of the sine-map generator.
//
// Each cycle with step_i high the register shifts left by one and the new LSB
// is the XOR of the tap bits.  The default taps, bits 32, 22, 2 and 1 of the
// polynomial x^32 + x^22 + x^2 + x + 1, give the maximal period 2^32 - 1.
// The document uses an LFSR but gives neither its length, polynomial nor
// seed; those are this design's choices.  The seed must be non-zero.
// Asynchronous active-low reset loads SEED.
module lfsr #(
  parameter int unsigned   N    = 32,
  parameter logic [N-1:0]  TAPS = 32'h8020_0003,   // bit i-1 set for tap x^i
  parameter logic [N-1:0]  SEED = 32'hACE1_2468
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step_i,
  output logic [N-1:0] q_o
);
  logic [N-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= SEED;
    else if (step_i) q <= {q[N-2:0], ^(q & TAPS)};
  end

  assign q_o = q;

  initial assert (SEED != '0) else $error("lfsr: SEED must be non-zero");
endmodule
