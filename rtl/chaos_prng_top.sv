// chaos_prng_top: the two chaos-based pseudorandom number generators side by
// side, each with its own ports and sharing only the clock and reset.
//
//  * bi_*   : the Bi-HUB generator (bicoupled_prng), a tent map and a
//             Bernoulli map coupled in both directions, in 32-bit HUB fixed
//             point, with the modified bit transformation and an adder.  One
//             32-bit value every 2 cycles.
//  * sine_* : the posit<32,2> sine-map generator (sine_prng) with the Sugeno
//             fuzzy sine approximation and LFSR perturbation.  One 32-bit
//             value every 9 cycles.
// Both start from their initial conditions at reset release and then run
// freely; each *_valid_o marks a new value.  Asynchronous active-low reset.
module chaos_prng_top
  import posit_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // Bi-HUB generator
  input  logic [31:0] bi_x0_i,        // initial condition, HUB fraction
  output logic [31:0] bi_x_o,
  output logic        bi_valid_o,
  // sine-map generator
  input  posit_t      sine_x0_i,      // initial condition, posit in [0, 1]
  input  posit_t      sine_eta_i,     // eta, posit in [0, 1] (0.962 in the evaluation)
  output posit_t      sine_out_o,
  output logic        sine_valid_o
);
  bicoupled_prng u_bi (
    .clk, .rst_n,
    .x0_i    (bi_x0_i),
    .x_o     (bi_x_o),
    .valid_o (bi_valid_o)
  );

  sine_prng u_sine (
    .clk, .rst_n,
    .x0_i    (sine_x0_i),
    .eta_i   (sine_eta_i),
    .out_o   (sine_out_o),
    .valid_o (sine_valid_o)
  );
endmodule
