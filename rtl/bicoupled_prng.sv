// bicoupled_prng: the Bi-HUB pseudorandom number generator, a tent map and a
// Bernoulli map coupled in both directions, in 32-bit HUB fixed point.
//
// The loop holds two 32-bit registers, t_q (tent map output) and x_q
// (generator state and output), and advances both every clock:
//   s     = init_q ? x_q : x0_i                 initial-condition MUX
//   b     = Bernoulli(t_q)                      Bernoulli map fed by the tent map
//   mu    = 1 . MU_TOP_VAL b[W-MU_TOP-1:0]       tent parameter, in [1.75, 2)
//   t_q  <= Tent(s, mu)                         tent map driven by the Bernoulli map
//   x_q  <= MBT(t_q) + b                        HUB adder of the two sub-states
// The low W-3 explicit bits of mu come from the Bernoulli output and its top
// three explicit bits are fixed at 111, so mu stays near 2 where the tent
// map's Lyapunov exponent is high; mu is not an input.  That coupling, the
// modified bit transformation (MBT), the adder of two sub-states and the
// initial-condition MUX whose select is a flip-flop with its D input tied
// high follow the document.  Which signal feeds which block (the figure with
// the exact wiring is not reproduced in the text) is this design's reading,
// chosen so that the loop holds two 32-bit registers plus the select
// flip-flop and needs two clock cycles per iteration, as the document's
// resource and latency figures state.  The 64-bit state gives the generator
// its long period: no state repeats within 2 * 10^6 cycles from x0 ~ 0.71.
//
// Timing: after reset the generator runs freely.  A value passes through
// both registers in one iteration, so an output is produced every second
// cycle: valid_o is high for one cycle each time x_o carries a new value,
// first at the third cycle after reset (two clock edges), then every second
// cycle.  x0_i is used in the first cycle after reset only.
// Reset is asynchronous and active low and clears both registers.  The loop
// uses the 65 flip-flops the document reports (2 x 32 data bits and the MUX
// select); the one phase flip-flop behind valid_o is this design's addition.
module bicoupled_prng #(
  parameter int unsigned W          = hub_pkg::HUB_W,
  parameter int unsigned MU_TOP     = 3,         // fixed explicit MSBs of mu
  parameter logic [MU_TOP-1:0] MU_TOP_VAL = '1   // their value, 111
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] x0_i,     // initial condition x0, HUB fraction
  output logic [W-1:0] x_o,      // generated value, HUB fraction
  output logic         valid_o   // x_o holds a new value this cycle
);
  logic         init_q;      // the D flip-flop with D = 1: 0 only in the first cycle
  logic         phase_q;     // output strobe phase
  logic [W-1:0] t_q;         // registered tent map output
  logic [W-1:0] x_q;         // state / output register

  logic [W-1:0] s;           // initial-condition MUX output
  logic [W-1:0] b;           // Bernoulli map output
  logic [W-1:0] mu;          // explicit bits of the tent parameter
  logic [W-1:0] t;           // tent map output
  logic [W-1:0] t_mbt;       // MBT of the registered tent output
  logic [W-1:0] x_next;

  assign s  = init_q ? x_q : x0_i;
  assign mu = {MU_TOP_VAL, b[W-MU_TOP-1:0]};

  hub_bernoulli_map #(.W(W)) u_bern (.x_i(t_q), .x_o(b));
  hub_tent_map      #(.W(W)) u_tent (.x_i(s), .mu_i(mu), .x_o(t));
  modified_bt       #(.W(W)) u_mbt  (.x_i(t_q), .y_o(t_mbt));
  hub_adder         #(.W(W)) u_add  (.a_i(t_mbt), .b_i(b), .s_o(x_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_q  <= 1'b0;
      phase_q <= 1'b0;
      t_q     <= '0;
      x_q     <= '0;
    end else begin
      init_q  <= 1'b1;
      phase_q <= ~phase_q;
      t_q     <= t;
      x_q     <= x_next;
    end
  end

  assign x_o     = x_q;
  // phase_q is 1 after the 1st, 3rd, ... edge and 0 after the 2nd, 4th, ...:
  // x_q holds a completed iteration when init_q is set and phase_q is clear.
  assign valid_o = init_q & ~phase_q;
endmodule
