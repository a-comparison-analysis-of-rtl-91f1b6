// sine_prng: the complete sine-map generator, a posit<32,2> sine map (with
// the Sugeno sine approximation) perturbed by an LFSR.
//
// Each iteration, with v the new sine-map value (a posit word) and out_prev
// the previous output of the scheme:
//   low  = v[26:0] ^ lfsr[26:0]                 27 LSBs perturbed
//   mask = out_prev[4:0] ^ v[4:0]
//   out  = {v[31:27] ^ mask, low}                all 32 bits used as output
//   x    = {v[31:27], low}                      fed back to the sine map
// The five MSBs (sign and the top of the regime) are not fed back perturbed,
// so the state stays a positive posit below one, inside the map's domain.
// This structure and the 27/5 split follow the document.  The LFSR steps once
// per iteration (this design's choice, as are its polynomial and seed).
//
// Timing: after reset the generator runs freely.  The first iteration starts
// from x0_i, which must be stable until the first output; eta_i is sampled
// at the start of each iteration.  An iteration takes 9 clock
// cycles (8 in the sine map, 1 to restart); valid_o is high for one cycle
// with each new out_o.  Asynchronous active-low reset.
module sine_prng
  import posit_pkg::*;
#(
  parameter int unsigned  NPERT     = 27,            // perturbed LSBs
  parameter int unsigned  NMASK     = 5,             // masked MSBs
  parameter logic [31:0]  LFSR_SEED = 32'hACE1_2468
) (
  input  logic   clk,
  input  logic   rst_n,
  input  posit_t x0_i,      // initial condition, posit in [0, 1]
  input  posit_t eta_i,     // control parameter, posit in [0, 1]
  output posit_t out_o,     // generator output, 32 bits
  output logic   valid_o
);
  logic   init_q;           // 0 until the first iteration is done
  logic   start_q;          // start request to the sine map
  posit_t x_q;              // fed-back state
  posit_t out_q;
  logic   valid_q;
  posit_t v;                // sine map result
  logic   sm_busy, sm_done;
  logic [31:0] lfsr_q;
  logic [NPERT-1:0] low;
  logic [NMASK-1:0] mask;

  sugeno_sine_map u_map (
    .clk, .rst_n,
    .start_i (start_q),
    .x_i     (init_q ? x_q : x0_i),
    .eta_i,
    .y_o     (v),
    .busy_o  (sm_busy),
    .done_o  (sm_done)
  );

  lfsr #(.N(32), .SEED(LFSR_SEED)) u_lfsr (
    .clk, .rst_n, .step_i(sm_done), .q_o(lfsr_q)
  );

  assign low  = v[NPERT-1:0] ^ lfsr_q[NPERT-1:0];
  assign mask = out_q[NMASK-1:0] ^ v[NMASK-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_q  <= 1'b0;
      start_q <= 1'b1;
      x_q     <= '0;
      out_q   <= '0;
      valid_q <= 1'b0;
    end else begin
      valid_q <= sm_done;
      start_q <= sm_done;
      if (sm_done) begin
        x_q    <= {v[31:NPERT], low};
        out_q  <= {v[31:NPERT], low} ^ {mask, {(32-NMASK){1'b0}}};
        init_q <= 1'b1;
      end
    end
  end

  assign out_o   = out_q;
  assign valid_o = valid_q;

  if (NPERT + NMASK > 32) begin : g_bad_split
    $error("sine_prng: NPERT + NMASK must not exceed 32");
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start_q |-> !sm_busy);
endmodule
