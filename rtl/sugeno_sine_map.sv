// sugeno_sine_map: one iteration of the sine map x' = eta * sin(pi x) in
// posit<32,2>, with the sine replaced by a Sugeno fuzzy inference.
//
// On [0, pi] only two rules fire.  With v = pi*x the memberships are
// w1 = 1 - v/pi and w2 = v/pi (they sum to 1, so no division by the sum is
// needed) and the rule outputs are z1 = (2/pi) v and z2 = 2 - (2/pi) v, so
//   x' = eta * (w1 z1 + w2 z2).
// The rule set, memberships and outputs are the document's.  This unit
// evaluates them with one posit multiplier and one posit adder, one
// operation (or one multiply and one add side by side) per clock cycle, each
// result rounded to posit<32,2>; 1/pi multiplies rather than divides.  That
// operation schedule is this design's choice:
//   cycle 1  a  = pi * x
//   cycle 2  w2 = a * (1/pi)
//   cycle 3  z1 = (2/pi) * a          w1 = 1 - w2
//   cycle 4  p1 = w1 * z1             z2 = 2 - z1
//   cycle 5  p2 = w2 * z2
//   cycle 6  s  = p1 + p2
//   cycle 7  y  = eta * s
// Interface: start_i for one cycle while idle (busy_o low) captures x_i and
// eta_i; done_o is high for one cycle, 8 cycles after the start cycle, with
// the result on y_o (held until the next result).  Asynchronous active-low
// reset.
module sugeno_sine_map
  import posit_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start_i,
  input  posit_t x_i,      // x_i in [0, 1]
  input  posit_t eta_i,    // control parameter eta in [0, 1]
  output posit_t y_o,
  output logic   busy_o,
  output logic   done_o
);
  typedef enum logic [2:0] {
    ST_IDLE, ST_A, ST_W2, ST_Z1W1, ST_P1Z2, ST_P2, ST_SUM, ST_ETA
  } state_t;

  state_t state_q;
  posit_t x_q, eta_q, a_q, w1_q, w2_q, z1_q, z2_q, p1_q, p2_q, s_q, y_q;
  logic   done_q;
  posit_t mul_a, mul_b, mul_p, add_a, add_b, add_s;

  posit_mul u_mul (.a_i(mul_a), .b_i(mul_b), .p_o(mul_p));
  posit_add u_add (.a_i(add_a), .b_i(add_b), .s_o(add_s));

  always_comb begin
    mul_a = x_q;  mul_b = P_PI;
    add_a = p1_q; add_b = p2_q;
    unique case (state_q)
      ST_A:    begin mul_a = x_q;  mul_b = P_PI;          end
      ST_W2:   begin mul_a = a_q;  mul_b = P_INV_PI;      end
      ST_Z1W1: begin mul_a = a_q;  mul_b = P_TWO_OVER_PI;
                     add_a = P_ONE; add_b = -w2_q;         end
      ST_P1Z2: begin mul_a = w1_q; mul_b = z1_q;
                     add_a = P_TWO; add_b = -z1_q;         end
      ST_P2:   begin mul_a = w2_q; mul_b = z2_q;          end
      ST_SUM:  begin add_a = p1_q; add_b = p2_q;          end
      ST_ETA:  begin mul_a = eta_q; mul_b = s_q;          end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      {x_q, eta_q, a_q, w1_q, w2_q, z1_q, z2_q, p1_q, p2_q, s_q, y_q} <= '0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (state_q)
        ST_IDLE: if (start_i) begin
                   x_q     <= x_i;
                   eta_q   <= eta_i;
                   state_q <= ST_A;
                 end
        ST_A:    begin a_q  <= mul_p;                  state_q <= ST_W2;   end
        ST_W2:   begin w2_q <= mul_p;                  state_q <= ST_Z1W1; end
        ST_Z1W1: begin z1_q <= mul_p; w1_q <= add_s;   state_q <= ST_P1Z2; end
        ST_P1Z2: begin p1_q <= mul_p; z2_q <= add_s;   state_q <= ST_P2;   end
        ST_P2:   begin p2_q <= mul_p;                  state_q <= ST_SUM;  end
        ST_SUM:  begin s_q  <= add_s;                  state_q <= ST_ETA;  end
        ST_ETA:  begin y_q  <= mul_p; done_q <= 1'b1;  state_q <= ST_IDLE; end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  assign y_o    = y_q;
  assign busy_o = (state_q != ST_IDLE);
  assign done_o = done_q;

  // a start request while busy would be lost
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    start_i |-> !busy_o);
endmodule
