// posit_add: posit<32,2> adder, round to nearest even.
//
// The operand of larger magnitude sets the scale; the other significand is
// shifted right by the scale difference into a 64-bit field with 35 bits below
// the significand, and the bits shifted out are OR-ed into its LSB (sticky).
// The significands are added or subtracted, the result is normalised with a
// leading-zero count and re-encoded with a single rounding.  An exact
// cancellation gives zero, NaR in gives NaR.  Subtraction is an addition of
// the negated word (posit negation is the two's complement).  Combinational.
module posit_add
  import posit_pkg::*;
(
  input  posit_t a_i,
  input  posit_t b_i,
  output posit_t s_o
);
  posit_dec_t          da, db, hi, lo;
  logic                a_ge_b;
  logic [11:0]         diff;
  logic [63:0]         m_hi, m_lo, m_shift, sum;
  logic                sticky;
  int                  lz;
  logic signed [11:0]  scale;
  logic [63:0]         frac;

  always_comb begin
    da = posit_decode(a_i);
    db = posit_decode(b_i);
    a_ge_b = ($signed(da.scale) > $signed(db.scale)) ||
             (da.scale == db.scale && da.sig >= db.sig);
    if (a_ge_b) begin
      hi = da; lo = db;
    end else begin
      hi = db; lo = da;
    end
    diff    = hi.scale - lo.scale;
    m_hi   = {1'b0, hi.sig, {(63-SIGW){1'b0}}};
    m_lo = {1'b0, lo.sig, {(63-SIGW){1'b0}}};
    if (diff >= 12'd64) begin
      m_shift = '0;
      sticky  = 1'b1;
    end else begin
      m_shift = m_lo >> diff;
      sticky  = |(m_lo & ((64'd1 << diff) - 64'd1));
    end
    m_shift[0] = m_shift[0] | sticky;
    if (hi.sign == lo.sign) sum = m_hi + m_shift;
    else                        sum = m_hi - m_shift;
    lz = 64;
    for (int i = 0; i < 64; i++) if (sum[i]) lz = 63 - i;
    scale = hi.scale + 12'(1 - lz);        // hidden bit sits at 62 before normalising
    frac  = (lz < 63) ? sum << (lz + 1) : '0;
    if (da.nar || db.nar) s_o = P_NAR;
    else if (da.zero)     s_o = b_i;
    else if (db.zero)     s_o = a_i;
    else if (sum == '0)   s_o = '0;
    else                  s_o = posit_encode(hi.sign, scale, frac, 1'b0);
  end
endmodule
