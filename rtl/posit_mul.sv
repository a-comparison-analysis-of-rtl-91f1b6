// posit_mul: posit<32,2> multiplier, round to nearest even.
//
// Both operands are decoded to sign, scale and a 28-bit significand; the
// significands are multiplied exactly (56 bits), the product is normalised to
// one integer bit and re-encoded with a single rounding.  NaR times anything
// is NaR, zero times a real is zero.  The document computes with the posit
// arithmetic of a software library; this unit implements the same posit
// standard operation in logic.  Combinational.
module posit_mul
  import posit_pkg::*;
(
  input  posit_t a_i,
  input  posit_t b_i,
  output posit_t p_o
);
  posit_dec_t          da, db;
  logic [2*SIGW-1:0]   prod;
  logic signed [11:0]  scale;
  logic [63:0]         frac;

  always_comb begin
    da    = posit_decode(a_i);
    db    = posit_decode(b_i);
    prod  = (2*SIGW)'(da.sig) * (2*SIGW)'(db.sig);   // in [1, 4)
    scale = da.scale + db.scale;
    if (prod[2*SIGW-1]) begin
      scale = scale + 12'sd1;
      frac  = {prod[2*SIGW-2:0], {(64-2*SIGW+1){1'b0}}};
    end else begin
      frac  = {prod[2*SIGW-3:0], {(64-2*SIGW+2){1'b0}}};
    end
    if (da.nar || db.nar)        p_o = P_NAR;
    else if (da.zero || db.zero) p_o = '0;
    else                         p_o = posit_encode(da.sign ^ db.sign, scale, frac, 1'b0);
  end
endmodule
