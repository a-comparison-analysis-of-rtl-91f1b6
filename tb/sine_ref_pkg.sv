// sine_ref_pkg: reference for the posit sine-map generator.  Every operation
// is done on reals and rounded to posit<32,2> with posit_ref_pkg::r2p, in the
// same order as the hardware schedule; the LFSR is stepped by computing the
// polynomial x^32 + x^22 + x^2 + x + 1 feedback from the bit positions.
package sine_ref_pkg;
  import posit_ref_pkg::*;

  localparam logic [31:0] C_PI   = 32'h4C90_FDAA;
  localparam logic [31:0] C_IPI  = 32'h322F_9837;
  localparam logic [31:0] C_2PI  = 32'h3A2F_9837;

  function automatic logic [31:0] mulr(input logic [31:0] a, input logic [31:0] b);
    return r2p(p2r(a) * p2r(b));
  endfunction
  function automatic logic [31:0] addr(input logic [31:0] a, input logic [31:0] b);
    return r2p(p2r(a) + p2r(b));
  endfunction

  function automatic logic [31:0] sine_map_ref(input logic [31:0] x, input logic [31:0] eta);
    logic [31:0] a, w1, w2, z1, z2, p1, p2, s;
    a  = mulr(x, C_PI);
    w2 = mulr(a, C_IPI);
    w1 = r2p(1.0 - p2r(w2));
    z1 = mulr(a, C_2PI);
    z2 = r2p(2.0 - p2r(z1));
    p1 = mulr(w1, z1);
    p2 = mulr(w2, z2);
    s  = addr(p1, p2);
    return mulr(eta, s);
  endfunction

  function automatic logic [31:0] lfsr_step(input logic [31:0] q);
    logic fb;
    fb = q[31] ^ q[21] ^ q[1] ^ q[0];
    return (q << 1) | 32'(fb);
  endfunction
endpackage
