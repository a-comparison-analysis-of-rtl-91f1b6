// posit_pkg: types, constants and the decode/encode functions shared by the
// posit<32,2> arithmetic units of the sine-map generator.
//
// A posit<32,2> word is: sign, regime (a run of equal bits ended by the
// opposite bit), up to 2 exponent bits, then the fraction.  Its value is
// (-1)^s * 16^k * 2^e * 1.f, with k = m-1 for a run of m ones and k = -m for a
// run of m zeros; negative words are stored as the two's complement of the
// positive one.  All zeros is 0 and 1000..0 is NaR (not a real).
// posit_decode turns a word into sign, scale = 4k + e and a 28-bit significand
// 1.f; posit_encode does the reverse with round-to-nearest-even on the bit
// string and saturation at minpos / maxpos (a posit never rounds to 0 or NaR).
package posit_pkg;
  localparam int unsigned PW = 32;     // word length n
  localparam int unsigned ES = 2;      // exponent bits es
  localparam int unsigned SIGW = 28;   // hidden bit + 27 fraction bits

  typedef logic [PW-1:0] posit_t;

  typedef struct packed {
    logic                   zero;
    logic                   nar;
    logic                   sign;
    logic signed [11:0]     scale;     // 4k + e, in [-120, 120]
    logic [SIGW-1:0]        sig;       // 1.f, hidden bit at SIGW-1
  } posit_dec_t;

  // posit<32,2> encodings of the constants the sine map needs, each the
  // nearest posit to the real number
  localparam posit_t P_ONE         = 32'h4000_0000;   // 1
  localparam posit_t P_TWO         = 32'h4800_0000;   // 2
  localparam posit_t P_PI          = 32'h4C90_FDAA;   // pi
  localparam posit_t P_INV_PI      = 32'h322F_9837;   // 1/pi
  localparam posit_t P_TWO_OVER_PI = 32'h3A2F_9837;   // 2/pi
  localparam posit_t P_ETA_0962    = 32'h3F64_5A1D;   // 0.962
  localparam posit_t P_NAR         = 32'h8000_0000;

  function automatic posit_dec_t posit_decode(input posit_t p);
    posit_dec_t d;
    logic [PW-1:0] v;
    logic [PW-1:0] t;
    logic          r0;
    logic          run;
    int            m;
    int            k;
    d.zero  = (p == '0);
    d.nar   = (p == P_NAR);
    d.sign  = p[PW-1];
    v       = p[PW-1] ? -p : p;
    r0      = v[PW-2];
    m       = 0;
    run     = 1'b1;
    for (int i = PW - 2; i >= 0; i--) begin
      if (run && v[i] == r0) m++;
      else run = 1'b0;
    end
    k       = r0 ? m - 1 : -m;
    // drop the regime and its terminating bit; what follows is e then f
    t       = {v[PW-2:0], 1'b0} << (m + 1);
    d.scale = 12'(4 * k) + 12'(t[PW-1 -: ES]);
    d.sig   = {1'b1, t[PW-1-ES -: SIGW-1]};
    return d;
  endfunction

  // sign, scale = 4k + e, frac = the bits after the hidden one (MSB first),
  // sticky = OR of anything below frac
  function automatic posit_t posit_encode(input logic sign,
                                          input logic signed [11:0] scale,
                                          input logic [63:0] frac,
                                          input logic sticky);
    logic signed [11:0] k;
    logic [ES-1:0]      e;
    logic [127:0]       base;
    logic [127:0]       shifted;
    logic [PW-2:0]      body;
    logic               guard;
    logic               st;
    posit_t             p;
    k = scale >>> ES;
    e = scale[ES-1:0];
    if (k >= 12'sd30) begin
      body = '1;                                   // maxpos
    end else if (k < -12'sd30) begin
      body = (PW-1)'(1);                           // minpos
    end else begin
      if (k >= 0) begin
        base    = {2'b10, e, frac, 60'b0};
        shifted = 128'($signed(base) >>> k);       // k+1 ones, then 0
      end else begin
        base    = {2'b01, e, frac, 60'b0};
        shifted = base >> (-k - 1);                // -k zeros, then 1
      end
      body  = shifted[127 -: PW-1];
      guard = shifted[127-(PW-1)];
      st    = (|shifted[127-PW:0]) | sticky;
      if (guard && (st || body[0])) body = body + 1'b1;
    end
    p = {1'b0, body};
    return sign ? -p : p;
  endfunction
endpackage
