// posit_ref_pkg: real-number reference for posit<32,2> in the testbenches.
// p2r reads a word bit by bit into a real (exact: a posit32 has at most 28
// significant bits); r2p finds the scale of a real by repeated halving or
// doubling, lists its bits after the sign and rounds the 31-bit body to
// nearest even, clamping to minpos / maxpos.
package posit_ref_pkg;
  function automatic real p2r(input logic [31:0] p);
    logic [31:0] v;
    int i, m, k, e;
    real f, w, r;
    if (p == 32'h0) return 0.0;
    v = p[31] ? (~p + 1) : p;
    i = 30; m = 0;
    while (i >= 0 && v[i] == v[30]) begin m++; i--; end
    k = v[30] ? m - 1 : -m;
    i--;                                  // skip the terminating bit
    e = 0;
    for (int j = 0; j < 2; j++) begin
      e = e * 2;
      if (i >= 0) begin e += v[i]; i--; end
    end
    f = 1.0; w = 0.5;
    while (i >= 0) begin
      if (v[i]) f += w;
      w = w / 2.0; i--;
    end
    r = f * (2.0 ** (4 * k + e));
    return p[31] ? -r : r;
  endfunction

  function automatic logic [31:0] r2p(input real x);
    bit  neg;
    int  sc, k, e, n;
    real f;
    bit  bits [0:199];
    logic [31:0] body;
    bit guard, sticky;
    if (x == 0.0) return 32'h0;
    neg = (x < 0.0);
    if (neg) x = -x;
    sc = 0;
    while (x >= 2.0) begin x = x / 2.0; sc++; end
    while (x < 1.0)  begin x = x * 2.0; sc--; end
    if (sc >= 120) body = 32'h7FFF_FFFF;
    else if (sc < -120) body = 32'h1;
    else begin
      k = (sc >= 0) ? sc / 4 : -((-sc + 3) / 4);
      e = sc - 4 * k;
      n = 0;
      if (k >= 0) begin
        for (int j = 0; j <= k; j++) begin bits[n] = 1; n++; end
        bits[n] = 0; n++;
      end else begin
        for (int j = 0; j < -k; j++) begin bits[n] = 0; n++; end
        bits[n] = 1; n++;
      end
      bits[n] = e[1]; n++;
      bits[n] = e[0]; n++;
      f = x - 1.0;
      while (n < 200) begin
        f = f * 2.0;
        if (f >= 1.0) begin bits[n] = 1; f = f - 1.0; end else bits[n] = 0;
        n++;
      end
      body = 0;
      for (int j = 0; j < 31; j++) body = body * 2 + 32'(bits[j]);
      guard = bits[31];
      sticky = 0;
      for (int j = 32; j < 200; j++) sticky |= bits[j];
      if (guard && (sticky || body[0])) body++;
    end
    return neg ? (~body + 1) : body;
  endfunction
endpackage
