// hub_ref_pkg: arithmetic reference model of the 32-bit HUB generator for the
// testbenches.  It works on integers that count units of 2^-33 (so that a
// HUB word b stands for 2b+1) and on reals, not on the bit slices the RTL
// uses, so that the checks do not repeat the RTL's own reasoning.
package hub_ref_pkg;
  localparam longint unsigned ULP  = 64'd1 << 32;    // 1.0 in units of 2^-32

  // HUB word -> real value
  function automatic real hub_real(input logic [31:0] b);
    return (real'(b) + 0.5) / 4294967296.0;
  endfunction

  // tent map: mu = 1 + (m + 1/2) 2^-32, minuend of 1 - x is 1 + 2^-33
  function automatic logic [31:0] tent_ref(input logic [31:0] x, input logic [31:0] m);
    logic [127:0] mu2, op2, p;
    longint unsigned xv;
    mu2 = 128'(2 * ULP + 2 * longint'(m) + 1);          // mu in units 2^-33
    xv  = longint'(x);
    if (xv < ULP / 2) op2 = 128'(2 * xv + 1);             // x in units 2^-33
    else              op2 = 128'(2 * (ULP - xv) + 1);     // truncated (1+2^-33)-x, re-extended
    p = mu2 * op2;                                        // units 2^-66
    return 32'((p / (128'(1) << 34)) % 128'(ULP));
  endfunction

  function automatic logic [31:0] bern_ref(input logic [31:0] x);
    longint unsigned v;
    v = 2 * longint'(x) + 1;                   // 2x with new LSB 1
    if (longint'(x) >= ULP / 2) v = v - ULP;    // 2x - 1
    return 32'(v);
  endfunction

  function automatic logic [31:0] mbt_ref(input logic [31:0] x);
    logic [31:0] r;
    r = 0;
    // low half: bit i of x goes to position 15-i; high half XORs it
    for (int i = 0; i < 16; i++) begin
      if (x[i]) r = r + (32'd1 << (15 - i));
    end
    return ((x / 65536) ^ (r % 65536)) * 65536 + r;
  endfunction

  function automatic logic [31:0] add_ref(input logic [31:0] a, input logic [31:0] b);
    return 32'((longint'(a) + longint'(b) + 1) % ULP);
  endfunction

  // one clock of the generator: state {t, x}; sel_x0 in the first cycle
  function automatic logic [63:0] step_ref(input logic [63:0] st, input logic [31:0] x0,
                                           input bit first);
    logic [31:0] t, x, s, b, m;
    t = st[63:32]; x = st[31:0];
    s = first ? x0 : x;
    b = bern_ref(t);
    m = 32'hE000_0000 + (b % 32'h2000_0000);     // top three explicit bits 111
    return {tent_ref(s, m), add_ref(mbt_ref(t), b)};
  endfunction
endpackage
