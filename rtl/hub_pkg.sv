// hub_pkg: word length and helper types shared by the HUB (half-unit-biased)
// fixed-point datapath of the bi-coupled tent/Bernoulli generator.
//
// A HUB word of W explicit bits b[W-1:0], all fractional (no sign, no integer
// bit), stands for the value (b + 1/2) * 2^-W: every word carries an implicit
// least significant bit set to one.  Arithmetic follows the usual HUB rule:
// append the implicit '1', operate in ordinary binary, then truncate back to W
// explicit bits, which rounds to the nearest HUB number.
// The 32-bit word with 0 integer and 32 fractional bits follows the document.
package hub_pkg;
  parameter int unsigned HUB_W = 32;
  typedef logic [HUB_W-1:0] hub_word_t;
endpackage
