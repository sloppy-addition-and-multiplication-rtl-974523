// sloppy_pkg: shared types and default sizes of the sloppy adder, the sloppy
// radix-4 multiplier and the sloppy multiply-accumulate unit.
//
// The default sizes are those of the evaluated configurations: an 8-bit adder
// with 4 carry-free low bits, an 8x8 multiplier with 2 sloppy radix-4 digits,
// and a 12x12 multiplier with 3 sloppy digits feeding a 24-bit accumulator
// adder with 8 carry-free low bits. The radix-4 digit encoding (one/two/neg
// select lines) is this design's own choice.
package sloppy_pkg;

  // Section 2 example adder
  localparam int unsigned ADD_N  = 8;
  localparam int unsigned ADD_K  = 4;
  // Section 3 multiplier
  localparam int unsigned MUL_N  = 8;
  localparam int unsigned MUL_KS = 2;
  // Section 4 multiply-accumulate unit
  localparam int unsigned MAC_N  = 12;
  localparam int unsigned MAC_W  = 24;
  localparam int unsigned MAC_KM = 3;
  localparam int unsigned MAC_KA = 8;

  // Select lines of one radix-4 partial product: PP = (neg ? -1 : 1) *
  // (one ? x : two ? 2x : 0).
  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } r4_sel_t;

  // Error-free radix-4 (modified Booth) recoding of the bit triplet
  // {y[2k+1], y[2k], y[2k-1]} into a digit in {-2,-1,0,1,2}.
  function automatic r4_sel_t booth_recode(input logic [2:0] t);
    r4_sel_t s;
    s.one = t[1] ^ t[0];
    s.two = (t[2] & ~t[1] & ~t[0]) | (~t[2] & t[1] & t[0]);
    s.neg = t[2] & ~(t[1] & t[0]);
    return s;
  endfunction

  // Sloppy recoding (Table 3): the plain radix-4 digit {y[2k+1], y[2k]} in
  // {0,1,2,3} is replaced by 2 whenever it is nonzero.
  // The result is the "two" select line; "one" and "neg" are always 0.
  function automatic logic sloppy_recode(input logic [1:0] d);
    return d[1] | d[0];
  endfunction

endpackage
