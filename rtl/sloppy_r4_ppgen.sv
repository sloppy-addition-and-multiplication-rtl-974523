// sloppy_r4_ppgen: sloppy recoder plus partial-product generator for one of
// the least-significant digits of the multiplier y.
//
// The plain radix-4 digit {y[2k+1], y[2k]} takes the values 0..3. Instead of
// recoding it, every nonzero digit is replaced by 2, so the partial product is
// either 0 or 2x: the recoder shrinks to one OR gate and the generator to an
// AND row, with no negation. The error of the digit is +x (digit 1), 0 (digits
// 0 and 2) or -x (digit 3), times 4^k.
//
// Interface: x (N bits, signed), dig (the two bits of the digit), pp (N+1 bits,
// signed, 0 or 2x). Purely combinational; the weight 4^k is applied by the
// caller.
//
// The digit mapping is the document's (its recoding table); the port layout
// is this design's own.
module sloppy_r4_ppgen #(
  parameter int unsigned N = sloppy_pkg::MUL_N
) (
  input  logic [N-1:0] x,
  input  logic [1:0]   dig,
  output logic [N:0]   pp
);
  import sloppy_pkg::*;

  logic two;

  always_comb begin
    two = sloppy_recode(dig);
    pp  = {(N+1){two}} & {x, 1'b0};
  end

endmodule
