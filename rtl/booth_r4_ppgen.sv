// booth_r4_ppgen: error-free radix-4 recoder plus partial-product generator for
// one digit of the multiplier y.
//
// The bit triplet {y[2k+1], y[2k], y[2k-1]} is recoded into a signed digit in
// {-2,-1,0,1,2} (modified Booth recoding), so that no 3x multiple and no carry
// propagation is needed. The digit's magnitude selects x or 2x from the
// N-bit two's complement multiplicand; a negative digit inverts that multiple
// and raises `neg`, which the caller adds as +1 at the digit's weight to
// complete the two's complement negation.
//
// Interface: x (N bits, signed), trip (the triplet), pp (N+1 bits, signed, the
// possibly inverted multiple), neg. Purely combinational; the digit's weight
// 4^k is applied by the caller.
//
// The recoding scheme follows the document's error-free rec+PPgen; the gate
// structure and the separate negation bit are this design's choices.
module booth_r4_ppgen #(
  parameter int unsigned N = sloppy_pkg::MUL_N
) (
  input  logic [N-1:0] x,
  input  logic [2:0]   trip,
  output logic [N:0]   pp,
  output logic         neg
);
  import sloppy_pkg::*;

  r4_sel_t    sel;
  logic [N:0] mag;

  always_comb begin
    sel = booth_recode(trip);
    mag = ({(N+1){sel.one}} & {x[N-1], x}) |
          ({(N+1){sel.two}} & {x, 1'b0});
    pp  = sel.neg ? ~mag : mag;
    neg = sel.neg;
  end

endmodule
