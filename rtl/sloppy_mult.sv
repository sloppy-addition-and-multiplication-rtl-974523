// sloppy_mult: N x N two's complement radix-4 multiplier whose KS
// least-significant multiplier digits are sloppy.
//
// Three steps: pp_array generates the N/2 partial products (the KS low ones by
// the sloppy rule "nonzero digit -> 2x", the rest by error-free Booth
// recoding), csa_reducer folds them to two operands without carry
// propagation, and a final sloppy_adder with KA carry-free bits adds the two.
// With N=8 and KS=2 the mean absolute error over all 2^16 operand pairs is
// about 144 and never exceeds 5*128 = 640.
//
// Interface: x, y (N bits, signed), p (2N bits, signed product, exact modulo
// the sloppy error). Purely combinational.
//
// N=8 and KS=2 are the document's. The final adder is exact by default
// (KA=0): the multiplier's error is quoted without it, and an exact final adder
// keeps the product's error that of the sloppy digits alone.
module sloppy_mult #(
  parameter int unsigned N      = sloppy_pkg::MUL_N,
  parameter int unsigned KS     = sloppy_pkg::MUL_KS,
  parameter int unsigned KA     = 0,
  parameter bit          LOW_OR = 1'b1
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);

  localparam int unsigned D = N / 2;

  logic [D:0][2*N-1:0] rows;
  logic [2*N-1:0]      sum, carry;
  logic                cout_unused;

  pp_array #(.N(N), .KS(KS), .W(2*N)) u_pp (
    .x    (x),
    .y    (y),
    .rows (rows)
  );

  csa_reducer #(.ROWS(D+1), .W(2*N)) u_red (
    .rows  (rows),
    .sum   (sum),
    .carry (carry)
  );

  sloppy_adder #(.N(2*N), .K(KA), .LOW_OR(LOW_OR)) u_cpa (
    .a    (sum),
    .b    (carry),
    .s    (p),
    .cout (cout_unused)
  );

endmodule
