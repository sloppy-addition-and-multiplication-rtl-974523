// sloppy_mac: multiply-accumulate unit built from a sloppy radix-4 multiplier
// and a sloppy adder, meant for a direct (sum-of-products) IDCT.
//
// Each enabled cycle computes acc <= acc + x*y (or acc <= x*y when clr is
// high). The N/2 partial products of x*y (KM sloppy digits) and the
// accumulator form N/2+2 rows that a carry-save array reduces to two
// operands; a W-bit sloppy adder with KA carry-free low bits then produces
// the new accumulator. One multiply-accumulate per clock cycle.
//
// Interface: clk, rst_n (asynchronous, active low, clears acc), en (perform an
// operation this cycle), clr (start a new sum: the old acc is not added), x, y
// (N bits, signed), acc (W bits, signed, registered), acc_valid (high the
// cycle after an enabled operation). Latency: the result of the operation in
// cycle t is on acc in cycle t+1.
//
// The sizes (12x12 multiplier, 24-bit adder, KM=3 sloppy digits, KA=8
// carry-free bits) are the document's. Merging the accumulator into the
// carry-save array ahead of a single adder, the control signals and the reset
// are this design's choices. The accumulator wraps modulo 2^W.
module sloppy_mac #(
  parameter int unsigned N      = sloppy_pkg::MAC_N,
  parameter int unsigned W      = sloppy_pkg::MAC_W,
  parameter int unsigned KM     = sloppy_pkg::MAC_KM,
  parameter int unsigned KA     = sloppy_pkg::MAC_KA,
  parameter bit          LOW_OR = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clr,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [W-1:0] acc,
  output logic         acc_valid
);

  localparam int unsigned D = N / 2;

  logic [D:0][W-1:0]   pp_rows;
  logic [D+1:0][W-1:0] rows;
  logic [W-1:0]        sum, carry, acc_d;
  logic                cout_unused;

  pp_array #(.N(N), .KS(KM), .W(W)) u_pp (
    .x    (x),
    .y    (y),
    .rows (pp_rows)
  );

  always_comb begin
    rows[D:0]  = pp_rows;
    rows[D+1]  = clr ? '0 : acc;
  end

  csa_reducer #(.ROWS(D+2), .W(W)) u_red (
    .rows  (rows),
    .sum   (sum),
    .carry (carry)
  );

  sloppy_adder #(.N(W), .K(KA), .LOW_OR(LOW_OR)) u_add (
    .a    (sum),
    .b    (carry),
    .s    (acc_d),
    .cout (cout_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      acc_valid <= 1'b0;
    end else begin
      acc_valid <= en;
      if (en) acc <= acc_d;
    end
  end

endmodule
