// pp_array: partial-product generation of an N x N two's complement radix-4
// multiplier whose KS least-significant digits are sloppy.
//
// y is split as y = y_hi * 4^KS + y_lo, with y_lo (the low 2*KS bits) taken as
// unsigned and y_hi as signed. Each of the KS low digits goes through a
// sloppy_r4_ppgen (PP = 0 or 2x); the N/2-KS high digits are Booth-recoded by
// booth_r4_ppgen, the lowest of them with y[2KS-1] replaced by 0 since the
// sloppy digits pass no transfer upwards. Every partial product is
// sign-extended to W bits and shifted by 2k. The +1 bits that complete the
// negated Booth multiples are gathered in one extra row, so the array has
// N/2+1 rows whose sum (mod 2^W) is the sloppy product. KS=0 gives an exact
// radix-4 multiplier.
//
// Interface: x, y (N bits, signed), rows (N/2+1 rows of W bits). Purely
// combinational.
// Many row bits are constant 0 (below each row's shift, and the correction
// row between its +1 positions); synthesis removes them.
//
// The split of y into sloppy and error-free digits and the recoding follow the
// document; sign extension to full width and the separate correction row are
// this design's simple choices.
module pp_array #(
  parameter int unsigned N  = sloppy_pkg::MUL_N,
  parameter int unsigned KS = sloppy_pkg::MUL_KS,
  parameter int unsigned W  = 2 * N,
  localparam int unsigned D = N / 2
) (
  input  logic [N-1:0]        x,
  input  logic [N-1:0]        y,
  output logic [D:0][W-1:0]   rows
);

  initial begin
    assert (N % 2 == 0) else $error("pp_array: N must be even");
    assert (KS <= D)    else $error("pp_array: KS exceeds the number of digits");
    assert (W >= 2 * N) else $error("pp_array: W must hold the full product");
  end

  logic [N:0]   pp  [D];
  logic [D-1:0] neg;

  for (genvar k = 0; k < D; k++) begin : g_dig
    if (k < KS) begin : g_sloppy
      sloppy_r4_ppgen #(.N(N)) u_pp (
        .x   (x),
        .dig (y[2*k+1 -: 2]),
        .pp  (pp[k])
      );
      assign neg[k] = 1'b0;
    end else begin : g_exact
      logic [2:0] trip;
      if (k == KS) begin : g_first
        assign trip = {y[2*k+1 -: 2], 1'b0};
      end else begin : g_next
        assign trip = y[2*k+1 -: 3];
      end
      booth_r4_ppgen #(.N(N)) u_pp (
        .x    (x),
        .trip (trip),
        .pp   (pp[k]),
        .neg  (neg[k])
      );
    end
  end

  always_comb begin
    rows[D] = '0;
    for (int unsigned k = 0; k < D; k++) begin
      rows[k] = W'($signed(pp[k])) << (2 * k);
      rows[D][2*k] = neg[k];
    end
  end

endmodule
