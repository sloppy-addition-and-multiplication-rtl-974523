// csa_reducer: carry-free reduction of ROWS operands to two (sum and carry).
//
// A chain of 3:2 carry-save adders folds one row at a time into a running
// (sum, carry) pair; no carry travels more than one bit, so the delay grows
// with the number of rows, not with W. Carries leaving bit W-1 are dropped,
// so sum + carry equals the sum of the rows modulo 2^W.
//
// Interface: rows (ROWS rows of W bits), sum, carry (W bits). Purely
// combinational.
//
// The document asks only for a carry-free reduction of the partial products
// to two operands; the linear array of 3:2 counters is this design's choice.
module csa_reducer #(
  parameter int unsigned ROWS = sloppy_pkg::MUL_N / 2 + 1,
  parameter int unsigned W    = 2 * sloppy_pkg::MUL_N
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);

  initial begin
    assert (ROWS >= 1) else $error("csa_reducer: ROWS must be at least 1");
  end

  logic [W-1:0] s_q, c_q, maj;

  always_comb begin
    s_q = rows[0];
    c_q = '0;
    maj = '0;
    for (int unsigned r = 1; r < ROWS; r++) begin
      if (r == 1) begin
        c_q = rows[1];
      end else begin
        maj = (s_q & c_q) | (s_q & rows[r]) | (c_q & rows[r]);
        s_q = s_q ^ c_q ^ rows[r];
        c_q = maj << 1;
      end
    end
    sum   = s_q;
    carry = c_q;
  end

endmodule
