// sloppy_adder: N-bit adder that does not propagate carries through its K
// least-significant bits.
//
// Bits below position K are formed bit by bit with no carry: the OR of the two
// operand bits (LOW_OR=1) or their XOR (LOW_OR=0). No carry leaves that part, so
// bits K..N-1 are a plain ripple-carry sum with a carry-in of 0. Dropping the
// low carries loses a_i&b_i*2^(i+1) with XOR, and half of that with OR; for
// N=8, K=4 and all operand pairs the mean error is 7.5 (XOR) or 3.75 (OR).
// K=0 gives an exact ripple-carry adder.
//
// Interface: a, b (N bits, read as unsigned or two's complement alike), s (N
// bits), cout (carry out of bit N-1). Purely combinational.
//
// The algorithm, both low-part variants and the sizes N=8, K=4 follow the
// document. Choosing OR as the default low-part function (it halves the error)
// and the carry-out port are this design's choices.
module sloppy_adder #(
  parameter int unsigned N      = sloppy_pkg::ADD_N,
  parameter int unsigned K      = sloppy_pkg::ADD_K,
  parameter bit          LOW_OR = 1'b1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         cout
);

  initial begin
    assert (K <= N) else $error("sloppy_adder: K must not exceed N");
  end

  logic [N:0] c;  // c[i] is the carry into bit i

  always_comb begin
    c[0] = 1'b0;
    for (int i = 0; i < int'(N); i++) begin
      if (i < int'(K)) begin
        s[i]   = LOW_OR ? (a[i] | b[i]) : (a[i] ^ b[i]);
        c[i+1] = 1'b0;
      end else begin
        s[i]   = a[i] ^ b[i] ^ c[i];
        c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
      end
    end
    cout = c[N];
  end

endmodule
