// tb_booth_r4_ppgen: exhaustive check of the error-free radix-4 recoder and
// partial-product generator (N=8).
//
// For every multiplicand x and every triplet t the digit is worked out as
// -2*t[2] + t[1] + t[0]; the signed value of pp plus the neg bit, taken
// modulo 2^(N+1), must equal digit*x. neg must be high exactly for a
// negative digit.
module tb_booth_r4_ppgen;
  localparam int unsigned N = 8;

  int checks = 0;
  int failures = 0;

  logic [N-1:0] x;
  logic [2:0]   trip;
  logic [N:0]   pp;
  logic         neg;

  booth_r4_ppgen #(.N(N)) dut (.x(x), .trip(trip), .pp(pp), .neg(neg));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xv, dig, want, got;
    for (int i = 0; i < (1 << N); i++) begin
      for (int t = 0; t < 8; t++) begin
        x = N'(i); trip = 3'(t);
        #1;
        xv   = (i >= (1 << (N-1))) ? i - (1 << N) : i;
        dig  = -2 * ((t >> 2) & 1) + ((t >> 1) & 1) + (t & 1);
        want = (dig * xv) & ((1 << (N+1)) - 1);
        got  = (int'(pp) + int'(neg)) & ((1 << (N+1)) - 1);
        checks++;
        if (got != want || neg != (dig < 0)) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d t=%0d pp=%0h neg=%0d", xv, t, pp, neg);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
