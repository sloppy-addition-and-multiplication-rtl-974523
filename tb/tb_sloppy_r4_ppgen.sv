// tb_sloppy_r4_ppgen: exhaustive check of the sloppy radix-4 partial-product
// generator (N=8): for each multiplicand and each digit 0..3 the output must
// be 0 for digit 0 and 2x (as an N+1-bit signed value) otherwise.
module tb_sloppy_r4_ppgen;
  localparam int unsigned N = 8;

  int checks = 0;
  int failures = 0;

  logic [N-1:0] x;
  logic [1:0]   dig;
  logic [N:0]   pp;

  sloppy_r4_ppgen #(.N(N)) dut (.x(x), .dig(dig), .pp(pp));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xv, want;
    for (int i = 0; i < (1 << N); i++) begin
      for (int d = 0; d < 4; d++) begin
        x = N'(i); dig = 2'(d);
        #1;
        xv   = (i >= (1 << (N-1))) ? i - (1 << N) : i;
        want = (d == 0) ? 0 : 2 * xv;
        checks++;
        if ($signed(pp) != want) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d d=%0d pp=%0d", xv, d, $signed(pp));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
