// tb_sloppy_mult: exhaustive check of the 8x8 two's complement sloppy
// multiplier (KS=2) and of the same multiplier with KS=0 (exact).
//
// For all 2^16 operand pairs: the exact instance must return x*y; the sloppy
// one must return x*y', where y' keeps y's signed upper four bits and turns
// every nonzero low radix-4 digit into 2. Over all pairs the mean absolute
// error of the sloppy product must be 144 (2.25 times the mean |x| of 64) and
// the largest 640.
module tb_sloppy_mult;
  localparam int unsigned N = 8;

  int checks = 0;
  int failures = 0;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p_s, p_e;

  sloppy_mult #(.N(N), .KS(2)) dut_s (.x(x), .y(y), .p(p_s));
  sloppy_mult #(.N(N), .KS(0)) dut_e (.x(x), .y(y), .p(p_e));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: x=%0d y=%0d got %0d expected %0d", what, $signed(x), $signed(y), got, exp);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xv, yv, yap, e, emax = 0;
    longint esum = 0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        x = N'(i); y = N'(j);
        #1;
        xv  = (i >= 128) ? i - 256 : i;
        yv  = (j >= 128) ? j - 256 : j;
        yap = (yv >>> 4) * 16 + ((((j >> 2) & 3) != 0) ? 8 : 0) + (((j & 3) != 0) ? 2 : 0);
        check("exact",  int'($signed(p_e)), xv * yv);
        check("sloppy", int'($signed(p_s)), xv * yap);
        e = int'($signed(p_s)) - xv * yv;
        if (e < 0) e = -e;
        esum += e;
        if (e > emax) emax = e;
      end
    end
    $display("sloppy 8x8: mean |error| = %0.2f, max |error| = %0d", real'(esum) / 65536.0, emax);
    check("mean error", int'(esum / 65536), 144);
    check("max error", emax, 640);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
