// tb_sloppy_adder: exhaustive check of the 8-bit sloppy adder with K=4.
//
// Three instances are driven with all 65,536 operand pairs: the OR variant,
// the XOR variant and K=0 (exact). Each output is compared with a reference
// built from integer arithmetic: the upper N-K bits are (a>>K)+(b>>K), the
// lower K bits are a|b or a^b. The summed error against the exact sum must
// give mean errors of 3.75 (OR) and 7.5 (XOR), and the worked example
// 103+70 must give 167 (OR) and 161 (XOR).
module tb_sloppy_adder;
  localparam int unsigned N = 8;
  localparam int unsigned K = 4;

  int checks = 0;
  int failures = 0;

  logic [N-1:0] a, b;
  logic [N-1:0] s_or, s_xor, s_ex;
  logic         c_or, c_xor, c_ex;

  sloppy_adder #(.N(N), .K(K), .LOW_OR(1'b1)) dut_or  (.a(a), .b(b), .s(s_or),  .cout(c_or));
  sloppy_adder #(.N(N), .K(K), .LOW_OR(1'b0)) dut_xor (.a(a), .b(b), .s(s_xor), .cout(c_xor));
  sloppy_adder #(.N(N), .K(0), .LOW_OR(1'b1)) dut_ex  (.a(a), .b(b), .s(s_ex),  .cout(c_ex));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: a=%0d b=%0d got %0d expected %0d", what, a, b, got, exp);
    end
  endtask

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint err_or = 0, err_xor = 0;
    int hi, lo_or, lo_xor;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = N'(i); b = N'(j);
        #1;
        hi     = (i >> K) + (j >> K);
        lo_or  = (i | j) & ((1 << K) - 1);
        lo_xor = (i ^ j) & ((1 << K) - 1);
        check("or",   {c_or,  s_or},  (hi << K) + lo_or);
        check("xor",  {c_xor, s_xor}, (hi << K) + lo_xor);
        check("exact",{c_ex,  s_ex},  i + j);
        err_or  += (i + j) - {c_or, s_or};
        err_xor += (i + j) - {c_xor, s_xor};
      end
    end
    // mean errors over all pairs: 3.75 and 7.5
    check("mean error OR x4",  err_or * 4 / 65536, 15);
    check("mean error XOR x2", err_xor * 2 / 65536, 15);
    check("mean error OR exact", err_or % 16384, 0);
    a = 8'd103; b = 8'd70; #1;
    check("example OR",  s_or,  167);
    check("example XOR", s_xor, 161);
    check("example exact", s_ex, 173);
    $display("mean error OR=%0.3f XOR=%0.3f", real'(err_or) / 65536.0, real'(err_xor) / 65536.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
