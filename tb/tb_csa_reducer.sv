// tb_csa_reducer: random check of the carry-save reduction. Instances with 1,
// 2, 5 and 8 rows get random rows; sum+carry must equal the sum of the rows
// modulo 2^W.
module tb_csa_reducer;
  localparam int unsigned W = 24;

  int checks = 0;
  int failures = 0;

  logic [7:0][W-1:0] rows;
  logic [W-1:0] s1, c1, s2, c2, s5, c5, s8, c8;

  csa_reducer #(.ROWS(1), .W(W)) dut1 (.rows(rows[0]), .sum(s1), .carry(c1));
  csa_reducer #(.ROWS(2), .W(W)) dut2 (.rows(rows[1:0]), .sum(s2), .carry(c2));
  csa_reducer #(.ROWS(5), .W(W)) dut5 (.rows(rows[4:0]), .sum(s5), .carry(c5));
  csa_reducer #(.ROWS(8), .W(W)) dut8 (.rows(rows),      .sum(s8), .carry(c8));

  function automatic logic [W-1:0] ref_sum(input int n);
    logic [W-1:0] s = '0;
    for (int i = 0; i < n; i++) s += rows[i];
    return s;
  endfunction

  task automatic check(input int n, input logic [W-1:0] s, input logic [W-1:0] c);
    checks++;
    if (W'(s + c) != ref_sum(n)) begin
      failures++;
      if (failures < 10) $display("FAIL rows=%0d got %0h expected %0h", n, W'(s + c), ref_sum(n));
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
    for (int t = 0; t < 20000; t++) begin
      for (int i = 0; i < 8; i++) rows[i] = W'($urandom);
      if (t < 8) rows = '1;
      #1;
      check(1, s1, c1);
      check(2, s2, c2);
      check(5, s5, c5);
      check(8, s8, c8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
