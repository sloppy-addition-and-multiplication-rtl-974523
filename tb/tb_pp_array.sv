// tb_pp_array: exhaustive check of the partial-product array of the 8x8
// radix-4 multiplier, with KS=2 sloppy digits and with KS=0 (exact).
//
// The rows are summed modulo 2^16 in the testbench. For KS=0 the sum must be
// x*y. For KS=2 it must be x*y', where y' keeps the signed upper four bits of
// y and replaces each nonzero low radix-4 digit by 2.
module tb_pp_array;
  localparam int unsigned N = 8;
  localparam int unsigned W = 16;
  localparam int unsigned D = N / 2;

  int checks = 0;
  int failures = 0;

  logic [N-1:0]      x, y;
  logic [D:0][W-1:0] rows_s, rows_e;

  pp_array #(.N(N), .KS(2), .W(W)) dut_s (.x(x), .y(y), .rows(rows_s));
  pp_array #(.N(N), .KS(0), .W(W)) dut_e (.x(x), .y(y), .rows(rows_e));

  function automatic int row_sum(input logic [D:0][W-1:0] r);
    int s = 0;
    for (int i = 0; i <= D; i++) s += int'(r[i]);
    return s & ((1 << W) - 1);
  endfunction

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xv, yv, yhi, d0, d1, yap;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        x = N'(i); y = N'(j);
        #1;
        xv  = (i >= 128) ? i - 256 : i;
        yv  = (j >= 128) ? j - 256 : j;
        yhi = yv >>> 4;
        d0  = ((j & 3) != 0) ? 2 : 0;
        d1  = (((j >> 2) & 3) != 0) ? 2 : 0;
        yap = yhi * 16 + d1 * 4 + d0;
        checks += 2;
        if (row_sum(rows_e) != ((xv * yv) & 16'hffff)) begin
          failures++;
          if (failures < 10) $display("FAIL exact x=%0d y=%0d", xv, yv);
        end
        if (row_sum(rows_s) != ((xv * yap) & 16'hffff)) begin
          failures++;
          if (failures < 10) $display("FAIL sloppy x=%0d y=%0d", xv, yv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
