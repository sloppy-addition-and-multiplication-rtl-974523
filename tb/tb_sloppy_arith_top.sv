// tb_sloppy_arith_top: end-to-end test of the three units at their default
// sizes, through the top.
//
//  1. Adder: all 65,536 pairs of 8-bit operands against an integer reference
//     (upper nibbles added exactly, lower nibbles OR-ed); the mean error
//     against the true sum must be 3.75.
//  2. Multiplier: all 65,536 pairs of 8-bit signed operands against x*y',
//     y' being y with each nonzero low radix-4 digit replaced by 2; the mean
//     absolute error against x*y must be 144.
//  3. MAC: a direct two-dimensional 8x8 IDCT of NBLK pseudo-random image
//     blocks. Each block is level-shifted, transformed by a real-valued DCT
//     in the testbench and rounded to integer coefficients (12-bit signed).
//     Every output pixel is then the sum of 64 products coefficient * basis
//     weight, the weights being C(u)C(v)/4*cos((2i+1)u*pi/16)*cos((2j+1)v*pi/16)
//     scaled by 2^12 and rounded to 12-bit signed integers. The coefficient
//     drives x, the weight drives y (the sloppy digits therefore act on the
//     constant). Each accumulation is checked against an integer model of
//     the sloppy multiplier (the adder may only lose 0..255 per operation),
//     and the decoded pixels are compared with a floating-point IDCT of the
//     same coefficients; mean and largest pixel error are reported and
//     bounded.
// Each mechanism (dropped low carries, carry out, sloppy digits of either
// error sign, negative recoded digits, MAC clear / accumulate / hold, a loss
// in the MAC adder) is counted and must occur.
module tb_sloppy_arith_top;
  localparam int NBLK = 16;
  localparam real PI = 3.14159265358979323846;

  int checks = 0;
  int failures = 0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [7:0]  add_a = '0, add_b = '0, add_s;
  logic        add_cout;
  logic [7:0]  mul_x = '0, mul_y = '0;
  logic [15:0] mul_p;
  logic        mac_en = 1'b0, mac_clr = 1'b0;
  logic [11:0] mac_x = '0, mac_y = '0;
  logic [23:0] mac_acc;
  logic        mac_valid;

  sloppy_arith_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_drop = 0, n_cout = 0, n_dig_pos = 0, n_dig_neg = 0, n_booth_neg = 0;
  int n_clr = 0, n_acc = 0, n_hold = 0, n_mac_loss = 0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int yap12(input logic [11:0] v);
    int r = (int'($signed(v)) >>> 6) * 64;
    for (int k = 0; k < 3; k++) if (v[2*k +: 2] != 2'b00) r += 2 * (4 ** k);
    return r;
  endfunction

  real  cosv [8][8];       // cosv[i][u] = C(u) * cos((2i+1)u pi/16)
  int   wgt  [8][8][8][8]; // wgt[i][j][u][v], scaled by 2^12
  int   coef [8][8];
  real  pix  [8][8];

  task automatic run_adder();
    longint esum = 0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        add_a = 8'(i); add_b = 8'(j);
        #1;
        check("adder", {add_cout, add_s} == 9'((((i >> 4) + (j >> 4)) << 4) + ((i | j) & 15)));
        esum += (i + j) - int'({add_cout, add_s});
        if ((i & j & 15) != 0) n_drop++;
        if (add_cout) n_cout++;
      end
    end
    $display("adder: mean error %0.3f", real'(esum) / 65536.0);
    check("adder mean error", esum * 4 == 65536 * 15);
  endtask

  task automatic run_mult();
    longint esum = 0;
    int xv, yv, yap, e;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        mul_x = 8'(i); mul_y = 8'(j);
        #1;
        xv  = (i >= 128) ? i - 256 : i;
        yv  = (j >= 128) ? j - 256 : j;
        yap = (yv >>> 4) * 16 + ((((j >> 2) & 3) != 0) ? 8 : 0) + (((j & 3) != 0) ? 2 : 0);
        check("multiplier", int'($signed(mul_p)) == xv * yap);
        e = int'($signed(mul_p)) - xv * yv;
        esum += (e < 0) ? -e : e;
        if (i == 1) begin
          for (int k = 0; k < 2; k++) begin
            if (((j >> 2*k) & 3) == 1) n_dig_pos++;
            if (((j >> 2*k) & 3) == 3) n_dig_neg++;
          end
          if (j[7] && !(j[6] && j[5])) n_booth_neg++;
        end
      end
    end
    $display("multiplier: mean |error| %0.2f", real'(esum) / 65536.0);
    check("multiplier mean error", esum / 65536 == 144);
  endtask

  task automatic run_idct();
    real    s, esum = 0.0, emax = 0.0, e;
    longint model, dev;
    int     got, npix = 0;
    logic [23:0] prev;
    for (int i = 0; i < 8; i++)
      for (int u = 0; u < 8; u++)
        cosv[i][u] = ((u == 0) ? 1.0 / $sqrt(2.0) : 1.0) * $cos(real'((2*i+1)*u) * PI / 16.0);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++)
            wgt[i][j][u][v] = int'($rtoi(cosv[i][u] * cosv[j][v] / 4.0 * 4096.0 +
                                    ((cosv[i][u] * cosv[j][v] >= 0.0) ? 0.5 : -0.5)));
    for (int blk = 0; blk < NBLK; blk++) begin
      // smooth block: gradient plus noise, level-shifted to -128..127
      int gx = $urandom_range(0, 12), gy = $urandom_range(0, 12), base = $urandom_range(0, 140);
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          pix[i][j] = real'(base + gx * i + gy * j + $urandom_range(0, 15)) - 128.0;
      // forward DCT, rounded to integer coefficients
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          s = 0.0;
          for (int i = 0; i < 8; i++)
            for (int j = 0; j < 8; j++) s += pix[i][j] * cosv[i][u] * cosv[j][v];
          s = s / 4.0;
          coef[u][v] = $rtoi(s + ((s >= 0.0) ? 0.5 : -0.5));
        end
      // inverse DCT through the MAC, one output pixel per 64 operations
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          model = 0;
          for (int n = 0; n < 64; n++) begin
            @(negedge clk);
            if ($urandom_range(0, 7) == 0) begin
              // idle cycle: the accumulator must hold
              mac_en = 1'b0;
              prev = mac_acc;
              @(posedge clk); #1;
              check("mac hold", mac_acc == prev && !mac_valid);
              n_hold++;
              @(negedge clk);
            end
            mac_en  = 1'b1;
            mac_clr = (n == 0);
            mac_x   = 12'(coef[n / 8][n % 8]);
            mac_y   = 12'(wgt[i][j][n / 8][n % 8]);
            model  += longint'(coef[n / 8][n % 8]) * yap12(mac_y);
            if (mac_clr) n_clr++; else n_acc++;
            @(posedge clk); #1;
            check("mac valid", mac_valid);
          end
          @(negedge clk);
          mac_en = 1'b0;
          dev = model - longint'($signed(mac_acc));
          check("mac model", dev >= 0 && dev <= 255 * 64);
          if (dev > 0) n_mac_loss++;
          got = (int'($signed(mac_acc)) + 2048) >>> 12;
          s = 0.0;
          for (int u = 0; u < 8; u++)
            for (int v = 0; v < 8; v++) s += real'(coef[u][v]) * cosv[i][u] * cosv[j][v] / 4.0;
          e = real'(got) - s;
          if (e < 0.0) e = -e;
          esum += e;
          if (e > emax) emax = e;
          npix++;
        end
    end
    $display("IDCT (%0d blocks): mean |pixel error| %0.2f, max %0.2f", NBLK, esum / real'(npix), emax);
    check("IDCT mean error", esum / real'(npix) < 4.0);
    check("IDCT max error", emax < 16.0);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    check("reset", mac_acc == 0 && !mac_valid);
    rst_n = 1'b1;
    run_adder();
    run_mult();
    run_idct();
    $display("mechanisms: dropped-carry=%0d cout=%0d sloppy-digit(+)=%0d sloppy-digit(-)=%0d booth-neg=%0d",
             n_drop, n_cout, n_dig_pos, n_dig_neg, n_booth_neg);
    $display("            mac-clear=%0d mac-accumulate=%0d mac-hold=%0d mac-adder-loss=%0d",
             n_clr, n_acc, n_hold, n_mac_loss);
    check("dropped carry seen", n_drop > 0);
    check("carry out seen", n_cout > 0);
    check("sloppy digit 1 seen", n_dig_pos > 0);
    check("sloppy digit 3 seen", n_dig_neg > 0);
    check("negative booth digit seen", n_booth_neg > 0);
    check("mac clear seen", n_clr > 0);
    check("mac accumulate seen", n_acc > 0);
    check("mac hold seen", n_hold > 0);
    check("mac adder loss seen", n_mac_loss > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
