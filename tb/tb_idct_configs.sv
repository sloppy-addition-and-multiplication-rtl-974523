// tb_idct_configs: direct 8x8 IDCT through the multiply-accumulate unit in
// its four regular/sloppy configurations, side by side:
//   R-R (KM=0, KA=0), S-R (KM=3, KA=0), R-S (KM=0, KA=8), S-S (KM=3, KA=8).
// All four get the same stream: for every output pixel, 64 operations
// coefficient * basis weight (weights scaled by 2^12, 12-bit signed), the
// first with clr. The blocks are pseudo-random smooth 8x8 images, turned into
// integer DCT coefficients by a real-valued forward DCT.
// Checks: R-R equals the exact integer sum; S-R equals the integer sum with
// sloppy low digits of the weight; R-S and S-S lie 0..255*64 below their
// regular-adder counterparts. Mean and largest pixel error against a
// floating-point IDCT are printed for each configuration and bounded.
module tb_idct_configs;
  localparam int  NBLK = 32;
  localparam real PI = 3.14159265358979323846;

  int checks = 0;
  int failures = 0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        en = 1'b0, clr = 1'b0;
  logic [11:0] x = '0, y = '0;
  logic [23:0] acc [4];
  logic        vld [4];

  sloppy_mac #(.KM(0), .KA(0)) u_rr (.clk, .rst_n, .en, .clr, .x, .y, .acc(acc[0]), .acc_valid(vld[0]));
  sloppy_mac #(.KM(3), .KA(0)) u_sr (.clk, .rst_n, .en, .clr, .x, .y, .acc(acc[1]), .acc_valid(vld[1]));
  sloppy_mac #(.KM(0), .KA(8)) u_rs (.clk, .rst_n, .en, .clr, .x, .y, .acc(acc[2]), .acc_valid(vld[2]));
  sloppy_mac #(.KM(3), .KA(8)) u_ss (.clk, .rst_n, .en, .clr, .x, .y, .acc(acc[3]), .acc_valid(vld[3]));

  always #5 clk = ~clk;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
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

  real cosv [8][8];
  int  wgt  [8][8][8][8];
  int  coef [8][8];
  real pix  [8][8];
  real esum [4];
  real emax [4];

  initial begin
    string  name [4] = '{"R-R", "S-R", "R-S", "S-S"};
    real    s, e;
    longint m_exact, m_sloppy, dev;
    int     got, npix = 0;
    for (int c = 0; c < 4; c++) begin esum[c] = 0.0; emax[c] = 0.0; end
    for (int i = 0; i < 8; i++)
      for (int u = 0; u < 8; u++)
        cosv[i][u] = ((u == 0) ? 1.0 / $sqrt(2.0) : 1.0) * $cos(real'((2*i+1)*u) * PI / 16.0);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++) begin
            s = cosv[i][u] * cosv[j][v] / 4.0 * 4096.0;
            wgt[i][j][u][v] = $rtoi(s + ((s >= 0.0) ? 0.5 : -0.5));
          end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < NBLK; blk++) begin
      int gx = $urandom_range(0, 16), gy = $urandom_range(0, 16), base = $urandom_range(0, 100);
      int noise = (blk % 2 == 0) ? 8 : 64;   // smooth and detailed blocks
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          pix[i][j] = real'(base + gx * i + gy * j + $urandom_range(0, noise)) - 128.0;
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          s = 0.0;
          for (int i = 0; i < 8; i++)
            for (int j = 0; j < 8; j++) s += pix[i][j] * cosv[i][u] * cosv[j][v];
          s = s / 4.0;
          coef[u][v] = $rtoi(s + ((s >= 0.0) ? 0.5 : -0.5));
        end
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          m_exact = 0; m_sloppy = 0;
          for (int n = 0; n < 64; n++) begin
            @(negedge clk);
            en  = 1'b1;
            clr = (n == 0);
            x   = 12'(coef[n / 8][n % 8]);
            y   = 12'(wgt[i][j][n / 8][n % 8]);
            m_exact  += longint'(coef[n / 8][n % 8]) * wgt[i][j][n / 8][n % 8];
            m_sloppy += longint'(coef[n / 8][n % 8]) * yap12(y);
          end
          @(negedge clk);
          en = 1'b0;
          check("R-R exact", longint'($signed(acc[0])) == m_exact);
          check("S-R model", longint'($signed(acc[1])) == m_sloppy);
          dev = m_exact - longint'($signed(acc[2]));
          check("R-S bound", dev >= 0 && dev <= 255 * 64);
          dev = m_sloppy - longint'($signed(acc[3]));
          check("S-S bound", dev >= 0 && dev <= 255 * 64);
          s = 0.0;
          for (int u = 0; u < 8; u++)
            for (int v = 0; v < 8; v++) s += real'(coef[u][v]) * cosv[i][u] * cosv[j][v] / 4.0;
          for (int c = 0; c < 4; c++) begin
            got = (int'($signed(acc[c])) + 2048) >>> 12;
            e = real'(got) - s;
            if (e < 0.0) e = -e;
            esum[c] += e;
            if (e > emax[c]) emax[c] = e;
          end
          npix++;
        end
    end
    for (int c = 0; c < 4; c++)
      $display("%s: mean |pixel error| %0.3f, max %0.3f", name[c], esum[c] / real'(npix), emax[c]);
    check("R-R error within rounding", emax[0] < 1.0);
    check("S-S worse than R-R", esum[3] > esum[0]);
    check("S-R error bounded", esum[1] / real'(npix) < 4.0 && emax[1] < 16.0);
    check("S-S error bounded", esum[3] / real'(npix) < 4.0 && emax[3] < 16.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
