// tb_sloppy_mac: clocked check of the 12x12 multiply-accumulate unit.
//
// Three instances share random stimulus (en, clr, x, y): an exact one
// (KM=0, KA=0), one with only the multiplier sloppy (KM=3, KA=0), and the
// default one (KM=3, KA=8). The testbench keeps its own accumulators:
//  * exact:          acc == sum of x*y since the last clear (mod 2^24)
//  * sloppy mult:    acc == sum of x*y', y' with sloppy low digits
//  * default:        each operation may lose at most 255 (the OR-ed low bits
//                    drop a&b <= 255), so 0 <= model - acc <= 255*ops
// It also checks the one-cycle latency (acc and acc_valid change on the edge
// after en), that en=0 holds acc, and that the adder's loss does occur.
module tb_sloppy_mac;
  localparam int unsigned N = 12;
  localparam int unsigned W = 24;

  int checks = 0;
  int failures = 0;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         en = 1'b0, clr = 1'b0;
  logic [N-1:0] x = '0, y = '0;
  logic [W-1:0] acc_e, acc_m, acc_d;
  logic         v_e, v_m, v_d;

  sloppy_mac #(.N(N), .W(W), .KM(0), .KA(0)) dut_e (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .x(x), .y(y), .acc(acc_e), .acc_valid(v_e));
  sloppy_mac #(.N(N), .W(W), .KM(3), .KA(0)) dut_m (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .x(x), .y(y), .acc(acc_m), .acc_valid(v_m));
  sloppy_mac dut_d (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .x(x), .y(y), .acc(acc_d), .acc_valid(v_d));

  always #5 clk = ~clk;

  function automatic int sx(input logic [N-1:0] v);
    return int'($signed(v));
  endfunction

  function automatic int yapprox(input logic [N-1:0] v);
    int r = (sx(v) >>> 6) * 64;
    for (int k = 0; k < 3; k++) if (v[2*k +: 2] != 2'b00) r += 2 * (4 ** k);
    return r;
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] m_e = '0, m_m = '0, m_d = '0, prev_d;
    longint ops = 0, dev, lossy = 0;
    bit     en_q;
    repeat (2) @(posedge clk);
    check("reset", acc_e == 0 && acc_d == 0 && !v_d);
    rst_n = 1'b1;
    for (int t = 0; t < 50000; t++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 9) != 0);
      clr = ($urandom_range(0, 15) == 0) || t == 0;
      x   = N'($urandom);
      y   = N'($urandom);
      en_q = en;
      prev_d = acc_d;
      if (en) begin
        if (clr) begin m_e = '0; m_m = '0; m_d = '0; ops = 0; end
        m_e += W'(sx(x) * sx(y));
        m_m += W'(sx(x) * yapprox(y));
        ops++;
      end
      // outputs must not move before the clock edge
      #1;
      check("no early update", acc_d == prev_d);
      @(posedge clk);
      #1;
      check("valid", v_d == en_q && v_e == en_q);
      check("exact acc", acc_e == m_e);
      check("sloppy-mult acc", acc_m == m_m);
      if (!en_q) check("hold", acc_d == prev_d);
      dev = longint'($signed(W'(m_m - acc_d)));
      check("sloppy-add bound", dev >= 0 && dev <= 255 * ops);
      if (en_q && dev > 0) lossy++;
    end
    check("adder loss seen", lossy > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
