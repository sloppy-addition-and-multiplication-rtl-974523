// sloppy_arith_top: the three sloppy arithmetic units side by side.
//
//  * add_*: the 8-bit adder with 4 carry-free low bits (OR-ed), carry out.
//  * mul_*: the 8x8 two's complement radix-4 multiplier with 2 sloppy digits
//    and an exact final adder.
//  * mac_*: the 12x12 multiply-accumulate unit (3 sloppy multiplier digits,
//    24-bit adder with 8 carry-free bits) for a direct IDCT, one operation per
//    clock, result on mac_acc one cycle later.
//
// The adder and multiplier are combinational; only the MAC has state (clk,
// asynchronous active-low rst_n). Sizes are the evaluated configurations; the
// units share nothing, as each was evaluated on its own.
module sloppy_arith_top (
  input  logic        clk,
  input  logic        rst_n,
  // 8-bit sloppy adder
  input  logic [7:0]  add_a,
  input  logic [7:0]  add_b,
  output logic [7:0]  add_s,
  output logic        add_cout,
  // 8x8 sloppy multiplier
  input  logic [7:0]  mul_x,
  input  logic [7:0]  mul_y,
  output logic [15:0] mul_p,
  // 12x12 sloppy multiply-accumulate
  input  logic        mac_en,
  input  logic        mac_clr,
  input  logic [11:0] mac_x,
  input  logic [11:0] mac_y,
  output logic [23:0] mac_acc,
  output logic        mac_valid
);

  sloppy_adder u_add (
    .a    (add_a),
    .b    (add_b),
    .s    (add_s),
    .cout (add_cout)
  );

  sloppy_mult u_mul (
    .x (mul_x),
    .y (mul_y),
    .p (mul_p)
  );

  sloppy_mac u_mac (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (mac_en),
    .clr       (mac_clr),
    .x         (mac_x),
    .y         (mac_y),
    .acc       (mac_acc),
    .acc_valid (mac_valid)
  );

endmodule
