// gift_ti3: first-order threshold implementation of the GIFT 4x4 S-box with
// 3 shares and no fresh randomness.
//
// The S-box is first reduced to a minimal network of AND and XOR gates; each
// gate is then rewritten as one of the shared primitives t = x&y ^ z
// (ti_andxor3) or t = x ^ y (ti_xor3) and their complemented / linear
// extensions, where an input bit or an earlier result plays the role of z:
//   t2 = x2&x3 ^ x2 ^ x3 ^ x1      (nonlinear, stage 1)
//   t3 = x1&x3 ^ x2                (nonlinear, stage 1)
//   y3 = x0 ^ t2 ^ 1               (linear)
//   y2 = y3 ^ t3 ^ 1               (linear)
//   y0 = x0&t3 ^ x3                (nonlinear, stage 2)
//   y1 = y0&y2 ^ t2                (nonlinear, stage 3)
// Registers sit only inside the four nonlinear gates. This network, its
// register placement and the share equations are the document's; the port
// packing is this design's.
//
// Interface: x[i][j] is share j of input bit x_i, y[i][j] share j of output
// bit y_i; bit 0 is the most significant bit of the cipher nibble.
// Timing: the caller holds x stable; all of y is valid after
// ms_lw_ti_pkg::GIFT_LATENCY (3) clock edges and stays valid while x is held.
// y3 and y2 are valid after one edge, y0 after two, y1 after three.
// Note: with these share equations the sharing of y1 is slightly non-uniform
// for half of the input values (y0, y2 and y3 are uniform).
module gift_ti3
  import ms_lw_ti_pkg::*;
(
  input  logic  clk,
  input  nib3_t x,
  output nib3_t y
);

  sh3_t t2, t3;

  ti_andxor3 #(.LIN(1'b1)) u_t2 (.clk, .x(x[2]), .y(x[3]), .z(x[1]), .t(t2));
  ti_andxor3               u_t3 (.clk, .x(x[1]), .y(x[3]), .z(x[2]), .t(t3));
  ti_xor3    #(.INV(1'b1)) u_y3 (.x(x[0]), .y(t2), .t(y[3]));
  ti_xor3    #(.INV(1'b1)) u_y2 (.x(y[3]), .y(t3), .t(y[2]));
  ti_andxor3               u_y0 (.clk, .x(x[0]), .y(t3), .z(x[3]), .t(y[0]));
  ti_andxor3               u_y1 (.clk, .x(y[0]), .y(y[2]), .z(t2), .t(y[1]));

endmodule
