// piccolo_ti3: first-order threshold implementation of the PICCOLO 4x4 S-box
// with 3 shares and no fresh randomness.
//
// The S-box's minimal OR/XOR network collapses into four nonlinear gates of the
// form x&y ^ x ^ y ^ z (^ 1) (an OR with complements), each a ti_andxor3:
//   y0 = x0&x1 ^ x1 ^ x0 ^ x3 ^ 1       (stage 1)
//   y1 = x1&x2 ^ x1 ^ x2 ^ x0 ^ 1       (stage 1)
//   y2 = y0&x2 ^ y0 ^ x2 ^ x1           (stage 2)
//   y3 = y0&y1 ^ y0 ^ y1 ^ x2 ^ 1       (stage 2)
// The network and the two-stage depth are the document's; the mapping onto
// share equations follows the way it maps the GIFT network.
//
// Interface: x[i][j] is share j of input bit x_i, y[i][j] share j of output
// bit y_i; bit 0 is the most significant bit of the cipher nibble.
// Timing: the caller holds x stable; y0, y1 are valid after one clock edge,
// y2, y3 after ms_lw_ti_pkg::PICCOLO_LATENCY (2).
module piccolo_ti3
  import ms_lw_ti_pkg::*;
(
  input  logic  clk,
  input  nib3_t x,
  output nib3_t y
);

  ti_andxor3 #(.LIN(1'b1), .INV(1'b1)) u_y0 (.clk, .x(x[0]), .y(x[1]), .z(x[3]), .t(y[0]));
  ti_andxor3 #(.LIN(1'b1), .INV(1'b1)) u_y1 (.clk, .x(x[1]), .y(x[2]), .z(x[0]), .t(y[1]));
  ti_andxor3 #(.LIN(1'b1))             u_y2 (.clk, .x(y[0]), .y(x[2]), .z(x[1]), .t(y[2]));
  ti_andxor3 #(.LIN(1'b1), .INV(1'b1)) u_y3 (.clk, .x(y[0]), .y(y[1]), .z(x[2]), .t(y[3]));

endmodule
