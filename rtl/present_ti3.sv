// present_ti3: first-order threshold implementation of the PRESENT 4x4 S-box
// with 3 shares and no fresh randomness.
//
// The S-box's minimal AND/OR/XOR network (OR rewritten as AND with
// complements) is mapped gate by gate onto the shared primitives
// ti_andxor3 (x&y ^ z and extensions) and ti_xor3 (x ^ y and x ^ y ^ 1):
//   t1 = x2 ^ x1                        (linear)
//   t3 = x1&t1 ^ x0                     (nonlinear, stage 1)
//   y3 = x3 ^ t3                        (linear)
//   t6 = t1&t3 ^ x1                     (nonlinear, stage 2)
//   t5 = t1 ^ y3                        (linear)
//   t8 = t6 ^ x3 ^ 1                    (linear)
//   y2 = x3&t6 ^ x3 ^ t6 ^ t5           (nonlinear, stage 3)
//   y0 = y2 ^ t8                        (linear)
//   y1 = t8&t5 ^ t8 ^ t5 ^ t3           (nonlinear, stage 3)
// The gate network and the stage count are the document's. It prints no
// share-level equations for PRESENT; the nonlinear gates follow its GIFT
// mapping, but the linear gates keep each share in its own domain (ROT = 0)
// instead of the rotating sharing used for GIFT. With the rotation, t1 and
// x1 would bring all three shares of x1 into the registers of t3 and t6 (and
// of x3 into y2 and y1), breaking non-completeness; with ROT = 0 every
// register of this S-box depends on at most two share domains of any input.
//
// Interface: x[i][j] is share j of input bit x_i, y[i][j] share j of output
// bit y_i; bit 0 is the most significant bit of the cipher nibble.
// Timing: the caller holds x stable; all of y is valid after
// ms_lw_ti_pkg::PRESENT_LATENCY (3) clock edges (y3 after one).
module present_ti3
  import ms_lw_ti_pkg::*;
(
  input  logic  clk,
  input  nib3_t x,
  output nib3_t y
);

  sh3_t t1, t3, t5, t6, t8;

  ti_xor3    #(.ROT(0))               u_t1 (.x(x[2]), .y(x[1]), .t(t1));
  ti_andxor3                          u_t3 (.clk, .x(x[1]), .y(t1), .z(x[0]), .t(t3));
  ti_xor3    #(.ROT(0))               u_y3 (.x(x[3]), .y(t3), .t(y[3]));
  ti_andxor3                          u_t6 (.clk, .x(t1), .y(t3), .z(x[1]), .t(t6));
  ti_xor3    #(.ROT(0))               u_t5 (.x(t1), .y(y[3]), .t(t5));
  ti_xor3    #(.INV(1'b1), .ROT(0))   u_t8 (.x(t6), .y(x[3]), .t(t8));
  ti_andxor3 #(.LIN(1'b1))            u_y2 (.clk, .x(x[3]), .y(t6), .z(t5), .t(y[2]));
  ti_xor3    #(.ROT(0))               u_y0 (.x(y[2]), .y(t8), .t(y[0]));
  ti_andxor3 #(.LIN(1'b1))            u_y1 (.clk, .x(t8), .y(t5), .z(t3), .t(y[1]));

endmodule
