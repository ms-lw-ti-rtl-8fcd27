// ms_lw_ti_top: the six masked S-boxes side by side.
//
// GIFT, PRESENT and PICCOLO S-boxes, each as a two-share and a three-share
// first-order threshold implementation. They share only the clock; each has
// its own input and output share ports. Ports <cipher>_x<n>[i][j] carry share
// j of S-box input bit x_i, <cipher>_y<n>[i][j] share j of output bit y_i (bit
// 0 is the most significant bit of the cipher nibble). Hold an S-box's input
// shares stable for its latency (3 edges for GIFT and PRESENT, 2 for
// PICCOLO); its outputs are then valid until the inputs change. Gathering the
// six into one top is this design's packaging: each S-box stands on its own.
module ms_lw_ti_top
  import ms_lw_ti_pkg::*;
(
  input  logic  clk,
  input  nib2_t gift_x2,
  output nib2_t gift_y2,
  input  nib3_t gift_x3,
  output nib3_t gift_y3,
  input  nib2_t present_x2,
  output nib2_t present_y2,
  input  nib3_t present_x3,
  output nib3_t present_y3,
  input  nib2_t piccolo_x2,
  output nib2_t piccolo_y2,
  input  nib3_t piccolo_x3,
  output nib3_t piccolo_y3
);

  gift_ti2    u_gift2    (.clk, .x(gift_x2),    .y(gift_y2));
  gift_ti3    u_gift3    (.clk, .x(gift_x3),    .y(gift_y3));
  present_ti2 u_present2 (.clk, .x(present_x2), .y(present_y2));
  present_ti3 u_present3 (.clk, .x(present_x3), .y(present_y3));
  piccolo_ti2 u_piccolo2 (.clk, .x(piccolo_x2), .y(piccolo_y2));
  piccolo_ti3 u_piccolo3 (.clk, .x(piccolo_x3), .y(piccolo_y3));

endmodule
