// ti_andxor3: three-share nonlinear primitive t = x&y ^ z with its extensions
// t = x&y ^ x ^ y ^ z (LIN = 1) and t = x&y ^ x ^ y ^ z ^ 1 (LIN = INV = 1).
//
// Classic three-share threshold sharing: output share k uses only the input
// share domains k+1 and k+2 (mod 3), so each is independent of one share of
// every input (non-completeness):
//   t[0] = x1&y1 ^ x1&y2 ^ x2&y1 ^ z1 (^ x1 ^ y1) (^ 1)
//   t[1] = x2&y2 ^ x2&y0 ^ x0&y2 ^ z2 (^ x2 ^ y2)
//   t[2] = x0&y0 ^ x0&y1 ^ x1&y0 ^ z0 (^ x0 ^ y0)
// The z shares re-mask the result in place of fresh randomness. Each output
// share is registered (three registers) to stop glitches from travelling into
// the next nonlinear stage; no compression is needed. Putting the constant of
// the complemented form into share 0 is this design's choice.
//
// Timing: t is valid one clock edge after x, y and z are stable. No reset.
module ti_andxor3 #(
  parameter bit LIN = 1'b0,  // add x ^ y
  parameter bit INV = 1'b0   // add 1
) (
  input  logic               clk,
  input  ms_lw_ti_pkg::sh3_t x,
  input  ms_lw_ti_pkg::sh3_t y,
  input  ms_lw_ti_pkg::sh3_t z,
  output ms_lw_ti_pkg::sh3_t t
);

  // share k of the result, built from domains a = k+1 and b = k+2 (mod 3)
  function automatic logic share_fn(logic xa, logic xb, logic ya, logic yb, logic za);
    return (xa & ya) ^ (xa & yb) ^ (xb & ya) ^ za ^ (LIN & (xa ^ ya));
  endfunction

  always_ff @(posedge clk) begin
    t[0] <= share_fn(x[1], x[2], y[1], y[2], z[1]) ^ INV;
    t[1] <= share_fn(x[2], x[0], y[2], y[0], z[2]);
    t[2] <= share_fn(x[0], x[1], y[0], y[1], z[0]);
  end

endmodule
