// ti_andxor2: two-share nonlinear primitive t = x&y ^ z with its extensions
// t = x&y ^ x ^ y ^ z (LIN = 1) and t = x&y ^ x ^ y ^ z ^ 1 (LIN = INV = 1).
//
// The AND of two shared bits is expanded into its four cross products. Each
// product is stored in its own register, so that no register sees both shares
// of one variable (non-completeness) and glitches cannot combine them:
//   r[0] = x0&y0 ^ z0 (^ x0 ^ y0) (^ 1)     r[1] = x0&y1
//   r[2] = x1&y0                            r[3] = x1&y1 ^ z1 (^ x1 ^ y1)
// The z shares re-mask the products, which makes the function invertible and
// its sharing uniform without fresh randomness; in the S-boxes z is an input
// bit or an earlier intermediate. A combinational compression layer after the
// registers returns to two shares: t[0] = r[0] ^ r[1], t[1] = r[2] ^ r[3].
// Placing the constant of the complemented form in r[0] (share 0) is this
// design's choice; the document gives only the unshared function.
//
// Timing: t is valid one clock edge after x, y and z are stable. No reset: the
// registers are rewritten on every edge.
module ti_andxor2 #(
  parameter bit LIN = 1'b0,  // add x ^ y
  parameter bit INV = 1'b0   // add 1
) (
  input  logic               clk,
  input  ms_lw_ti_pkg::sh2_t x,
  input  ms_lw_ti_pkg::sh2_t y,
  input  ms_lw_ti_pkg::sh2_t z,
  output ms_lw_ti_pkg::sh2_t t
);

  logic [3:0] r;

  always_ff @(posedge clk) begin
    r[0] <= (x[0] & y[0]) ^ z[0] ^ (LIN & (x[0] ^ y[0])) ^ INV;
    r[1] <= x[0] & y[1];
    r[2] <= x[1] & y[0];
    r[3] <= (x[1] & y[1]) ^ z[1] ^ (LIN & (x[1] ^ y[1]));
  end

  // compression layer
  always_comb begin
    t[0] = r[0] ^ r[1];
    t[1] = r[2] ^ r[3];
  end

endmodule
