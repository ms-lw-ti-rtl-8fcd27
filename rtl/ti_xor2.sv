// ti_xor2: two-share linear gate t = x ^ y, or t = x ^ y ^ 1 when INV = 1.
//
// Each output share takes one share domain only: t[0] = x[1] ^ y[1] (^ 1),
// t[1] = x[0] ^ y[0]. The swap of share indices between input and output is
// the document's own sharing and is kept so that the share-level equations of
// the S-boxes match it bit for bit; it does not change the unmasked value.
// The constant of the complemented form goes into share 0, as the document
// prints it. Purely combinational, no clock.
module ti_xor2 #(
  parameter bit INV = 1'b0  // 1: t = x ^ y ^ 1
) (
  input  ms_lw_ti_pkg::sh2_t x,
  input  ms_lw_ti_pkg::sh2_t y,
  output ms_lw_ti_pkg::sh2_t t
);

  always_comb begin
    t[0] = x[1] ^ y[1] ^ INV;
    t[1] = x[0] ^ y[0];
  end

endmodule
