// ti_xor3: three-share linear gate t = x ^ y, or t = x ^ y ^ 1 when INV = 1.
//
// Output share k is computed from the single input share domain (k + ROT)
// mod 3, so no output share mixes domains. With the default ROT = 1 this is
// the document's sharing: t[0] = x[1] ^ y[1] (^ 1), t[1] = x[2] ^ y[2],
// t[2] = x[0] ^ y[0]. ROT = 0 keeps every share in its own domain; this
// design uses it in the three-share PRESENT S-box, where the rotation would
// bring all three shares of one input together in a later nonlinear gate.
// The constant of the complemented form always goes into share 0.
// Purely combinational, no clock.
module ti_xor3 #(
  parameter bit          INV = 1'b0,  // 1: t = x ^ y ^ 1
  parameter int unsigned ROT = 1      // input domain of output share k is (k + ROT) mod 3
) (
  input  ms_lw_ti_pkg::sh3_t x,
  input  ms_lw_ti_pkg::sh3_t y,
  output ms_lw_ti_pkg::sh3_t t
);

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      t[k] = x[(k + ROT) % 3] ^ y[(k + ROT) % 3];
    end
    t[0] = t[0] ^ INV;
  end

endmodule
