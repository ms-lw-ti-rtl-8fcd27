// ms_lw_ti_ref_pkg: reference values for the masked S-box testbenches.
//
// Holds the published 4x4 S-box tables of GIFT, PRESENT and PICCOLO as the
// ciphers' specifications give them (input and output nibbles with the usual
// most-significant-bit-first hex notation), and converts between a nibble and
// the bit-indexed form of the RTL, where bit x_0 is the nibble's MSB.
package ms_lw_ti_ref_pkg;

  typedef enum int {GIFT, PRESENT, PICCOLO} cipher_e;

  localparam logic [3:0] GIFT_SBOX    [16] = '{4'h1, 4'hA, 4'h4, 4'hC, 4'h6, 4'hF, 4'h3, 4'h9,
                                               4'h2, 4'hD, 4'hB, 4'h7, 4'h5, 4'h0, 4'h8, 4'hE};
  localparam logic [3:0] PRESENT_SBOX [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                               4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};
  localparam logic [3:0] PICCOLO_SBOX [16] = '{4'hE, 4'h4, 4'hB, 4'h2, 4'h3, 4'h8, 4'h0, 4'h9,
                                               4'h1, 4'hA, 4'h7, 4'hF, 4'h6, 4'hC, 4'h5, 4'hD};

  function automatic logic [3:0] sbox(cipher_e c, logic [3:0] v);
    case (c)
      GIFT:    return GIFT_SBOX[v];
      PRESENT: return PRESENT_SBOX[v];
      default: return PICCOLO_SBOX[v];
    endcase
  endfunction

  // nibble value -> bit-indexed vector (index i holds x_i, x_0 = MSB)
  function automatic logic [3:0] to_bits(logic [3:0] v);
    return {v[0], v[1], v[2], v[3]};
  endfunction

endpackage
