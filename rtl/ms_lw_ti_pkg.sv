// ms_lw_ti_pkg: types and constants shared by the masked 4x4 S-boxes.
//
// A sensitive bit v is carried as NS Boolean shares whose XOR is v. A shared
// S-box nibble is an array of four such share vectors, indexed by the bit
// index of the S-box equations: x[i][j] is share j of bit x_i. In these
// equations bit 0 is the most significant bit of the cipher nibble, so the
// value looked up in the cipher's S-box table is {x_0, x_1, x_2, x_3}.
//
// The latencies are the number of clock edges from stable input shares to
// valid output shares: three for GIFT and PRESENT, two for PICCOLO, for both
// the two-share and the three-share versions.
package ms_lw_ti_pkg;

  typedef logic [1:0] sh2_t;        // two shares of one bit
  typedef logic [2:0] sh3_t;        // three shares of one bit
  typedef sh2_t [3:0] nib2_t;       // nibble, two shares per bit
  typedef sh3_t [3:0] nib3_t;       // nibble, three shares per bit

  localparam int unsigned GIFT_LATENCY    = 3;
  localparam int unsigned PRESENT_LATENCY = 3;
  localparam int unsigned PICCOLO_LATENCY = 2;

endpackage
