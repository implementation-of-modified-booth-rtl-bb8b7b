// booth_pkg: types shared by the radix-4 Booth recoder and the partial
// product generator.
//
// A radix-4 Booth digit takes one of five values, 0, +1, -1, +2 and -2. The
// recoder names the digit with booth_op_e and the partial product generator
// turns it into a row of the multiplication. The encoding of the enum values
// is this design's own choice; only the five operations come from the
// modified Booth algorithm.
package booth_pkg;

  typedef enum logic [2:0] {
    OP_ZERO = 3'd0,  // 0X
    OP_PX   = 3'd1,  // +X
    OP_P2X  = 3'd2,  // +2X
    OP_MX   = 3'd3,  // -X
    OP_M2X  = 3'd4   // -2X
  } booth_op_e;

endpackage
