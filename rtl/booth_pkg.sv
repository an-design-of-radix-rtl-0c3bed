// booth_pkg: types shared by the radix-4 modified Booth encoder and decoder.
//
// A radix-4 Booth digit takes one of the values -2, -1, 0, +1, +2. It is
// carried between the encoder and the decoder as four one-hot-style control
// signals: the sign s_j, the magnitude selects one_j (|digit| = 1) and two_j
// (|digit| = 2), and the input carry c_in,j that completes the two's
// complement of a negative row. The signal set follows the modified Booth
// encoding table; packing them into one struct is this design's choice.
package booth_pkg;

  typedef struct packed {
    logic sign;  // s_j: digit is negative (x is inverted in the decoder)
    logic one;   // one_j: select x
    logic two;   // two_j: select 2x
    logic cin;   // c_in,j: +1 that turns the inverted row into -x or -2x
  } booth_sel_t;

endpackage
