// booth_encoder: radix-4 modified Booth encoder for one digit.
//
// Three overlapping multiplier bits {y(2j+1), y(2j), y(2j-1)} give the digit
// y(2j-1) + y(2j) - 2*y(2j+1), one of -2, -1, 0, +1, +2. It is sent to the
// decoder as four controls (modified Booth encoding table):
//   one  = y(2j) ^ y(2j-1)                     |digit| = 1
//   two  = (y(2j+1) ^ y(2j)) & ~one            |digit| = 2
//   sign = y(2j+1)                             invert x in the decoder
//   cin  = y(2j+1) & ~(y(2j) & y(2j-1))        +1 completing -x or -2x
// For the group 111 (digit 0) sign is 1 but one, two and cin are 0, so the
// row is all zeros. Purely combinational, no clock.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0]  y_grp,  // {y(2j+1), y(2j), y(2j-1)}
  output booth_sel_t  sel
);

  always_comb begin
    sel.one  = y_grp[1] ^ y_grp[0];
    sel.two  = (y_grp[2] ^ y_grp[1]) & ~sel.one;
    sel.sign = y_grp[2];
    sel.cin  = y_grp[2] & ~(y_grp[1] & y_grp[0]);
  end

endmodule
