// booth_decoder: partial-product row generator for one radix-4 Booth digit.
//
// Each bit of the row is made by the Booth decoding cell
//   x'(i)  = x(i) ^ sign
//   p(j,i) = one & x'(i) | two & x'(i-1)
// with x(-1) = 0 and x(N) = x(N-1) (the two's-complement multiplicand is
// sign-extended by one bit so that 2x fits). The row is N+1 bits wide and is
// x, 2x, 0, or the one's complement of x or 2x; for a negative digit the
// missing +1 is the encoder's cin, which the adder array adds in; sel.cin
// is therefore not read here.
// Purely combinational, no clock.
module booth_decoder
  import booth_pkg::*;
#(
  parameter int unsigned N = 4  // multiplicand width
) (
  input  logic [N-1:0] x,    // multiplicand (two's complement)
  input  booth_sel_t   sel,  // encoded digit
  output logic [N:0]   pp    // partial-product row p(j, N..0)
);

  // xs[k] holds x'(k-1): index 0 is x'(-1), index N+1 is x'(N).
  logic [N+1:0] xs;

  always_comb begin
    xs = {x[N-1], x, 1'b0} ^ {(N+2){sel.sign}};
    for (int i = 0; i <= N; i++)
      pp[i] = (sel.one & xs[i+1]) | (sel.two & xs[i]);
  end

endmodule
