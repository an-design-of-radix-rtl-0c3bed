// csla_fsg: final-sum generator (FSG) of the proposed carry-select adder.
//
// The selected carry word is added to the half-sum bit by bit:
//   sum(0) = s0(0) ^ cin,   sum(i) = s0(i) ^ c(i-1)  for 1 <= i < N.
// Only the N-1 low carries are needed; the top carry leaves the adder as its
// output carry instead. Purely combinational, no clock.
module csla_fsg #(
  parameter int unsigned N = 4  // operand width (N >= 2)
) (
  input  logic [N-1:0] s0,   // half-sum word
  input  logic [N-2:0] c,    // low N-1 bits of the selected carry word
  input  logic         cin,  // input carry
  output logic [N-1:0] sum   // final sum
);

  always_comb sum = s0 ^ {c, cin};

endmodule
