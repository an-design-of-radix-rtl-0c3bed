// csla_hsg: half-sum generator (HSG) of the proposed carry-select adder.
//
// For each bit position it forms the half-sum s0(i) = a(i) ^ b(i) and the
// half-carry c0(i) = a(i) & b(i). These two words are all that the carry
// generators and the final-sum generator need; nothing is computed for the
// two possible input carries here. Purely combinational, no clock.
module csla_hsg #(
  parameter int unsigned N = 4  // operand width
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s0,  // half-sum word
  output logic [N-1:0] c0   // half-carry word
);

  always_comb begin
    s0 = a ^ b;
    c0 = a & b;
  end

endmodule
