// csla_prop: N-bit carry-select adder with the proposed logic formulation.
//
// The adder never builds two complete sums. Instead:
//   HSG  : s0 = a ^ b, c0 = a & b                 (half-sum, half-carry)
//   CG0  : carry word for input carry 0            (c01)
//   CG1  : carry word for input carry 1            (c11)
//   CS   : c = cin ? c11 : c01, cout = c(N-1)      (selection before the sum)
//   FSG  : sum = s0 ^ {c(N-2:0), cin}              (final sum)
// Because the selection is made on carries, the output carry is ready as soon
// as the CS unit has switched, without waiting for the final-sum XORs; this is
// what makes the block attractive as a stage of a square-root CSLA.
// The top selected carry c(N-1) leaves through the CS unit's cout, so the
// local copy of it is not read.
// Unit split and connections follow the proposed CSLA structure; the default
// width N = 4 is a choice (the structure is generic in N, N >= 2).
// Purely combinational, no clock.
module csla_prop #(
  parameter int unsigned N = 4  // operand width (N >= 2)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N-1:0] s0, c0;    // half-sum and half-carry words
  logic [N-1:0] c01, c11;  // carry words for input carry 0 and 1
  logic [N-1:0] c;         // selected carry word

  csla_hsg #(.N(N)) u_hsg (.a(a), .b(b), .s0(s0), .c0(c0));

  csla_cg #(.N(N), .CARRY_IN(1'b0)) u_cg0 (.s0(s0), .c0(c0), .c1(c01));
  csla_cg #(.N(N), .CARRY_IN(1'b1)) u_cg1 (.s0(s0), .c0(c0), .c1(c11));

  csla_cs #(.N(N)) u_cs (.c01(c01), .c11(c11), .cin(cin), .c(c), .cout(cout));

  csla_fsg #(.N(N)) u_fsg (.s0(s0), .c(c[N-2:0]), .cin(cin), .sum(sum));

endmodule
