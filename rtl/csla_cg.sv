// csla_cg: carry generator (CG0 / CG1) of the proposed carry-select adder.
//
// From the half-sum and half-carry words it builds the full-carry word that
// the adder would have for a fixed input carry:
//   c1(i) = c1(i-1) & s0(i) | c0(i),   c1(-1) = CARRY_IN.
// CG0 is this module with CARRY_IN = 0, CG1 with CARRY_IN = 1; both run in
// parallel so that only the selection waits for the real input carry.
// Only carries are produced: no sum is formed for either input carry.
// Purely combinational, a ripple of AND-OR stages, no clock.
module csla_cg #(
  parameter int unsigned N        = 4,    // operand width
  parameter bit          CARRY_IN = 1'b0  // assumed input carry (0: CG0, 1: CG1)
) (
  input  logic [N-1:0] s0,  // half-sum word
  input  logic [N-1:0] c0,  // half-carry word
  output logic [N-1:0] c1   // full-carry word for input carry CARRY_IN
);

  always_comb begin
    logic carry;
    carry = CARRY_IN;
    for (int i = 0; i < N; i++) begin
      carry = (carry & s0[i]) | c0[i];
      c1[i] = carry;
    end
  end

endmodule
