// rca: N-bit ripple-carry adder.
//
// A chain of full adders, each bit producing sum = a ^ b ^ carry and passing
// carry' = a & b | carry & (a ^ b) to the next bit. In the 16-bit square-root
// CSLA it is the 2-bit first stage, where a carry-select structure would
// save nothing. Purely combinational, no clock.
module rca #(
  parameter int unsigned N = 2  // operand width
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  always_comb begin
    logic carry;
    carry = cin;
    for (int i = 0; i < N; i++) begin
      sum[i] = a[i] ^ b[i] ^ carry;
      carry  = (a[i] & b[i]) | (carry & (a[i] ^ b[i]));
    end
    cout = carry;
  end

endmodule
