// csla_cs: carry selection (CS) unit of the proposed carry-select adder.
//
// It picks the carry word for the actual input carry: c = c01 when cin = 0,
// c = c11 when cin = 1, and passes the top carry c(N-1) out as cout.
// The two carry words always satisfy c01(i) = 1 -> c11(i) = 1 (a carry that
// exists with input carry 0 also exists with input carry 1), so the 2-to-1
// multiplexer reduces to c(i) = c01(i) | (cin & c11(i)). That reduced form is
// used here; an assertion checks the property it relies on.
// Purely combinational, no clock.
module csla_cs #(
  parameter int unsigned N = 4  // operand width
) (
  input  logic [N-1:0] c01,  // carry word for input carry 0 (from CG0)
  input  logic [N-1:0] c11,  // carry word for input carry 1 (from CG1)
  input  logic         cin,  // actual input carry
  output logic [N-1:0] c,    // selected carry word
  output logic         cout  // output carry c(N-1)
);

  always_comb begin
    c    = c01 | ({N{cin}} & c11);
    cout = c[N-1];
  end

  // The reduction above is only a multiplexer while CG0's carries imply CG1's.
  always_comb begin
    assert ((c01 & ~c11) == '0)
      else $error("csla_cs: c01 has a carry that c11 lacks (c01=%b c11=%b)", c01, c11);
  end

endmodule
