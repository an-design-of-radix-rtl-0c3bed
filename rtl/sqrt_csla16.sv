// sqrt_csla16: 16-bit square-root carry-select adder (SQRT-CSLA).
//
// The operands are cut into stages of growing width, so that the carry
// coming along the chain reaches each stage at about the time that stage's
// two carry words are ready:
//   bits  1:0   2-bit ripple-carry adder      -> c1
//   bits  3:2   2-bit proposed CSLA           -> c2
//   bits  6:4   3-bit proposed CSLA           -> c3
//   bits 10:7   4-bit proposed CSLA           -> c4
//   bits 15:11  5-bit proposed CSLA           -> carry
// Each proposed CSLA selects its carry word with the incoming carry before
// forming its sum, so the carry moves on through one selection per stage.
// The stage split and the carry names c1..c4 follow the published 16-bit
// structure; c1..c4 are brought out on stage_c for observation.
// Purely combinational, no clock.
module sqrt_csla16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        carry,
  output logic [3:0]  stage_c   // {c4, c3, c2, c1}
);

  logic c1, c2, c3, c4;

  rca       #(.N(2)) u_rca   (.a(a[1:0]),   .b(b[1:0]),   .cin(cin), .sum(sum[1:0]),   .cout(c1));
  csla_prop #(.N(2)) u_csla2 (.a(a[3:2]),   .b(b[3:2]),   .cin(c1),  .sum(sum[3:2]),   .cout(c2));
  csla_prop #(.N(3)) u_csla3 (.a(a[6:4]),   .b(b[6:4]),   .cin(c2),  .sum(sum[6:4]),   .cout(c3));
  csla_prop #(.N(4)) u_csla4 (.a(a[10:7]),  .b(b[10:7]),  .cin(c3),  .sum(sum[10:7]),  .cout(c4));
  csla_prop #(.N(5)) u_csla5 (.a(a[15:11]), .b(b[15:11]), .cin(c4),  .sum(sum[15:11]), .cout(carry));

  assign stage_c = {c4, c3, c2, c1};

endmodule
