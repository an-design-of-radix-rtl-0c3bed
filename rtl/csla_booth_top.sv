// csla_booth_top: the two arithmetic units built on the proposed carry-select
// adder, side by side.
//
//   * A 16-bit square-root carry-select adder (sqrt_csla16): a + b + cin,
//     with its output carry and the inter-stage carries c1..c4.
//   * A MUL_N x MUL_N two's-complement radix-4 modified Booth multiplier
//     (booth_mult) whose partial products are summed by chains of 2-bit
//     proposed CSLAs.
// The two units share no signals; each has its own ports. MUL_N = 4 by
// default (a choice; any even width works). Purely combinational: outputs
// follow the inputs after the logic delay, there is no clock or reset.
module csla_booth_top #(
  parameter int unsigned MUL_N = 4  // multiplier operand width, even
) (
  // square-root CSLA
  input  logic [15:0]        add_a,
  input  logic [15:0]        add_b,
  input  logic               add_cin,
  output logic [15:0]        add_sum,
  output logic               add_carry,
  output logic [3:0]         add_stage_c,   // {c4, c3, c2, c1}
  // Booth multiplier
  input  logic [MUL_N-1:0]   mul_x,
  input  logic [MUL_N-1:0]   mul_y,
  output logic [2*MUL_N-1:0] mul_p
);

  sqrt_csla16 u_adder (
    .a      (add_a),
    .b      (add_b),
    .cin    (add_cin),
    .sum    (add_sum),
    .carry  (add_carry),
    .stage_c(add_stage_c)
  );

  booth_mult #(.N(MUL_N)) u_mult (
    .x(mul_x),
    .y(mul_y),
    .p(mul_p)
  );

endmodule
