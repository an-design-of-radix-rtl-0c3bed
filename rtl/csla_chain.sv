// csla_chain: W-bit adder made of BLK-bit proposed carry-select adders.
//
// The operands are cut into W/BLK slices, each added by a csla_prop; the
// output carry of one slice is the input carry of the next. This is the
// adder the Booth multiplier uses for every partial-product addition, with
// 2-bit blocks by default. Chaining the blocks carry to carry is this
// design's choice. W must be a multiple of BLK, BLK >= 2.
// Purely combinational, no clock.
module csla_chain #(
  parameter int unsigned W   = 8,  // total width
  parameter int unsigned BLK = 2   // width of one CSLA block
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NBLK = W / BLK;

  logic [NBLK:0] carry;  // carry[k] enters block k

  assign carry[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    csla_prop #(.N(BLK)) u_csla (
      .a   (a[k*BLK +: BLK]),
      .b   (b[k*BLK +: BLK]),
      .cin (carry[k]),
      .sum (sum[k*BLK +: BLK]),
      .cout(carry[k+1])
    );
  end

  assign cout = carry[NBLK];

  initial begin
    assert (W % BLK == 0 && BLK >= 2)
      else $error("csla_chain: W=%0d is not a multiple of BLK=%0d >= 2", W, BLK);
  end

endmodule
