// booth_mult: N x N two's-complement radix-4 modified Booth multiplier whose
// partial products are summed by carry-select adders of the proposed kind.
//
// Structure:
//   * Booth encoding: y is read in N/2 overlapping three-bit groups
//     {y(2j+1), y(2j), y(2j-1)}, y(-1) = 0, each giving one digit in
//     {-2..+2} (booth_encoder). This halves the number of rows.
//   * Booth decoding / partial-product generation: each digit selects
//     0, x, 2x or their one's complement as an N+1 bit row (booth_decoder).
//   * Adder array: the running sum starts at zero; row j, sign-extended, is
//     added to bits 2N-1..2j of it by a csla_chain of 2-bit proposed CSLAs,
//     with the row's c_in,j as the chain's input carry. Bits below 2j are
//     already final. The last stage's result is the 2N-bit product.
// Summing rows in a linear array of 2-bit CSLA chains and feeding c_in,j as
// carry-in are this design's choices; the encoding, the decoding cell and
// the use of 2-bit proposed CSLAs follow the published scheme. The default
// N = 4 is a choice (N must be even). Purely combinational, no clock.
module booth_mult
  import booth_pkg::*;
#(
  parameter int unsigned N = 4  // operand width, even
) (
  input  logic [N-1:0]   x,  // multiplicand
  input  logic [N-1:0]   y,  // multiplier (Booth-recoded)
  output logic [2*N-1:0] p   // product x * y
);

  localparam int unsigned ROWS = N / 2;
  localparam int unsigned PW   = 2 * N;

  logic [N:0]      y_ext;              // {y, y(-1) = 0}
  booth_sel_t      sel  [ROWS];
  logic [N:0]      pp   [ROWS];
  logic [PW-1:0]   acc  [ROWS+1];      // acc[j]: sum of rows 0..j-1

  assign y_ext  = {y, 1'b0};
  assign acc[0] = '0;

  for (genvar j = 0; j < ROWS; j++) begin : g_row
    localparam int unsigned AW = PW - 2 * j;  // width still being summed

    logic [AW-1:0] row_ext;
    logic          unused_cout;  // carries beyond bit 2N-1 are dropped (mod 2^2N)

    booth_encoder u_enc (.y_grp(y_ext[2*j +: 3]), .sel(sel[j]));

    booth_decoder #(.N(N)) u_dec (.x(x), .sel(sel[j]), .pp(pp[j]));

    assign row_ext = AW'($signed(pp[j]));

    csla_chain #(.W(AW), .BLK(2)) u_add (
      .a   (acc[j][PW-1:2*j]),
      .b   (row_ext),
      .cin (sel[j].cin),
      .sum (acc[j+1][PW-1:2*j]),
      .cout(unused_cout)
    );

    if (j > 0) begin : g_low
      assign acc[j+1][2*j-1:0] = acc[j][2*j-1:0];
    end
  end

  assign p = acc[ROWS];

  initial begin
    assert (N % 2 == 0 && N >= 2) else $error("booth_mult: N=%0d must be even", N);
  end

endmodule
