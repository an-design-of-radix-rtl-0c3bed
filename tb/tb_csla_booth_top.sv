// tb_csla_booth_top: end-to-end test of csla_booth_top at its default
// parameters (16-bit square-root CSLA, 4 x 4 Booth multiplier).
//
// Adder: random and directed operands; sum, output carry and c1..c4 are
// compared with integer arithmetic. Multiplier: every pair of 4-bit
// two's-complement operands, compared with the integer product.
// Besides correctness it counts how often each mechanism of the design
// occurred, judged from the operands alone, and counts a failure for any
// that never did:
//   - each inter-stage carry c1..c4 and the output carry being 1,
//   - a carry rippling from cin through all sixteen bits,
//   - each CSLA stage receiving carry 1 when its two carry words differ
//     (the selection actually changes the result),
//   - each radix-4 Booth digit -2, -1, 0 (group 000 and group 111), +1, +2,
//   - a negative partial-product row (its +1 input carry used).
module tb_csla_booth_top;
  int checks = 0, failures = 0;

  logic [15:0] add_a, add_b, add_sum;
  logic        add_cin, add_carry;
  logic [3:0]  add_stage_c;
  logic [3:0]  mul_x, mul_y;
  logic [7:0]  mul_p;

  csla_booth_top dut (
    .add_a(add_a), .add_b(add_b), .add_cin(add_cin),
    .add_sum(add_sum), .add_carry(add_carry), .add_stage_c(add_stage_c),
    .mul_x(mul_x), .mul_y(mul_y), .mul_p(mul_p)
  );

  // mechanism counters
  int n_stage_carry [5];   // c1, c2, c3, c4, carry
  int n_full_ripple;
  int n_select [4];        // CSLA stages of 2, 3, 4, 5 bits
  int n_digit [6];         // -2, -1, 0 (000), 0 (111), +1, +2
  int n_neg_row;

  localparam int LO [5] = '{0, 2, 4, 7, 11};   // stage low bits
  localparam int HI [5] = '{1, 3, 6, 10, 15};  // stage high bits

  function automatic int field(int v, int lo, int hi);
    return (v >> lo) & ((1 << (hi - lo + 1)) - 1);
  endfunction

  task automatic apply_add(int x, int y, int k);
    int total, carry_in;
    logic [4:0] want_c;
    add_a = 16'(x); add_b = 16'(y); add_cin = k[0]; #1;
    total = x + y + k;
    carry_in = k;
    for (int s = 0; s < 5; s++) begin
      int fa, fb, w;
      fa = field(x, LO[s], HI[s]); fb = field(y, LO[s], HI[s]); w = HI[s] - LO[s] + 1;
      // a CSLA stage whose carry words differ, selected by an incoming 1
      if (s > 0 && carry_in == 1 && ((fa + fb) >> w) != ((fa + fb + 1) >> w)) n_select[s-1]++;
      carry_in = (fa + fb + carry_in) >> w;
      want_c[s] = carry_in[0];
      if (carry_in == 1) n_stage_carry[s]++;
    end
    if (k == 1 && ((x ^ y) & 16'hFFFF) == 16'hFFFF) n_full_ripple++;
    checks++;
    if (int'({add_carry, add_sum}) != total || {add_carry, add_stage_c} != want_c) begin
      failures++;
      $display("FAIL add a=%h b=%h cin=%0d: carry=%b sum=%h c4..c1=%b", add_a, add_b, k,
               add_carry, add_sum, add_stage_c);
    end
  endtask

  task automatic apply_mul(int xv, int yv);
    int ye;
    mul_x = 4'(xv); mul_y = 4'(yv); #1;
    ye = (yv & 4'hF) << 1;   // {y, 0}
    for (int j = 0; j < 2; j++) begin
      int g;
      g = (ye >> (2 * j)) & 7;
      case (g)
        0: n_digit[2]++;
        1, 2: n_digit[4]++;
        3: n_digit[5]++;
        4: n_digit[0]++;
        5, 6: n_digit[1]++;
        default: n_digit[3]++;
      endcase
      if (g >= 4 && g <= 6 && xv != 0) n_neg_row++;
    end
    checks++;
    if (int'($signed(mul_p)) != xv * yv) begin
      failures++;
      $display("FAIL mul %0d*%0d got %0d", xv, yv, $signed(mul_p));
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    add_a = '0; add_b = '0; add_cin = 1'b0; mul_x = '0; mul_y = '0;
    // adder
    apply_add(16'b0110111111110000, 16'b1100111011000011, 0);
    apply_add(16'hFFFF, 16'h0000, 1);
    apply_add(16'hAAAA, 16'h5555, 1);
    for (int n = 0; n < 20000; n++)
      apply_add(int'($urandom_range(16'hFFFF)), int'($urandom_range(16'hFFFF)),
                int'($urandom_range(1)));
    // multiplier: all operand pairs
    for (int xv = -8; xv < 8; xv++)
      for (int yv = -8; yv < 8; yv++)
        apply_mul(xv, yv);

    for (int s = 0; s < 5; s++) begin
      $display("stage carry %0d was 1: %0d times", s + 1, n_stage_carry[s]);
      if (n_stage_carry[s] == 0) failures++;
    end
    $display("carry rippled through all 16 bits: %0d times", n_full_ripple);
    if (n_full_ripple == 0) failures++;
    for (int s = 0; s < 4; s++) begin
      $display("CSLA stage %0d selected the carry-1 word where it differed: %0d times", s + 2, n_select[s]);
      if (n_select[s] == 0) failures++;
    end
    for (int d = 0; d < 6; d++) begin
      $display("Booth digit class %0d (-2,-1,0/000,0/111,+1,+2) seen: %0d times", d, n_digit[d]);
      if (n_digit[d] == 0) failures++;
    end
    $display("negative partial-product rows: %0d", n_neg_row);
    if (n_neg_row == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
