// tb_csla_hsg: exhaustive check of the half-sum generator at N = 4 and N = 5.
// Every operand pair is applied; s0 and c0 are compared bit by bit with the
// half-adder truth table (sum bit of a+b without carry, and its carry).
module tb_csla_hsg;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4, s4, c4;
  logic [4:0] a5, b5, s5, c5;

  csla_hsg #(.N(4)) dut4 (.a(a4), .b(b4), .s0(s4), .c0(c4));
  csla_hsg #(.N(5)) dut5 (.a(a5), .b(b5), .s0(s5), .c0(c5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y); #1;
        for (int i = 0; i < 4; i++) begin
          int bitsum;
          bitsum = ((x >> i) & 1) + ((y >> i) & 1);
          checks++;
          if (s4[i] != bitsum[0] || c4[i] != bitsum[1]) begin
            failures++;
            $display("FAIL N=4 a=%b b=%b bit %0d: s0=%b c0=%b", a4, b4, i, s4[i], c4[i]);
          end
        end
      end
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++) begin
        a5 = 5'(x); b5 = 5'(y); #1;
        checks++;
        // a + b = s0 + 2*c0 for a half-adder word
        if (int'(s5) + 2 * int'(c5) != x + y) begin
          failures++;
          $display("FAIL N=5 a=%0d b=%0d: s0=%b c0=%b", x, y, s5, c5);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
