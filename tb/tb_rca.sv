// tb_rca: exhaustive check of the ripple-carry adder at N = 2 (the width used
// in the square-root CSLA) and N = 4. {cout, sum} must equal a + b + cin.
module tb_rca;
  int checks = 0, failures = 0;

  logic [1:0] a2, b2, s2;  logic co2;
  logic [3:0] a4, b4, s4;  logic co4;
  logic       cin;

  rca            d2 (.a(a2), .b(b2), .cin(cin), .sum(s2), .cout(co2));
  rca #(.N(4))   d4 (.a(a4), .b(b4), .cin(cin), .sum(s4), .cout(co4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++) begin
          cin = k[0]; a2 = 2'(x); b2 = 2'(y); a4 = 4'(x); b4 = 4'(y); #1;
          if (x < 4 && y < 4) begin
            checks++;
            if (int'({co2, s2}) != x + y + k) begin
              failures++;
              $display("FAIL N=2 %0d+%0d+%0d got %0d", x, y, k, {co2, s2});
            end
          end
          checks++;
          if (int'({co4, s4}) != x + y + k) begin
            failures++;
            $display("FAIL N=4 %0d+%0d+%0d got %0d", x, y, k, {co4, s4});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
