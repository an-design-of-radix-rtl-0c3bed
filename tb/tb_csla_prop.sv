// tb_csla_prop: exhaustive check of the proposed carry-select adder at the
// widths the design uses (2, 3, 4, 5). {cout, sum} must equal a + b + cin.
module tb_csla_prop;
  int checks = 0, failures = 0;

  logic [1:0] a2, b2, s2;  logic co2;
  logic [2:0] a3, b3, s3;  logic co3;
  logic [3:0] a4, b4, s4;  logic co4;
  logic [4:0] a5, b5, s5;  logic co5;
  logic       cin;

  csla_prop #(.N(2)) d2 (.a(a2), .b(b2), .cin(cin), .sum(s2), .cout(co2));
  csla_prop #(.N(3)) d3 (.a(a3), .b(b3), .cin(cin), .sum(s3), .cout(co3));
  csla_prop            d4 (.a(a4), .b(b4), .cin(cin), .sum(s4), .cout(co4));
  csla_prop #(.N(5)) d5 (.a(a5), .b(b5), .cin(cin), .sum(s5), .cout(co5));

  task automatic check(int n, int x, int y, int k, int got);
    checks++;
    if (got != x + y + k) begin
      failures++;
      $display("FAIL N=%0d a=%0d b=%0d cin=%0d: got %0d want %0d", n, x, y, k, got, x + y + k);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++)
      for (int x = 0; x < 32; x++)
        for (int y = 0; y < 32; y++) begin
          cin = k[0];
          a2 = 2'(x); b2 = 2'(y); a3 = 3'(x); b3 = 3'(y);
          a4 = 4'(x); b4 = 4'(y); a5 = 5'(x); b5 = 5'(y);
          #1;
          if (x < 4 && y < 4)   check(2, x, y, k, int'({co2, s2}));
          if (x < 8 && y < 8)   check(3, x, y, k, int'({co3, s3}));
          if (x < 16 && y < 16) check(4, x, y, k, int'({co4, s4}));
          check(5, x, y, k, int'({co5, s5}));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
