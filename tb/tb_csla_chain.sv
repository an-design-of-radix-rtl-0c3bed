// tb_csla_chain: exhaustive check of the chained 2-bit CSLA adder at W = 8
// and W = 6 (the widths a 4 x 4 multiplier uses), plus W = 12 with 3-bit
// blocks on random operands. {cout, sum} must equal a + b + cin.
module tb_csla_chain;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;     logic co8;
  logic [5:0]  a6, b6, s6;     logic co6;
  logic [11:0] a12, b12, s12;  logic co12;
  logic        cin;

  csla_chain                  d8  (.a(a8),  .b(b8),  .cin(cin), .sum(s8),  .cout(co8));
  csla_chain #(.W(6))         d6  (.a(a6),  .b(b6),  .cin(cin), .sum(s6),  .cout(co6));
  csla_chain #(.W(12), .BLK(3)) d12 (.a(a12), .b(b12), .cin(cin), .sum(s12), .cout(co12));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++) begin
          cin = k[0]; a8 = 8'(x); b8 = 8'(y); a6 = 6'(x); b6 = 6'(y); #1;
          checks++;
          if (int'({co8, s8}) != x + y + k) begin
            failures++;
            $display("FAIL W=8 %0d+%0d+%0d got %0d", x, y, k, {co8, s8});
          end
          if (x < 64 && y < 64) begin
            checks++;
            if (int'({co6, s6}) != x + y + k) begin
              failures++;
              $display("FAIL W=6 %0d+%0d+%0d got %0d", x, y, k, {co6, s6});
            end
          end
        end
    for (int n = 0; n < 20000; n++) begin
      int x, y, k;
      x = int'($urandom_range(4095)); y = int'($urandom_range(4095)); k = int'($urandom_range(1));
      a12 = 12'(x); b12 = 12'(y); cin = k[0]; #1;
      checks++;
      if (int'({co12, s12}) != x + y + k) begin
        failures++;
        $display("FAIL W=12 %0d+%0d+%0d got %0d", x, y, k, {co12, s12});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
