// tb_csla_cs: check of the carry selection unit at N = 4.
// It is driven with every legal pair of carry words (each bit of c01 set only
// where c11 is set, the only pairs a carry generator can produce) and both
// values of cin; c must equal the 2-to-1 selection and cout its top bit.
module tb_csla_cs;
  int checks = 0, failures = 0;

  localparam int N = 4;
  logic [N-1:0] c01, c11, c;
  logic         cin, cout;

  csla_cs #(.N(N)) dut (.c01(c01), .c11(c11), .cin(cin), .c(c), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int u = 0; u < (1 << N); u++)
      for (int v = 0; v < (1 << N); v++)
        for (int k = 0; k < 2; k++) begin
          logic [N-1:0] want;
          if ((u & ~v) != 0) continue;
          c01 = N'(u); c11 = N'(v); cin = k[0]; #1;
          want = cin ? c11 : c01;
          checks++;
          if (c !== want || cout !== want[N-1]) begin
            failures++;
            $display("FAIL c01=%b c11=%b cin=%b: c=%b cout=%b", c01, c11, cin, c, cout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
