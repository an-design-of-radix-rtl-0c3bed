// tb_csla_fsg: exhaustive check of the final-sum generator at N = 4.
// For every half-sum word, low carry word and cin the sum is compared with
// s0 ^ {c, cin}, computed here bit by bit with integer shifts.
module tb_csla_fsg;
  int checks = 0, failures = 0;

  localparam int N = 4;
  logic [N-1:0] s0, sum;
  logic [N-2:0] c;
  logic         cin;

  csla_fsg #(.N(N)) dut (.s0(s0), .c(c), .cin(cin), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < (1 << N); s++)
      for (int cc = 0; cc < (1 << (N - 1)); cc++)
        for (int k = 0; k < 2; k++) begin
          int want;
          s0 = N'(s); c = (N-1)'(cc); cin = k[0]; #1;
          want = 0;
          for (int i = 0; i < N; i++) begin
            int carry_in;
            carry_in = (i == 0) ? k : ((cc >> (i - 1)) & 1);
            want |= (((s >> i) & 1) ^ carry_in) << i;
          end
          checks++;
          if (int'(sum) != want) begin
            failures++;
            $display("FAIL s0=%b c=%b cin=%b: sum=%b want %0d", s0, c, cin, sum, want);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
