// tb_csla_cg: exhaustive check of CG0 and CG1 at N = 4.
// The half-sum/half-carry words are derived from every operand pair (a, b);
// carry word bit i must equal the carry out of bit i of a + b + k, computed
// with integer arithmetic, for k = 0 (CG0) and k = 1 (CG1).
module tb_csla_cg;
  int checks = 0, failures = 0;

  localparam int N = 4;
  logic [N-1:0] s0, c0, c01, c11;

  csla_cg #(.N(N), .CARRY_IN(1'b0)) dut0 (.s0(s0), .c0(c0), .c1(c01));
  csla_cg #(.N(N), .CARRY_IN(1'b1)) dut1 (.s0(s0), .c0(c0), .c1(c11));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << N); a++)
      for (int b = 0; b < (1 << N); b++) begin
        s0 = N'(a ^ b); c0 = N'(a & b); #1;
        for (int i = 0; i < N; i++) begin
          int m, ref0, ref1;
          m    = (1 << (i + 1)) - 1;
          ref0 = (((a & m) + (b & m)) >> (i + 1)) & 1;
          ref1 = (((a & m) + (b & m) + 1) >> (i + 1)) & 1;
          checks += 2;
          if (c01[i] != ref0[0]) begin
            failures++;
            $display("FAIL CG0 a=%0d b=%0d bit %0d: got %b want %0d", a, b, i, c01[i], ref0);
          end
          if (c11[i] != ref1[0]) begin
            failures++;
            $display("FAIL CG1 a=%0d b=%0d bit %0d: got %b want %0d", a, b, i, c11[i], ref1);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
