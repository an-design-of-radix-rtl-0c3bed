// tb_sqrt_csla16: self-checking test of the 16-bit square-root CSLA.
// Applies a known vector (a = 0110111111110000, b = 1100111011000011, cin = 0,
// which gives sum = 0011111010110011, carry = 1 and c1..c4 = 0,0,1,1), carry
// chains that run through every stage, and random operands. The sum, the
// output carry and the inter-stage carries c1..c4 (carries out of bits 1, 3,
// 6 and 10) are compared with integer arithmetic.
module tb_sqrt_csla16;
  int checks = 0, failures = 0;

  logic [15:0] a, b, sum;
  logic        cin, carry;
  logic [3:0]  stage_c;

  sqrt_csla16 dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry), .stage_c(stage_c));

  // carry out of bit 'top' of a + b + cin
  function automatic logic carry_out(int x, int y, int k, int top);
    int m;
    m = (1 << (top + 1)) - 1;
    return 1'(((x & m) + (y & m) + k) >> (top + 1));
  endfunction

  task automatic apply(int x, int y, int k);
    int total;
    logic [3:0] want_c;
    a = 16'(x); b = 16'(y); cin = k[0]; #1;
    total  = x + y + k;
    want_c = {carry_out(x, y, k, 10), carry_out(x, y, k, 6),
              carry_out(x, y, k, 3),  carry_out(x, y, k, 1)};
    checks++;
    if (int'({carry, sum}) != total || stage_c != want_c) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0d: carry=%b sum=%h c4..c1=%b want %h / %b",
               a, b, k, carry, sum, stage_c, total, want_c);
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
    // Known vector, with the expected values written out independently.
    a = 16'b0110111111110000; b = 16'b1100111011000011; cin = 1'b0; #1;
    checks++;
    if (sum !== 16'b0011111010110011 || carry !== 1'b1 || stage_c !== 4'b1100) begin
      failures++;
      $display("FAIL known vector: sum=%b carry=%b c4..c1=%b", sum, carry, stage_c);
    end
    // Carry propagating through all stages and stage boundaries.
    apply(16'hFFFF, 0, 1);
    apply(16'hFFFF, 1, 0);
    apply(16'hFFFF, 16'hFFFF, 1);
    apply(0, 0, 0);
    for (int i = 0; i < 16; i++) begin
      apply((1 << i) - 1, 1, 0);
      apply(16'hFFFF >> i, 0, 1);
      apply(1 << i, 1 << i, 0);
    end
    for (int n = 0; n < 100000; n++)
      apply(int'($urandom_range(16'hFFFF)), int'($urandom_range(16'hFFFF)), int'($urandom_range(1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
