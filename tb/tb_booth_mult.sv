// tb_booth_mult: exhaustive check of the Booth multiplier at N = 4 (default)
// and N = 8, and random operands at N = 16. The product must equal the
// integer product of the two's-complement operands.
module tb_booth_mult;
  int checks = 0, failures = 0;

  logic [3:0]  x4, y4;    logic [7:0]  p4;
  logic [7:0]  x8, y8;    logic [15:0] p8;
  logic [15:0] x16, y16;  logic [31:0] p16;

  booth_mult            d4  (.x(x4),  .y(y4),  .p(p4));
  booth_mult #(.N(8))   d8  (.x(x8),  .y(y8),  .p(p8));
  booth_mult #(.N(16))  d16 (.x(x16), .y(y16), .p(p16));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = -128; xv < 128; xv++)
      for (int yv = -128; yv < 128; yv++) begin
        x8 = 8'(xv); y8 = 8'(yv); x4 = 4'(xv); y4 = 4'(yv); #1;
        checks++;
        if (int'($signed(p8)) != xv * yv) begin
          failures++;
          $display("FAIL N=8 %0d*%0d got %0d", xv, yv, $signed(p8));
        end
        if (xv >= -8 && xv < 8 && yv >= -8 && yv < 8) begin
          checks++;
          if (int'($signed(p4)) != xv * yv) begin
            failures++;
            $display("FAIL N=4 %0d*%0d got %0d", xv, yv, $signed(p4));
          end
        end
      end
    for (int n = 0; n < 20000; n++) begin
      int xv, yv;
      xv = int'($signed(16'($urandom))); yv = int'($signed(16'($urandom)));
      if (n == 0) begin xv = -32768; yv = -32768; end
      x16 = 16'(xv); y16 = 16'(yv); #1;
      checks++;
      if (longint'($signed(p16)) != longint'(xv) * longint'(yv)) begin
        failures++;
        $display("FAIL N=16 %0d*%0d got %0d", xv, yv, $signed(p16));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
