// tb_booth_decoder: for every multiplicand x (N = 4 and N = 6) and every Booth
// digit d in {-2, -1, 0, +1, +2} the row is checked: signed(pp) + cin must
// equal d * x. The controls are driven from the encoding table written out
// here (not from the encoder), including the digit-0 group 111.
module tb_booth_decoder;
  import booth_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0] x4;  logic [4:0] pp4;
  logic [5:0] x6;  logic [6:0] pp6;
  booth_sel_t sel;

  booth_decoder            d4 (.x(x4), .sel(sel), .pp(pp4));
  booth_decoder #(.N(6))   d6 (.x(x6), .sel(sel), .pp(pp6));

  // {sign, one, two, cin} and digit value per group 000..111
  localparam logic [3:0] TABLE [8] = '{4'b0000, 4'b0100, 4'b0100, 4'b0010,
                                       4'b1011, 4'b1101, 4'b1101, 4'b1000};
  localparam int DIGIT [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      sel = TABLE[g];
      for (int xv = -32; xv < 32; xv++) begin
        x6 = 6'(xv); x4 = 4'(xv); #1;
        checks++;
        if (int'($signed(pp6)) + int'(sel.cin) != DIGIT[g] * xv) begin
          failures++;
          $display("FAIL N=6 x=%0d digit=%0d: pp=%b", xv, DIGIT[g], pp6);
        end
        if (xv >= -8 && xv < 8) begin
          checks++;
          if (int'($signed(pp4)) + int'(sel.cin) != DIGIT[g] * xv) begin
            failures++;
            $display("FAIL N=4 x=%0d digit=%0d: pp=%b", xv, DIGIT[g], pp4);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
