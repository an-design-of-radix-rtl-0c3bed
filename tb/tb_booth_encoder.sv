// tb_booth_encoder: checks all eight three-bit groups against the modified
// Booth encoding table, written out here as constants:
//   y(2j+1) y(2j) y(2j-1) | digit | sign one two cin
//      0     0     0      |   0   |  0    0   0   0
//      0     0     1      |  +1   |  0    1   0   0
//      0     1     0      |  +1   |  0    1   0   0
//      0     1     1      |  +2   |  0    0   1   0
//      1     0     0      |  -2   |  1    0   1   1
//      1     0     1      |  -1   |  1    1   0   1
//      1     1     0      |  -1   |  1    1   0   1
//      1     1     1      |   0   |  1    0   0   0
module tb_booth_encoder;
  import booth_pkg::*;
  int checks = 0, failures = 0;

  logic [2:0] y_grp;
  booth_sel_t sel;

  booth_encoder dut (.y_grp(y_grp), .sel(sel));

  // {sign, one, two, cin} per group value
  localparam logic [3:0] TABLE [8] = '{4'b0000, 4'b0100, 4'b0100, 4'b0010,
                                       4'b1011, 4'b1101, 4'b1101, 4'b1000};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      y_grp = 3'(g); #1;
      checks++;
      if ({sel.sign, sel.one, sel.two, sel.cin} != TABLE[g]) begin
        failures++;
        $display("FAIL group %b: sign=%b one=%b two=%b cin=%b", y_grp, sel.sign, sel.one, sel.two, sel.cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
