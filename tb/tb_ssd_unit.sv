// tb_ssd_unit: checks ssd_unit against sums of squared differences computed here.
//
// Covers the extremes (identical blocks give 0, all-0 against all-255 gives the
// largest sum, 30 * 255^2 = 1950750 for 10x3) and random block pairs, some of them
// nearly equal.
`timescale 1ns/1ps
module tb_ssd_unit;
  import stereo_pkg::*;

  localparam int BW = BLK_W_DEF;

  logic [BLK_H-1:0][BW-1:0][7:0] a, b;
  logic [SSD_W-1:0] ssd;

  ssd_unit #(.BLK_W(BW)) dut (.a, .b, .ssd);

  int checks = 0, failures = 0;

  task automatic check(string what);
    int e, df;
    #1;
    e = 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < BW; c++) begin
        df = int'(a[r][c]) - int'(b[r][c]);
        e += df * df;
      end
    checks++;
    if (int'(ssd) != e) begin failures++; $display("%s: ssd %0d exp %0d", what, ssd, e); end
  endtask

  initial begin
    a = '0; b = '0;
    check("zero");
    b = '1;
    check("max");
    checks++;
    if (int'(ssd) != 1950750) begin failures++; $display("max ssd %0d", ssd); end
    for (int t = 0; t < 3000; t++) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < BW; c++) begin
          a[r][c] = 8'($urandom);
          b[r][c] = (t % 2) ? 8'($urandom) : 8'(int'(a[r][c]) + int'($urandom % 5) - 2);
        end
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
