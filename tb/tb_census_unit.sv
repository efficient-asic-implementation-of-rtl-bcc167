// tb_census_unit: checks the Census transform and Hamming distance of census_unit.
//
// First the 10x3 block of the document's worked example, whose eight 8-bit signatures
// are known (A9 00 90 BB 21 F7 FF 44, in the printed order); then random block pairs,
// including pairs with many equal pixels (an equal neighbour must give 0), against
// signatures and distances computed here pixel by pixel.
`timescale 1ns/1ps
module tb_census_unit;
  import stereo_pkg::*;

  localparam int BW = BLK_W_DEF;

  logic [BLK_H-1:0][BW-1:0][7:0] a, b;
  logic [8*(BW-2)-1:0] sig_a, sig_b;
  logic [$clog2(8*(BW-2)+1)-1:0] ham;

  census_unit #(.BLK_W(BW)) dut (.a, .b, .sig_a, .sig_b, .ham);

  int checks = 0, failures = 0;

  function automatic logic [8*(BW-2)-1:0] ref_sig(logic [BLK_H-1:0][BW-1:0][7:0] blk);
    logic [8*(BW-2)-1:0] s;
    int k;
    k = 8 * (BW - 2) - 1;
    for (int c = 1; c < BW - 1; c++)
      for (int r = 0; r < 3; r++)
        for (int dc = -1; dc <= 1; dc++) begin
          if (r == 1 && dc == 0) continue;
          s[k] = (blk[r][c+dc] > blk[1][c]);
          k--;
        end
    return s;
  endfunction

  task automatic check(string what);
    logic [8*(BW-2)-1:0] ea, eb;
    #1;
    ea = ref_sig(a);
    eb = ref_sig(b);
    checks += 3;
    if (sig_a !== ea) begin failures++; $display("%s: sig_a %h exp %h", what, sig_a, ea); end
    if (sig_b !== eb) begin failures++; $display("%s: sig_b %h exp %h", what, sig_b, eb); end
    if (int'(ham) != $countones(ea ^ eb)) begin
      failures++; $display("%s: ham %0d exp %0d", what, ham, $countones(ea ^ eb));
    end
  endtask

  initial begin
    byte unsigned ex [3][10] = '{'{122, 32, 212, 120, 47, 89, 233, 29, 188, 61},
                                 '{1, 83, 227, 126, 88, 161, 21, 19, 150, 8},
                                 '{47, 79, 93, 37, 89, 123, 163, 180, 120, 12}};
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < BW; c++) begin
        a[r][c] = ex[r][c];
        b[r][c] = 8'd0;
      end
    #1;
    checks += 2;
    if (sig_a !== 64'hA9_00_90_BB_21_F7_FF_44) begin
      failures++; $display("worked example: %h", sig_a);
    end
    if (ham != 7'($countones(64'hA9_00_90_BB_21_F7_FF_44))) begin
      failures++; $display("worked example ham vs zero block: %0d", ham);
    end
    check("example");
    for (int t = 0; t < 2000; t++) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < BW; c++) begin
          a[r][c] = (t % 3 == 0) ? 8'($urandom % 4 + 100) : 8'($urandom);
          b[r][c] = (t % 3 == 0) ? 8'($urandom % 4 + 100) : 8'($urandom);
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
