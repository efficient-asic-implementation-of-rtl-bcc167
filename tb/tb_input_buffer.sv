// tb_input_buffer: checks the line ringbuffer and the block windows of input_buffer.
//
// A 48x6 image pair (three frames, so the ringbuffer wraps across frame ends) is fed
// with the controller's strobe pattern (accept, rd_b, shift, then search steps). In
// every search step where the blocks lie in the current frame lines, the four windows
// for that displacement are compared with the blocks cut directly from the images:
// RL reference = right image at x_r = col-33, RL candidate = left image at x_r + d,
// LR reference = left image at x_l = col-9, LR candidate = right image at x_l - d.
// The position outputs are checked too.
`timescale 1ns/1ps
module tb_input_buffer;
  import stereo_pkg::*;

  localparam int W = 48;
  localparam int H = 6;
  localparam int BW = 10;
  localparam int D = 25;
  localparam int NB = BW + D - 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic accept, in_sof, rd_b, shift;
  logic [7:0] in_left, in_right;
  logic [4:0] d;
  logic [BLK_H-1:0][BW-1:0][7:0] rl_ref, rl_cand, lr_ref, lr_cand;
  logic [5:0] col;
  logic [2:0] row;

  input_buffer #(.IMG_W(W), .IMG_H(H), .BLK_W(BW), .DISP_N(D)) dut (
    .clk, .rst_n, .accept, .in_sof, .in_left, .in_right, .rd_b, .shift, .d,
    .rl_ref, .rl_cand, .lr_ref, .lr_cand, .col, .row
  );

  int checks = 0, failures = 0;
  byte unsigned L [3][H][W];
  byte unsigned R [3][H][W];

  function automatic bit same(logic [BLK_H-1:0][BW-1:0][7:0] blk, int f, bit left, int y0, int x0);
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < BW; c++)
        if (blk[r][c] != (left ? L[f][y0+r][x0+c] : R[f][y0+r][x0+c])) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    for (int f = 0; f < 3; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          L[f][y][x] = 8'($urandom);
          R[f][y][x] = 8'($urandom);
        end
    accept = 0; in_sof = 0; rd_b = 0; shift = 0; d = 0; in_left = 0; in_right = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int f = 0; f < 3; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          accept = 1'b1; in_sof = (x == 0 && y == 0 && f == 1);  // one resync mid-stream
          in_left = L[f][y][x]; in_right = R[f][y][x];
          @(negedge clk);
          accept = 1'b0; rd_b = 1'b1;
          @(negedge clk);
          rd_b = 1'b0; shift = 1'b1;
          @(negedge clk);
          shift = 1'b0;
          checks++;
          if (int'(col) != x || int'(row) != y) begin
            failures++; $display("position (%0d,%0d) exp (%0d,%0d)", row, col, y, x);
          end
          for (int dd = 0; dd < D; dd++) begin
            d = 5'(dd);
            #1;
            if (y >= 2 && x >= NB - 1) begin
              checks += 2;
              if (!same(rl_ref, f, 0, y - 2, x - NB + 1)) begin
                failures++; $display("rl_ref f%0d y%0d x%0d", f, y, x);
              end
              if (!same(rl_cand, f, 1, y - 2, x - NB + 1 + dd)) begin
                failures++; $display("rl_cand f%0d y%0d x%0d d%0d", f, y, x, dd);
              end
            end
            if (y >= 2 && x - (BW - 1) - dd >= 0) begin
              checks += 2;
              if (!same(lr_ref, f, 1, y - 2, x - BW + 1)) begin
                failures++; $display("lr_ref f%0d y%0d x%0d", f, y, x);
                if (failures < 3) for (int c = 0; c < BW; c++) $display("  c%0d: %0d %0d %0d / %0d %0d %0d", c,
                  lr_ref[0][c], lr_ref[1][c], lr_ref[2][c], L[f][y-2][x-BW+1+c], L[f][y-1][x-BW+1+c], L[f][y][x-BW+1+c]);
              end
              if (!same(lr_cand, f, 0, y - 2, x - BW + 1 - dd)) begin
                failures++; $display("lr_cand f%0d y%0d x%0d d%0d", f, y, x, dd);
              end
            end
            @(negedge clk);
          end
          d = 0;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * W * H * 40) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
