// tb_output_filter: checks the 3x3 median filter.
//
// Streams three frames of random 20x8 maps (codes 0..25, with flat patches and lone
// outliers so that the median both keeps and changes values) in raster order, one
// code every 28 clocks. Each output must come 3 clocks after its input, carry the
// position one line and one column behind it, and, from the second frame on, hold
// the median of the nine neighbours computed here (0 on the map border).
`timescale 1ns/1ps
module tb_output_filter;
  import stereo_pkg::*;

  localparam int W = 20;
  localparam int H = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, out_valid, out_changed;
  disp_t in_code, out_code;
  logic [4:0] in_col, out_col;
  logic [2:0] in_row, out_row;

  output_filter #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .in_valid, .in_code, .in_col,
    .in_row, .out_valid, .out_code, .out_col, .out_row, .out_changed);

  int checks = 0, failures = 0, n_changed = 0, n_out = 0;
  int m [3][H][W];
  int t = 0, t_in = 0;

  always @(posedge clk) t <= t + 1;

  function automatic int med(int f, int y, int x);
    int v [9];
    int k;
    if (y == 0 || y == H - 1 || x == 0 || x == W - 1) return 0;
    k = 0;
    for (int dy = -1; dy <= 1; dy++) for (int dx = -1; dx <= 1; dx++) begin
      v[k] = m[f][y+dy][x+dx]; k++;
    end
    v.sort();
    return v[4];
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int lin, f, y, x;
      lin = n_out - (W + 1);
      checks++;
      if (t - t_in != 3) begin failures++; $display("output %0d clocks after input", t - t_in); end
      if (lin >= 0) begin
        f = lin / (W * H); y = (lin % (W * H)) / W; x = lin % W;
        checks++;
        if (int'(out_row) != y || int'(out_col) != x) begin
          failures++; $display("position (%0d,%0d) exp (%0d,%0d)", out_row, out_col, y, x);
        end
        if (f >= 1 && f < 3) begin
          checks++;
          if (int'(out_code) != med(f, y, x)) begin
            failures++;
            $display("f%0d (%0d,%0d): %0d exp %0d", f, y, x, out_code, med(f, y, x));
          end
          if (out_changed) n_changed++;
        end
      end
      n_out++;
    end
  end

  initial begin
    for (int f = 0; f < 3; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          if (x < 6 && y < 5) m[f][y][x] = ($urandom % 6 == 0) ? int'($urandom % 26) : 9;
          else m[f][y][x] = int'($urandom % 26);
        end
    in_valid = 0; in_code = 0; in_col = 0; in_row = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int f = 0; f < 3; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 1'b1; in_code = disp_t'(m[f][y][x]);
          in_col = 5'(x); in_row = 3'(y);
          @(posedge clk);
          t_in = t;
          @(negedge clk);
          in_valid = 1'b0;
          repeat (26) @(negedge clk);
        end
    repeat (10) @(posedge clk);
    checks++;
    if (n_changed == 0) begin failures++; $display("median never changed a value"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * W * H * 30 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
