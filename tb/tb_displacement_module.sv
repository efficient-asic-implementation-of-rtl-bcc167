// tb_displacement_module: checks best-match selection and LR-to-viewpoint mapping.
//
// The module is driven the way the controller drives it, with random costs for every
// search step (drawn from small ranges, so ties are frequent and the smaller
// displacement must win), on a 48x6 map over two frames. The expected outputs are
// worked out here from whole lines: argmin per search, LR candidates limited to
// d <= x_l, LR results mapped to x_l - d with the largest disparity kept where several
// land, and output positions one line up and BLK_W/2 + DISP_N - 1 columns back.
`timescale 1ns/1ps
module tb_displacement_module;
  import stereo_pkg::*;

  localparam int W = 48;
  localparam int H = 6;
  localparam int BW = 10;
  localparam int D = 25;
  localparam int NB = BW + D - 1;
  localparam int OFS = BW / 2 - 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic search, commit, out_valid;
  logic [4:0] d;
  logic [SSD_W-1:0] ssd_lr, ssd_rl;
  logic [6:0] ham_lr, ham_rl;
  logic [5:0] col, out_col;
  logic [2:0] row, out_row;
  disp4_t out_disp;

  displacement_module #(.IMG_W(W), .IMG_H(H), .BLK_W(BW), .DISP_N(D)) dut (
    .clk, .rst_n, .search, .d, .ssd_lr, .ssd_rl, .ham_lr, .ham_rl, .commit, .col, .row,
    .out_valid, .out_disp, .out_col, .out_row
  );

  int checks = 0, failures = 0, n_coll = 0, n_valid_lr = 0;
  // costs [x][d] of the current line, best displacements per position
  int c_slr [W][D], c_srl [W][D], c_clr [W][D], c_crl [W][D];
  int b_slr [W], b_srl [W], b_clr [W], b_crl [W];
  int m_s [W], m_c [W];

  function automatic int argmin(int c [D], int maxd);
    int b;
    b = 0;
    for (int i = 1; i <= maxd; i++) if (c[i] < c[b]) b = i;
    return b;
  endfunction

  task automatic check_v(vdisp_t got, bit ev, int ed, string what, int y, int x);
    checks++;
    if (got.valid != ev || (ev && int'(got.d) != ed)) begin
      failures++;
      if (failures < 20) $display("y%0d x%0d %s: got %0b/%0d exp %0b/%0d", y, x, what,
                                  got.valid, got.d, ev, ed);
    end
  endtask

  initial begin
    search = 0; commit = 0; d = 0; ssd_lr = 0; ssd_rl = 0; ham_lr = 0; ham_rl = 0;
    col = 0; row = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++) begin
        // costs and reference results of the whole line
        for (int x = 0; x < W; x++)
          for (int dd = 0; dd < D; dd++) begin
            c_slr[x][dd] = int'($urandom % 40); c_srl[x][dd] = int'($urandom % 40);
            c_clr[x][dd] = int'($urandom % 6);  c_crl[x][dd] = int'($urandom % 6);
          end
        for (int x = 0; x < W; x++) begin
          b_srl[x] = argmin(c_srl[x], D - 1);
          b_crl[x] = argmin(c_crl[x], D - 1);
          b_slr[x] = (x >= BW - 1) ? argmin(c_slr[x], (x - BW + 1 < D - 1) ? x - BW + 1 : D - 1) : -1;
          b_clr[x] = (x >= BW - 1) ? argmin(c_clr[x], (x - BW + 1 < D - 1) ? x - BW + 1 : D - 1) : -1;
        end
        // mapped LR per right position t (x_l = x - BW + 1 maps to t = x_l - d)
        for (int t = 0; t < W; t++) begin
          int hits;
          m_s[t] = -1; m_c[t] = -1; hits = 0;
          for (int x = BW - 1; x < W; x++) begin
            if (x - BW + 1 - b_slr[x] == t) begin
              hits++;
              if (b_slr[x] > m_s[t]) m_s[t] = b_slr[x];
            end
            if (x - BW + 1 - b_clr[x] == t && b_clr[x] > m_c[t]) m_c[t] = b_clr[x];
          end
          if (hits > 1 && y >= 2) n_coll++;
        end
        for (int x = 0; x < W; x++) begin
          int ey, ex, xr;
          bit ok;
          col = 6'(x); row = 3'(y);
          for (int dd = 0; dd < D; dd++) begin
            @(negedge clk);
            search = 1'b1; d = 5'(dd);
            ssd_lr = SSD_W'(c_slr[x][dd]); ssd_rl = SSD_W'(c_srl[x][dd]);
            ham_lr = 7'(c_clr[x][dd]);     ham_rl = 7'(c_crl[x][dd]);
          end
          @(negedge clk);
          search = 1'b0; commit = 1'b1;
          @(negedge clk);
          commit = 1'b0;
          checks++;
          if (!out_valid) begin failures++; $display("no out_valid"); end
          if (x >= NB - 1 - OFS) begin ey = (y + H - 1) % H; ex = x - (NB - 1 - OFS); end
          else begin ey = (y + H - 2) % H; ex = x + W - (NB - 1 - OFS); end
          checks++;
          if (int'(out_row) != ey || int'(out_col) != ex) begin
            failures++; $display("position (%0d,%0d) exp (%0d,%0d)", out_row, out_col, ey, ex);
          end
          ok = (y >= 2) && (x >= NB - 1);
          xr = x - NB + 1;
          check_v(out_disp.ssd_rl, ok, ok ? b_srl[x] : 0, "ssd_rl", y, x);
          check_v(out_disp.cen_rl, ok, ok ? b_crl[x] : 0, "cen_rl", y, x);
          check_v(out_disp.ssd_lr, ok && m_s[xr < 0 ? 0 : xr] >= 0, ok ? m_s[xr] : 0, "ssd_lr", y, x);
          check_v(out_disp.cen_lr, ok && m_c[xr < 0 ? 0 : xr] >= 0, ok ? m_c[xr] : 0, "cen_lr", y, x);
          if (ok && m_s[xr] >= 0) n_valid_lr++;
        end
      end
    checks += 2;
    if (n_coll == 0) begin failures++; $display("no mapping collision exercised"); end
    if (n_valid_lr == 0) begin failures++; $display("no mapped LR result"); end
    $display("collisions %0d, mapped LR results %0d", n_coll, n_valid_lr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * W * H * (D + 4) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
