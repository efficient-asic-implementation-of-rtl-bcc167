// tb_stereo_pal_large: end-to-end test of the stereo datapath scaled to a quarter-PAL
// image, 384x288, with 15x3 blocks and 37 displacements (0..36), so 40 clocks per
// pixel (one of the larger configurations the architecture is meant to scale to). Apart from the image size it
// is the same test as tb_stereo_top:
//
// Builds synthetic stereo pairs with a known geometry: a textured background at
// disparity 6, a textured foreground rectangle at disparity 15 (which hides part of the
// background from one camera, an occlusion), and a flat grey area with no texture.
// Three frames are streamed (the third only so far that the second leaves the
// pipeline); frame 0 uses the SSD-first merge configuration with exact consistency,
// frame 1 the Census-first one with tolerance 1. The input source stalls now and then.
//
// The expected map is computed from whole frames by a reference written
// independently of the RTL's streaming structure: exhaustive block search per position,
// Census codes per image pixel, LR-to-viewpoint mapping by explicit search over all
// left positions, merge and 3x3 median. Every output code and position is compared,
// and the pixel-to-output latency is checked on a stall-free stretch: the output at a
// position leaves 2*W + BLK_W - BLK_W/2 + DISP_N + 1 pixel cycles plus 5 clocks after the
// pixel at that position was accepted (2*384 + 8 + 37 + 1 = 814 pixel cycles * 40 + 5 = 32565 clocks here).
// Mechanisms counted (each must occur): input stall, consistency drop, SSD selected,
// Census selected, median correction, LR mapping collision, configuration switch.
`timescale 1ns/1ps
module tb_stereo_pal_large;
  import stereo_pkg::*;

  localparam int W   = 384;
  localparam int H   = 288;
  localparam int BW  = 15;
  localparam int D   = 37;
  localparam int NB  = BW + D - 1;
  localparam int OFS = BW / 2 - 1;
  localparam int NPIX = W * H;
  localparam int CYC  = D + 3;
  localparam int LATP = 2 * W + (NB - 1 - OFS) + 1;     // pixel cycles
  localparam int LATC = (LATP + 1) * CYC + 5;             // clocks, no stalls (see header)
  localparam int NFRAMES = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  merge_cfg_t cfg;
  logic in_valid, in_ready, in_sof;
  logic [7:0] in_left, in_right;
  logic out_valid;
  logic [$clog2(D+1)-1:0] out_code;
  logic [$clog2(W)-1:0] out_col;
  logic [$clog2(H)-1:0] out_row;

  stereo_top #(.IMG_W(W), .IMG_H(H), .BLK_W(BW), .DISP_N(D)) dut (
    .clk, .rst_n, .cfg, .in_valid, .in_ready, .in_sof, .in_left, .in_right,
    .out_valid, .out_code, .out_col, .out_row
  );

  int checks = 0, failures = 0;
  int n_stall = 0, n_drop = 0, n_ssd = 0, n_cen = 0, n_med = 0, n_coll = 0, n_cfgsw = 0;

  // images and expected maps, per frame
  byte unsigned imgL [NFRAMES+1][H][W];
  byte unsigned imgR [NFRAMES+1][H][W];
  int           expmap [NFRAMES][H][W];
  merge_cfg_t   fcfg [NFRAMES+1];

  function automatic int unsigned hash(int unsigned a);
    a = a ^ (a >> 16); a = a * 32'h7feb352d; a = a ^ (a >> 15);
    a = a * 32'h846ca68b; a = a ^ (a >> 16);
    return a;
  endfunction

  function automatic byte unsigned tex(int x, int y, int seed);
    return byte'(hash(unsigned'(x * 7919 + y * 104729 + seed * 15485863)) % 256);
  endfunction

  // scene: background disparity 6; foreground rectangle (right-image columns fx0..fx1,
  // rows fy0..fy1) at disparity 15; flat area (right columns 200..240, rows 20..60)
  task automatic make_scene(int f);
    int fx0, fx1, fy0, fy1;
    fx0 = 60 + 20 * f; fx1 = fx0 + 50; fy0 = 40; fy1 = 140;
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        // right image: the scene as seen from the right camera
        if (x >= fx0 && x <= fx1 && y >= fy0 && y <= fy1) imgR[f][y][x] = tex(x, y, 100 + f);
        else if (x >= 200 && x <= 240 && y >= 20 && y <= 60) imgR[f][y][x] = 8'd128;
        else imgR[f][y][x] = tex(x, y, 200 + f);
        // left image: a point at right column x appears at left column x + disparity
      end
      for (int x = 0; x < W; x++) begin
        int xs;
        xs = x - 15;
        if (xs >= fx0 && xs <= fx1 && y >= fy0 && y <= fy1) imgL[f][y][x] = tex(xs, y, 100 + f);
        else begin
          xs = x - 6;
          if (xs >= 200 && xs <= 240 && y >= 20 && y <= 60) imgL[f][y][x] = 8'd128;
          else imgL[f][y][x] = tex(xs, y, 200 + f);
        end
      end
    end
  endtask

  // ---------------- reference model ----------------
  function automatic byte unsigned cen8(int f, bit left, int y, int x);
    byte unsigned c, p;
    byte unsigned r;
    int k;
    r = 0; k = 7;
    c = left ? imgL[f][y][x] : imgR[f][y][x];
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++) begin
        if (dy == 0 && dx == 0) continue;
        p = left ? imgL[f][y+dy][x+dx] : imgR[f][y+dy][x+dx];
        if (p > c) r[k] = 1'b1;
        k--;
      end
    return r;
  endfunction

  // cost of right block (y0 top row, xr) against left block at xl
  function automatic int cost_ssd(int f, int y0, int xr, int xl);
    int s, df;
    s = 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < BW; c++) begin
        df = int'(imgR[f][y0+r][xr+c]) - int'(imgL[f][y0+r][xl+c]);
        s += df * df;
      end
    return s;
  endfunction

  function automatic int cost_cen(int f, int y0, int xr, int xl);
    int s;
    byte unsigned v;
    s = 0;
    for (int c = 1; c < BW - 1; c++) begin
      v = cen8(f, 0, y0 + 1, xr + c) ^ cen8(f, 1, y0 + 1, xl + c);
      s += $countones(v);
    end
    return s;
  endfunction

  task automatic ref_frame(int f, merge_cfg_t mc);
    int mapc [H][W];
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) mapc[y][x] = 0;
    for (int rc = 1; rc <= H - 2; rc++) begin
      int y0;
      int lr_s [W], lr_c [W], rl_s [W], rl_c [W];
      int mp_s [W], mp_c [W];
      y0 = rc - 1;
      for (int x = 0; x < W; x++) begin lr_s[x] = -1; lr_c[x] = -1; rl_s[x] = -1; rl_c[x] = -1;
                                        mp_s[x] = -1; mp_c[x] = -1; end
      // RL: right reference at xr, left candidate at xr + d
      for (int xr = 0; xr <= W - NB; xr++) begin
        int bs, bc, vs, vc;
        bs = 0; bc = 0; vs = 1 << 30; vc = 1 << 30;
        for (int dd = 0; dd < D; dd++) begin
          int s, c;
          s = cost_ssd(f, y0, xr, xr + dd);
          c = cost_cen(f, y0, xr, xr + dd);
          if (s < vs) begin vs = s; bs = dd; end
          if (c < vc) begin vc = c; bc = dd; end
        end
        rl_s[xr] = bs; rl_c[xr] = bc;
      end
      // LR: left reference at xl, right candidate at xl - d
      for (int xl = 0; xl <= W - BW; xl++) begin
        int bs, bc, vs, vc;
        bs = 0; bc = 0; vs = 1 << 30; vc = 1 << 30;
        for (int dd = 0; dd < D && dd <= xl; dd++) begin
          int s, c;
          s = cost_ssd(f, y0, xl - dd, xl);
          c = cost_cen(f, y0, xl - dd, xl);
          if (s < vs) begin vs = s; bs = dd; end
          if (c < vc) begin vc = c; bc = dd; end
        end
        lr_s[xl] = bs; lr_c[xl] = bc;
      end
      // mapping to right viewpoint: largest disparity among all left blocks landing there
      for (int t = 0; t < W; t++) begin
        int hits;
        hits = 0;
        for (int xl = 0; xl <= W - BW; xl++) begin
          if (xl - lr_s[xl] == t) begin
            hits++;
            if (lr_s[xl] > mp_s[t]) mp_s[t] = lr_s[xl];
          end
          if (xl - lr_c[xl] == t && lr_c[xl] > mp_c[t]) mp_c[t] = lr_c[xl];
        end
        if (hits > 1 && t <= W - NB) n_coll++;
      end
      // merge
      for (int xr = 0; xr <= W - NB; xr++) begin
        bit sok, cok;
        int code;
        sok = mc.en_ssd && mp_s[xr] >= 0 && ((mp_s[xr] > rl_s[xr] ? mp_s[xr] - rl_s[xr] : rl_s[xr] - mp_s[xr]) <= int'(mc.tol));
        cok = mc.en_census && mp_c[xr] >= 0 && ((mp_c[xr] > rl_c[xr] ? mp_c[xr] - rl_c[xr] : rl_c[xr] - mp_c[xr]) <= int'(mc.tol));
        if (cok && (mc.prefer_census || !sok)) code = rl_c[xr] + 1;
        else if (sok) code = rl_s[xr] + 1;
        else code = 0;
        mapc[rc][xr + OFS] = code;
      end
    end
    // 3x3 median, borders 0
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if (y == 0 || y == H - 1 || x == 0 || x == W - 1) expmap[f][y][x] = 0;
        else begin
          int v [9];
          int k;
          k = 0;
          for (int dy = -1; dy <= 1; dy++) for (int dx = -1; dx <= 1; dx++) begin
            v[k] = mapc[y+dy][x+dx]; k++;
          end
          v.sort();
          expmap[f][y][x] = v[4];
        end
      end
  endtask

  // ---------------- stimulus ----------------
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint unsigned acc_time [$];
  int n_acc = 0;

  initial begin
    cfg = '{en_ssd: 1'b1, en_census: 1'b1, prefer_census: 1'b0, tol: 2'd0};
    fcfg[0] = cfg;
    fcfg[1] = '{en_ssd: 1'b1, en_census: 1'b1, prefer_census: 1'b1, tol: 2'd1};
    fcfg[2] = fcfg[1];
    for (int f = 0; f <= NFRAMES; f++) make_scene(f);
    for (int f = 0; f < NFRAMES; f++) ref_frame(f, fcfg[f]);
    $display("reference done, LR mapping collisions: %0d", n_coll);
    in_valid = 1'b0; in_sof = 1'b0; in_left = '0; in_right = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f <= NFRAMES; f++) begin
      int lastp;
      lastp = (f == NFRAMES) ? 3 * W : NPIX;
      for (int p = 0; p < lastp; p++) begin
        // stall for a few clocks now and then, but never in the latency-checked frame 0
        // rows 10..20
        if (((hash(unsigned'(p + f * 7)) % 97) == 0) && !(f == 0 && p >= 10 * W && p < 20 * W + LATP)) begin
          n_stall++;
          repeat (1 + hash(unsigned'(p)) % 40) @(negedge clk);
        end
        // drive between clock edges; the pixel is taken at the first rising edge
        // where in_ready is high
        @(negedge clk);
        in_valid = 1'b1;
        in_sof   = (p == 0);
        in_left  = imgL[f][p / W][p % W];
        in_right = imgR[f][p / W][p % W];
        while (!in_ready) @(negedge clk);
        @(posedge clk);
        acc_time.push_back(cyc);
        n_acc++;
        @(negedge clk);
        in_valid = 1'b0;
        if (p == 1 && f > 0 && cfg != fcfg[f]) begin
          cfg <= fcfg[f];
          n_cfgsw++;
        end
      end
    end
    // let the last outputs leave
    repeat (5 * CYC) @(posedge clk);
    finish_tb();
  end

  // ---------------- checking ----------------
  int n_out = 0;
  int checked_codes = 0, valid_codes = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int lin, fr, pos, er, ec;
      lin = n_out - LATP;
      if (lin >= 0) begin
        fr = lin / NPIX;
        pos = lin % NPIX;
        er = pos / W; ec = pos % W;
        checks++;
        if (int'(out_row) != er || int'(out_col) != ec) begin
          failures++;
          if (failures < 10) $display("position mismatch out %0d: got (%0d,%0d) exp (%0d,%0d)",
                                      n_out, out_row, out_col, er, ec);
        end
        if (fr < NFRAMES) begin
          checks++;
          checked_codes++;
          if (out_code != 0) valid_codes++;
          if (int'(out_code) != expmap[fr][er][ec]) begin
            failures++;
            if (failures < 20) $display("code mismatch frame %0d (%0d,%0d): got %0d exp %0d",
                                        fr, er, ec, out_code, expmap[fr][er][ec]);
          end
        end
        // latency in the stall-free stretch of frame 0
        if (fr == 0 && er == 12 && ec == 100) begin
          checks++;
          if (cyc - acc_time[lin] != longint'(LATC)) begin
            failures++;
            $display("latency: got %0d clocks, expected %0d", cyc - acc_time[lin], LATC);
          end else $display("latency %0d clocks = %0d pixel cycles + %0d clocks", LATC,
                            LATC / CYC, LATC % CYC);
        end
      end
      n_out++;
    end
  end

  // merge and filter mechanisms, observed inside the design
  always @(posedge clk) begin
    if (rst_n && dut.dm_valid && (dut.u_merge.din.ssd_rl.valid || dut.u_merge.din.cen_rl.valid)) begin
      if (!dut.u_merge.ssd_ok && !dut.u_merge.cen_ok) n_drop++;
      else if (dut.u_merge.code == dut.u_merge.din.cen_rl.d + 1'b1 && dut.u_merge.cen_ok &&
               (cfg.prefer_census || !dut.u_merge.ssd_ok)) n_cen++;
      else n_ssd++;
    end
    if (rst_n && dut.out_valid && dut.of_changed) n_med++;
  end

  task automatic finish_tb();
    $display("outputs %0d, codes checked %0d (valid %0d)", n_out, checked_codes, valid_codes);
    $display("mechanisms: stall=%0d drop=%0d ssd=%0d census=%0d median=%0d collision=%0d cfgswitch=%0d",
             n_stall, n_drop, n_ssd, n_cen, n_med, n_coll, n_cfgsw);
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_drop  == 0) failures++;
    checks++; if (n_ssd   == 0) failures++;
    checks++; if (n_cen   == 0) failures++;
    checks++; if (n_med   == 0) failures++;
    checks++; if (n_coll  == 0) failures++;
    checks++; if (n_cfgsw == 0) failures++;
    checks++; if (n_out != n_acc) begin failures++; $display("outputs %0d != inputs %0d", n_out, n_acc); end
    checks++; if (valid_codes < checked_codes / 4) begin failures++; $display("too few valid codes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // watchdog
  initial begin
    repeat ((NFRAMES + 1) * NPIX * (CYC + 1) + 100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
