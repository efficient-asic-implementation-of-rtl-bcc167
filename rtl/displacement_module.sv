// displacement_module: best displacement of the four searches and perspective mapping.
//
// During the search steps of a pixel cycle (`search`, displacement `d`) it keeps, for
// each of the four searches (SSD and Census, each LR and RL), the smallest cost seen so
// far and its displacement; on equal cost the smaller displacement wins. A candidate
// counts only if both blocks lie inside the current image lines:
//   RL, reference right block at x_r = col - (NB-1): valid when col >= NB-1;
//   LR, reference left block at x_l = col - (BLK_W-1): valid for d <= x_l;
// and only from line 2 of a frame on (the block then spans lines row-2..row).
//
// On `commit` the results are brought to one viewpoint, that of the right image:
// an LR match of left block x_l at displacement d belongs to right position x_l - d.
// A window of DISP_N mapped entries per function, covering right positions
// col-NB+1 .. col-BLK_W+1, shifts by one position per pixel; the LR result is written
// at its mapped position, where a larger disparity (a nearer object) replaces a
// smaller one, and the oldest entry, which no later pixel can reach, leaves the window
// together with the RL result of the same position. The four disparities are then
// output for one map position per pixel cycle (`out_valid`, one clock), in raster
// order: the block centre is taken as column x_r + BLK_W/2 - 1 of line row-1, and
// positions that no search covered (the first and last lines, the left and right
// margins) carry four invalid values. The output follows `commit` by one clock.
// The document gives the function (best match per search, four intermediate maps,
// mapping to the output viewpoint); the window mechanism, the tie rule, the collision
// rule and the choice of the right image as the viewpoint are this design's own.
module displacement_module
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W  = stereo_pkg::IMG_W_DEF,
  parameter int unsigned IMG_H  = stereo_pkg::IMG_H_DEF,
  parameter int unsigned BLK_W  = stereo_pkg::BLK_W_DEF,
  parameter int unsigned DISP_N = stereo_pkg::DISP_N_DEF,
  localparam int unsigned XW    = $clog2(IMG_W),
  localparam int unsigned YW    = $clog2(IMG_H),
  localparam int unsigned HW    = $clog2(8 * (BLK_W - 2) + 1),
  localparam int unsigned SW    = $clog2(BLK_W * BLK_H * (2**PIX_W - 1) * (2**PIX_W - 1) + 1),
  localparam int unsigned DW    = $clog2(DISP_N + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             search,
  input  logic [DW-1:0]    d,
  input  logic [SW-1:0]    ssd_lr,
  input  logic [SW-1:0]    ssd_rl,
  input  logic [HW-1:0]    ham_lr,
  input  logic [HW-1:0]    ham_rl,
  input  logic             commit,
  input  logic [XW-1:0]    col,
  input  logic [YW-1:0]    row,
  output logic             out_valid,
  output logic [4*(DW+1)-1:0] out_disp,   // {ssd_lr, ssd_rl, cen_lr, cen_rl}, each {valid, d}
  output logic [XW-1:0]    out_col,
  output logic [YW-1:0]    out_row
);

  localparam int unsigned NB  = BLK_W + DISP_N - 1;
  localparam int unsigned OFS = BLK_W / 2 - 1;     // block centre relative to x_r

  typedef struct packed {
    logic          valid;
    logic [DW-1:0] d;
  } vd_t;

  typedef struct packed {
    vd_t ssd_lr;
    vd_t ssd_rl;
    vd_t cen_lr;
    vd_t cen_rl;
  } d4_t;

  typedef struct packed {
    logic          valid;
    logic [DW-1:0] d;
    logic [SW-1:0] cost;
  } best_t;

  d4_t od;
  assign out_disp = od;

  best_t b_ssd_lr, b_ssd_rl, b_cen_lr, b_cen_rl;
  vd_t map_ssd [DISP_N];
  vd_t map_cen [DISP_N];

  logic rows_ok, rl_ok, lr_ok;
  always_comb begin
    rows_ok = (int'(row) >= BLK_H - 1);
    rl_ok   = rows_ok && (int'(col) >= NB - 1);
    lr_ok   = rows_ok && (int'(col) >= BLK_W - 1) && (int'(d) <= int'(col) - (BLK_W - 1));
  end

  function automatic best_t upd(input best_t b, input logic ok, input logic [DW-1:0] dd,
                                input logic [SW-1:0] cost);
    if (!ok) return (dd == '0) ? best_t'('0) : b;
    if (dd == '0 || !b.valid || cost < b.cost) return '{valid: 1'b1, d: dd, cost: cost};
    return b;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_ssd_lr <= '0; b_ssd_rl <= '0; b_cen_lr <= '0; b_cen_rl <= '0;
    end else if (search) begin
      b_ssd_rl <= upd(b_ssd_rl, rl_ok, d, ssd_rl);
      b_cen_rl <= upd(b_cen_rl, rl_ok, d, SW'(ham_rl));
      b_ssd_lr <= upd(b_ssd_lr, lr_ok, d, ssd_lr);
      b_cen_lr <= upd(b_cen_lr, lr_ok, d, SW'(ham_lr));
    end
  end

  // mapping windows after this pixel's shift and write
  vd_t nxt_ssd [DISP_N];
  vd_t nxt_cen [DISP_N];

  always_comb begin
    for (int k = 0; k < DISP_N; k++) begin
      if (col == '0 || k == DISP_N - 1) begin
        nxt_ssd[k] = '0;
        nxt_cen[k] = '0;
      end else begin
        nxt_ssd[k] = map_ssd[k+1];
        nxt_cen[k] = map_cen[k+1];
      end
    end
    for (int k = 0; k < DISP_N; k++) begin
      if (b_ssd_lr.valid && int'(b_ssd_lr.d) == DISP_N - 1 - k &&
          (!nxt_ssd[k].valid || b_ssd_lr.d > nxt_ssd[k].d))
        nxt_ssd[k] = '{valid: 1'b1, d: b_ssd_lr.d};
      if (b_cen_lr.valid && int'(b_cen_lr.d) == DISP_N - 1 - k &&
          (!nxt_cen[k].valid || b_cen_lr.d > nxt_cen[k].d))
        nxt_cen[k] = '{valid: 1'b1, d: b_cen_lr.d};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DISP_N; k++) begin
        map_ssd[k] <= '0;
        map_cen[k] <= '0;
      end
      out_valid <= 1'b0;
      od        <= '0;
      out_col   <= '0;
      out_row   <= '0;
    end else begin
      out_valid <= commit;
      if (commit) begin
        map_ssd <= nxt_ssd;
        map_cen <= nxt_cen;
        if (rl_ok) begin
          od.ssd_rl <= '{valid: b_ssd_rl.valid, d: b_ssd_rl.d};
          od.cen_rl <= '{valid: b_cen_rl.valid, d: b_cen_rl.d};
          od.ssd_lr <= nxt_ssd[0];
          od.cen_lr <= nxt_cen[0];
        end else begin
          od <= '0;
        end
        // map position: column col-NB+1+OFS of line row-1, wrapping to the line before
        if (int'(col) >= NB - 1 - OFS) begin
          out_col <= XW'(int'(col) - (NB - 1 - OFS));
          out_row <= (row == '0) ? YW'(IMG_H - 1) : row - YW'(1);
        end else begin
          out_col <= XW'(int'(col) + IMG_W - (NB - 1 - OFS));
          out_row <= (row == '0) ? YW'(IMG_H - 2) :
                     (row == YW'(1)) ? YW'(IMG_H - 1) : row - YW'(2);
        end
      end
    end
  end

endmodule
