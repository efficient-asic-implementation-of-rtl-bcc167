// stereo_top: real-time stereo depth mapping, two pixel streams in, one disparity map out.
//
// Two rectified 8-bit grayscale cameras deliver their images as one left/right pixel
// pair per transfer, in raster order (`in_valid`/`in_ready` handshake, `in_sof` on the
// first pixel of a frame). Each pixel cycle of DISP_N+3 clocks (28 for the default
// 25 displacements) the design:
//   1. input_buffer: stores the pair in a two-line RAM ringbuffer and shifts the
//      three-pixel columns of both images into two shift register banks;
//   2. 2 x ssd_unit, 2 x census_unit: compare, one displacement per clock, a 10x3 right
//      block with left blocks (RL) and a 10x3 left block with right blocks (LR);
//   3. displacement_module: keeps the best displacement of each of the four searches
//      and maps the LR results to the right image's viewpoint;
//   4. merge_module: LR-RL consistency check per function, priority selection;
//   5. output_filter: 3x3 median filter.
// No frame is ever stored: 2 image lines per camera and 2 lines of the map are the only
// memories. `out_code` is 0 for "no valid disparity", else disparity + 1 (0..24 -> 1..25);
// `out_row`/`out_col` give its position. One map code leaves per accepted pixel pair.
// The code of a position leaves 2*IMG_W + BLK_W - BLK_W/2 + DISP_N + 1 pixel cycles plus
// 5 clocks after the pixel pair of the same position was accepted: 543 * 28 + 5 = 15209 clocks
// for the defaults when the input never stalls. The map thus trails the input by a
// little over two lines, and the last lines of a frame leave while the next frame
// enters (a source that stops after a frame must send two more lines to flush it). The
// sink must take every `out_valid` pulse. At 75 MHz and 28 clocks per pixel a 256x192 frame
// takes 18.35 ms: 54.5 frames per second.
// The block structure, sizes, pixel cycle and algorithm follow the document; the
// handshake, the map code and all details noted in the sub-modules are this design's.
// The document quotes 15,204 clocks (exactly 543 pixel cycles) of latency for its chip.
module stereo_top
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W  = stereo_pkg::IMG_W_DEF,
  parameter int unsigned IMG_H  = stereo_pkg::IMG_H_DEF,
  parameter int unsigned BLK_W  = stereo_pkg::BLK_W_DEF,
  parameter int unsigned DISP_N = stereo_pkg::DISP_N_DEF,
  localparam int unsigned XW    = $clog2(IMG_W),
  localparam int unsigned YW    = $clog2(IMG_H),
  localparam int unsigned DW    = $clog2(DISP_N + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  merge_cfg_t       cfg,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic             in_sof,
  input  logic [PIX_W-1:0] in_left,
  input  logic [PIX_W-1:0] in_right,
  output logic             out_valid,
  output logic [DW-1:0]    out_code,
  output logic [XW-1:0]    out_col,
  output logic [YW-1:0]    out_row
);

  localparam int unsigned HW = $clog2(8 * (BLK_W - 2) + 1);
  localparam int unsigned SW = $clog2(BLK_W * BLK_H * (2**PIX_W - 1) * (2**PIX_W - 1) + 1);

  logic       accept, rd_b, shift, search, commit;
  logic [DW-1:0] d;

  pixel_controller #(.DISP_N(DISP_N)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .accept, .rd_b, .shift, .search, .d, .commit
  );

  logic [BLK_H-1:0][BLK_W-1:0][PIX_W-1:0] rl_ref, rl_cand, lr_ref, lr_cand;
  logic [XW-1:0] col;
  logic [YW-1:0] row;

  input_buffer #(.IMG_W(IMG_W), .IMG_H(IMG_H), .BLK_W(BLK_W), .DISP_N(DISP_N)) u_inbuf (
    .clk, .rst_n, .accept, .in_sof, .in_left, .in_right, .rd_b, .shift, .d,
    .rl_ref, .rl_cand, .lr_ref, .lr_cand, .col, .row
  );

  logic [SW-1:0]    ssd_lr, ssd_rl;
  logic [HW-1:0]    ham_lr, ham_rl;
  logic [8*(BLK_W-2)-1:0] sig_lr_a, sig_lr_b, sig_rl_a, sig_rl_b;

  ssd_unit    #(.BLK_W(BLK_W)) u_ssd_lr (.a(lr_ref), .b(lr_cand), .ssd(ssd_lr));
  ssd_unit    #(.BLK_W(BLK_W)) u_ssd_rl (.a(rl_ref), .b(rl_cand), .ssd(ssd_rl));
  census_unit #(.BLK_W(BLK_W)) u_cen_lr (.a(lr_ref), .b(lr_cand),
                                         .sig_a(sig_lr_a), .sig_b(sig_lr_b), .ham(ham_lr));
  census_unit #(.BLK_W(BLK_W)) u_cen_rl (.a(rl_ref), .b(rl_cand),
                                         .sig_a(sig_rl_a), .sig_b(sig_rl_b), .ham(ham_rl));

  logic          dm_valid;
  logic [4*(DW+1)-1:0] dm_disp;
  logic [XW-1:0] dm_col;
  logic [YW-1:0] dm_row;

  displacement_module #(.IMG_W(IMG_W), .IMG_H(IMG_H), .BLK_W(BLK_W), .DISP_N(DISP_N)) u_disp (
    .clk, .rst_n, .search, .d, .ssd_lr, .ssd_rl, .ham_lr, .ham_rl, .commit, .col, .row,
    .out_valid(dm_valid), .out_disp(dm_disp), .out_col(dm_col), .out_row(dm_row)
  );

  logic          mg_valid, mg_ssd_ok, mg_cen_ok;
  logic [DW-1:0] mg_code;
  logic [XW-1:0] mg_col;
  logic [YW-1:0] mg_row;

  merge_module #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DISP_N(DISP_N)) u_merge (
    .clk, .rst_n, .cfg, .in_valid(dm_valid), .in_disp(dm_disp), .in_col(dm_col),
    .in_row(dm_row), .out_valid(mg_valid), .out_code(mg_code), .out_col(mg_col),
    .out_row(mg_row), .out_ssd_ok(mg_ssd_ok), .out_cen_ok(mg_cen_ok)
  );

  logic of_changed;

  output_filter #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DISP_N(DISP_N)) u_filt (
    .clk, .rst_n, .in_valid(mg_valid), .in_code(mg_code), .in_col(mg_col), .in_row(mg_row),
    .out_valid, .out_code, .out_col, .out_row, .out_changed(of_changed)
  );

  // the sink has no back-pressure; an accepted pixel must not be lost in the pipeline
  assert property (@(posedge clk) disable iff (!rst_n) accept |-> !search && !shift);

endmodule
