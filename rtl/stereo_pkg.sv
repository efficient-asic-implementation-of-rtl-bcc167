// stereo_pkg: sizes, types and constants shared by the stereo depth-mapping datapath.
//
// The design compares 10x3 pixel blocks of two 8-bit grayscale images over 25
// displacements (0..24). The image size (256x192), the block size, the displacement
// range and the pixel depth are those of the fabricated configuration. Everything else
// here (the code used for "no valid disparity", the merge configuration fields) is a
// choice of this implementation.
//
// The modules derive their own widths from their parameters (displacement and map
// code: $clog2(DISP_N+1) bits; SSD: enough for BLK_W x 3 blocks); the typed widths
// below are those of the default configuration, which the testbenches use.
//
// Disparity map code: the merged and filtered map carries 5-bit codes. Code 0 means
// "no valid disparity" (dropped by the consistency check or outside the searchable
// area); code k (1..25) means disparity k-1. Ordering invalid below every disparity lets
// the median filter treat dropped pixels like the darkest value of the map.
package stereo_pkg;

  localparam int unsigned IMG_W_DEF  = 256;  // image width in pixels
  localparam int unsigned IMG_H_DEF  = 192;  // image height in lines
  localparam int unsigned PIX_W      = 8;    // grayscale bits per pixel
  localparam int unsigned BLK_W_DEF  = 10;   // correlation block width
  localparam int unsigned BLK_H      = 3;    // correlation block height (fixed: Census needs 3 rows)
  localparam int unsigned DISP_N_DEF = 25;   // number of displacements searched (0..24)
  localparam int unsigned DISP_W     = 5;    // bits of a disparity value / map code

  // SSD of a 10x3 block: at most 30*255^2, 21 bits.
  localparam int unsigned SSD_W = $clog2(BLK_W_DEF * BLK_H * (2**PIX_W - 1) * (2**PIX_W - 1) + 1);

  localparam logic [DISP_W-1:0] CODE_INVALID = '0;

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [DISP_W-1:0] disp_t;

  // One disparity with its validity flag.
  typedef struct packed {
    logic  valid;
    disp_t d;
  } vdisp_t;

  // Four intermediate disparities of one output position: LR and RL for each function.
  typedef struct packed {
    vdisp_t ssd_lr;
    vdisp_t ssd_rl;
    vdisp_t cen_lr;
    vdisp_t cen_rl;
  } disp4_t;

  // Run-time configuration of the merge function.
  typedef struct packed {
    logic       en_ssd;         // use SSD results
    logic       en_census;      // use Census results
    logic       prefer_census;  // Census wins when both functions pass the check
    logic [1:0] tol;            // allowed |LR - RL| difference in the consistency check
  } merge_cfg_t;

  localparam merge_cfg_t MERGE_CFG_DEFAULT = '{en_ssd: 1'b1, en_census: 1'b1,
                                               prefer_census: 1'b0, tol: 2'd0};

endpackage
