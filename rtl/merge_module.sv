// merge_module: LR-RL consistency check and priority-based selection.
//
// Takes the four intermediate disparities of one map position (SSD and Census, each
// from the LR and the RL search, already in the same viewpoint) and returns one map
// code. A function passes the consistency check when both its LR and RL results are
// valid and differ by at most `cfg.tol`; occluded areas and most weak matches in flat
// areas fail it. Among the functions that are enabled and pass, `cfg.prefer_census`
// decides which one wins (SSD by default); the winner's RL disparity d is output as
// code d+1. If no function passes, the code is 0 (no valid disparity). One result per
// `in_valid`, registered: `out_valid` follows `in_valid` by one clock, with the
// position passed along. The consistency check, the priority scheme and its
// configurability follow the document; the exact rule and the fields of `cfg` are
// this design's own.
module merge_module
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W = stereo_pkg::IMG_W_DEF,
  parameter int unsigned IMG_H = stereo_pkg::IMG_H_DEF,
  parameter int unsigned DISP_N = stereo_pkg::DISP_N_DEF,
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H),
  localparam int unsigned DW   = $clog2(DISP_N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  merge_cfg_t    cfg,
  input  logic          in_valid,
  input  logic [4*(DW+1)-1:0] in_disp,  // {ssd_lr, ssd_rl, cen_lr, cen_rl}, each {valid, d}
  input  logic [XW-1:0] in_col,
  input  logic [YW-1:0] in_row,
  output logic          out_valid,
  output logic [DW-1:0] out_code,
  output logic [XW-1:0] out_col,
  output logic [YW-1:0] out_row,
  output logic          out_ssd_ok,   // SSD passed the consistency check
  output logic          out_cen_ok    // Census passed the consistency check
);

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

  d4_t din;
  assign din = in_disp;

  function automatic logic consistent(input vd_t lr, input vd_t rl, input logic [1:0] tol);
    logic [DW-1:0] diff;
    diff = (lr.d > rl.d) ? lr.d - rl.d : rl.d - lr.d;
    return lr.valid && rl.valid && (diff <= DW'(tol));
  endfunction

  logic  ssd_ok, cen_ok;
  logic [DW-1:0] code;

  always_comb begin
    ssd_ok = cfg.en_ssd    && consistent(din.ssd_lr, din.ssd_rl, cfg.tol);
    cen_ok = cfg.en_census && consistent(din.cen_lr, din.cen_rl, cfg.tol);
    if (cen_ok && (cfg.prefer_census || !ssd_ok)) code = din.cen_rl.d + DW'(1);
    else if (ssd_ok)                             code = din.ssd_rl.d + DW'(1);
    else                                         code = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_code   <= '0;
      out_col    <= '0;
      out_row    <= '0;
      out_ssd_ok <= 1'b0;
      out_cen_ok <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_code   <= code;
        out_col    <= in_col;
        out_row    <= in_row;
        out_ssd_ok <= ssd_ok;
        out_cen_ok <= cen_ok;
      end
    end
  end

endmodule
