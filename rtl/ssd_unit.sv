// ssd_unit: sum of squared differences of two pixel blocks.
//
// Purely combinational: `ssd` is the sum over all BLK_H x BLK_W positions of
// (a - b)^2. For 10x3 blocks of 8-bit pixels the result fits in 21 bits. The datapath
// uses two of these (the width follows BLK_W), one for the left-to-right and one for the right-to-left search,
// each evaluating one displacement per clock. Blocks are packed as [row][column][bit],
// row 0 at the top, column 0 at the left.
module ssd_unit
  import stereo_pkg::*;
#(
  parameter int unsigned BLK_W = stereo_pkg::BLK_W_DEF,
  localparam int unsigned SW   = $clog2(BLK_W * BLK_H * (2**PIX_W - 1) * (2**PIX_W - 1) + 1)
) (
  input  logic [BLK_H-1:0][BLK_W-1:0][PIX_W-1:0] a,
  input  logic [BLK_H-1:0][BLK_W-1:0][PIX_W-1:0] b,
  output logic [SW-1:0]                           ssd
);

  always_comb begin
    logic signed [PIX_W:0] diff;
    ssd = '0;
    for (int r = 0; r < BLK_H; r++) begin
      for (int c = 0; c < BLK_W; c++) begin
        diff = $signed({1'b0, a[r][c]}) - $signed({1'b0, b[r][c]});
        ssd  = ssd + SW'(diff * diff);
      end
    end
  end

endmodule
