// census_unit: Census transform of two pixel blocks and Hamming distance of the results.
//
// Purely combinational. In each block the BLK_W-2 inner pixels of the middle row are
// transformed with a 3x3 window: each of the 8 neighbours gives a 1 if it is brighter
// (strictly greater) than the centre pixel, else a 0. The 8 bits of one centre are
// ordered row by row, left to right, first neighbour in the most significant bit; the
// first (leftmost) centre fills the most significant byte of the signature. A 10x3
// block thus gives a 64-bit signature, and `ham` counts the bits in which the two
// signatures differ (0..64). The window size, the comparison and the use of the inner
// pixels of a 10x3 block follow the document's worked example; the bit order follows
// the way that example prints its signatures.
module census_unit
  import stereo_pkg::*;
#(
  parameter int unsigned BLK_W = stereo_pkg::BLK_W_DEF
) (
  input  logic [BLK_H-1:0][BLK_W-1:0][PIX_W-1:0] a,
  input  logic [BLK_H-1:0][BLK_W-1:0][PIX_W-1:0] b,
  output logic [8*(BLK_W-2)-1:0]                  sig_a,
  output logic [8*(BLK_W-2)-1:0]                  sig_b,
  output logic [$clog2(8*(BLK_W-2)+1)-1:0]        ham
);

  localparam int unsigned NC = BLK_W - 2;
  localparam int unsigned HW = $clog2(8 * NC + 1);

  function automatic logic [7:0] census8(input logic [BLK_H-1:0][BLK_W-1:0][PIX_W-1:0] blk,
                                         input int unsigned c);
    logic [PIX_W-1:0] ctr;
    ctr = blk[1][c];
    return {blk[0][c-1] > ctr, blk[0][c] > ctr, blk[0][c+1] > ctr,
            blk[1][c-1] > ctr,                  blk[1][c+1] > ctr,
            blk[2][c-1] > ctr, blk[2][c] > ctr, blk[2][c+1] > ctr};
  endfunction

  always_comb begin
    logic [8*NC-1:0] diff;
    for (int i = 0; i < NC; i++) begin
      sig_a[8*(NC-1-i) +: 8] = census8(a, i + 1);
      sig_b[8*(NC-1-i) +: 8] = census8(b, i + 1);
    end
    diff = sig_a ^ sig_b;
    ham  = '0;
    for (int k = 0; k < 8 * NC; k++) ham = ham + HW'(diff[k]);
  end

endmodule
