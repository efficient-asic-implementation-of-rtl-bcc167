// input_buffer: line ringbuffer and shift register banks of the two input images.
//
// A single-port line RAM (two lines deep, one word = left and right pixel) holds image
// lines y-2 and y-1; line y is stored in slot y mod 2, which is also the slot of line
// y-2, so each word is read just before it is overwritten. Per pixel pair the buffer
// reads the two older pixels of the same column (`accept`, `rd_b`), writes the new pair
// and shifts the three-pixel column {y-2, y-1, y} into one shift register bank per
// image (`shift`). A bank is NB = BLK_W + DISP_N - 1 columns wide (34 for the default
// sizes); column 0 is the oldest (image column x-NB+1), column NB-1 the newest (x).
//
// From the banks it selects the blocks compared at displacement `d`:
//   RL (reference in the right image):  right block at bank columns 0..BLK_W-1 against
//                                       the left block shifted right by d.
//   LR (reference in the left image):   left block at bank columns NB-BLK_W..NB-1
//                                       against the right block shifted left by d.
// `col`/`row` give the image position of the newest bank column; `in_sof` on an
// accepted pixel restarts the position at (0,0). The ringbuffer and the two banks
// follow the document; the RAM word layout, the access order and the window
// placement are this implementation's choices.
module input_buffer
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
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   accept,
  input  logic                                   in_sof,
  input  logic [PIX_W-1:0]                       in_left,
  input  logic [PIX_W-1:0]                       in_right,
  input  logic                                   rd_b,
  input  logic                                   shift,
  input  logic [DW-1:0]                          d,
  output logic [BLK_H-1:0][BLK_W-1:0][PIX_W-1:0] rl_ref,
  output logic [BLK_H-1:0][BLK_W-1:0][PIX_W-1:0] rl_cand,
  output logic [BLK_H-1:0][BLK_W-1:0][PIX_W-1:0] lr_ref,
  output logic [BLK_H-1:0][BLK_W-1:0][PIX_W-1:0] lr_cand,
  output logic [XW-1:0]                          col,
  output logic [YW-1:0]                          row
);

  localparam int unsigned NB = BLK_W + DISP_N - 1;

  // position of the next pixel and of the pixel being loaded
  logic [XW-1:0] nx, cx;
  logic [YW-1:0] ny, cy;
  logic [PIX_W-1:0] new_l, new_r;
  logic [2*PIX_W-1:0] old2;          // line y-2 word, captured after the first read

  // RAM port
  logic                    ram_we, ram_re;
  logic [XW:0]             ram_addr;
  logic [2*PIX_W-1:0]      ram_wdata, ram_rdata;

  // banks: [column][row], row 0 = line y-2
  logic [NB-1:0][BLK_H-1:0][PIX_W-1:0] bank_l, bank_r;

  // word x of line slot s (the RAM is exactly two lines deep)
  function automatic logic [XW:0] slot_addr(input logic s, input logic [XW-1:0] x);
    return s ? (XW+1)'(IMG_W) + (XW+1)'(x) : (XW+1)'(x);
  endfunction

  logic [XW-1:0] ax;
  logic [YW-1:0] ay;
  always_comb begin
    ax = in_sof ? '0 : nx;
    ay = in_sof ? '0 : ny;
  end

  always_comb begin
    ram_we    = shift;
    ram_re    = accept || rd_b;
    ram_wdata = {new_l, new_r};
    if (accept)    ram_addr = slot_addr(ay[0], ax);
    else if (rd_b) ram_addr = slot_addr(~cy[0], cx);
    else           ram_addr = slot_addr(cy[0], cx);
  end

  line_ram #(.WIDTH(2 * PIX_W), .DEPTH(2 * IMG_W)) u_ram (
    .clk, .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .re(ram_re), .rdata(ram_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nx <= '0; ny <= '0; cx <= '0; cy <= '0;
      col <= '0; row <= '0;
      new_l <= '0; new_r <= '0; old2 <= '0;
    end else begin
      if (accept) begin
        new_l <= in_left;
        new_r <= in_right;
        cx    <= ax;
        cy    <= ay;
        if (ax == XW'(IMG_W - 1)) begin
          nx <= '0;
          ny <= (ay == YW'(IMG_H - 1)) ? '0 : ay + YW'(1);
        end else begin
          nx <= ax + XW'(1);
          ny <= ay;
        end
      end
      if (rd_b) old2 <= ram_rdata;
      if (shift) begin
        col <= cx;
        row <= cy;
      end
    end
  end

  // bank contents need no reset: windows are only used where every column is from the
  // current frame area, which the displacement module checks with `col`/`row`.
  always_ff @(posedge clk) begin
    if (shift) begin
      for (int k = 0; k < NB - 1; k++) begin
        bank_l[k] <= bank_l[k+1];
        bank_r[k] <= bank_r[k+1];
      end
      bank_l[NB-1] <= {new_l, ram_rdata[2*PIX_W-1:PIX_W], old2[2*PIX_W-1:PIX_W]};
      bank_r[NB-1] <= {new_r, ram_rdata[PIX_W-1:0],       old2[PIX_W-1:0]};
    end
  end

  // window selection (d is limited to the bank so that no index leaves it)
  int unsigned dd;
  always_comb begin
    dd = (int'(d) > DISP_N - 1) ? DISP_N - 1 : int'(d);
    for (int r = 0; r < BLK_H; r++) begin
      for (int c = 0; c < BLK_W; c++) begin
        rl_ref[r][c]  = bank_r[c][r];
        rl_cand[r][c] = bank_l[c + dd][r];
        lr_ref[r][c]  = bank_l[NB - BLK_W + c][r];
        lr_cand[r][c] = bank_r[NB - BLK_W + c - dd][r];
      end
    end
  end

  initial assert (IMG_H % 2 == 0) else $error("IMG_H must be even for the line ringbuffer");

endmodule
