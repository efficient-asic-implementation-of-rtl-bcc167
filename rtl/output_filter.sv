// output_filter: 3x3 median filter over the merged disparity map.
//
// Map codes arrive one per `in_valid` in raster order with their position. Two lines
// of codes are kept in a single-port line RAM used as a ringbuffer (line r in slot
// r mod 2). For each code the filter reads the two codes above it (one clock each),
// writes the new code and shifts the three-code column into a 3x3 window. The window
// then holds lines r-2..r and columns c-2..c, centred on (r-1, c-1), and the filter
// outputs the median of its nine codes for that position three clocks after
// `in_valid`, as a one-clock `out_valid`. Positions on the border of the map, whose
// window would leave the image, get code 0 (no valid disparity). Because code 0 is
// below every disparity, isolated dropped pixels are filled from their neighbours and
// isolated stray disparities are removed. The median post-filter follows the document;
// the window size, the border rule and the selection circuit (rank counting) are this
// design's own.
module output_filter
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
  input  logic          in_valid,
  input  logic [DW-1:0] in_code,
  input  logic [XW-1:0] in_col,
  input  logic [YW-1:0] in_row,
  output logic          out_valid,
  output logic [DW-1:0] out_code,
  output logic [XW-1:0] out_col,
  output logic [YW-1:0] out_row,
  output logic          out_changed   // the median differs from the unfiltered code
);

  typedef logic [DW-1:0] code_t;

  logic [1:0]    step;               // 0 idle, 1 second read, 2 write and shift
  code_t         code_q, above2;
  logic [XW-1:0] col_q;
  logic [YW-1:0] row_q;

  logic          ram_we, ram_re;
  logic [XW:0]   ram_addr;
  code_t         ram_rdata;

  // word x of line slot s (the RAM is exactly two lines deep)
  function automatic logic [XW:0] slot_addr(input logic s, input logic [XW-1:0] x);
    return s ? (XW+1)'(IMG_W) + (XW+1)'(x) : (XW+1)'(x);
  endfunction

  code_t win [3][3];                 // [column: 0 oldest][line: 0 = r-2]

  always_comb begin
    ram_re = in_valid || (step == 2'd1);
    ram_we = (step == 2'd2);
    if (in_valid)          ram_addr = slot_addr(in_row[0], in_col);   // line r-2
    else if (step == 2'd1) ram_addr = slot_addr(~row_q[0], col_q);    // line r-1
    else                   ram_addr = slot_addr(row_q[0], col_q);     // write line r
  end

  line_ram #(.WIDTH(DW), .DEPTH(2 * IMG_W)) u_ram (
    .clk, .we(ram_we), .addr(ram_addr), .wdata(code_q), .re(ram_re), .rdata(ram_rdata)
  );

  // median of nine by rank counting: a value whose count of smaller values is at most
  // 4 and whose count of smaller-or-equal values is at least 5
  function automatic code_t median9(input code_t v [9]);
    code_t m;
    logic  found;
    m = v[0];
    found = 1'b0;
    for (int i = 0; i < 9; i++) begin
      int lt, le;
      lt = 0;
      le = 0;
      for (int j = 0; j < 9; j++) begin
        if (v[j] < v[i])  lt++;
        if (v[j] <= v[i]) le++;
      end
      if (!found && lt <= 4 && le >= 5) begin
        m = v[i];
        found = 1'b1;
      end
    end
    return m;
  endfunction

  code_t nw [3][3];
  code_t flat [9];
  code_t med;
  logic [XW-1:0] ccol;
  logic [YW-1:0] crow;
  logic border;

  always_comb begin
    nw[0] = win[1];
    nw[1] = win[2];
    nw[2] = '{above2, ram_rdata, code_q};
    for (int c = 0; c < 3; c++)
      for (int r = 0; r < 3; r++) flat[3*c + r] = nw[c][r];
    med = median9(flat);
    // centre position (r-1, c-1), wrapping to the previous line at column 0
    if (col_q == '0) begin
      ccol = XW'(IMG_W - 1);
      crow = (row_q == '0) ? YW'(IMG_H - 2) :
             (row_q == YW'(1)) ? YW'(IMG_H - 1) : row_q - YW'(2);
    end else begin
      ccol = col_q - XW'(1);
      crow = (row_q == '0) ? YW'(IMG_H - 1) : row_q - YW'(1);
    end
    border = (ccol == '0) || (ccol == XW'(IMG_W - 1)) ||
             (crow == '0) || (crow == YW'(IMG_H - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step        <= '0;
      code_q      <= '0;
      above2      <= '0;
      col_q       <= '0;
      row_q       <= '0;
      out_valid   <= 1'b0;
      out_code    <= '0;
      out_col     <= '0;
      out_row     <= '0;
      out_changed <= 1'b0;
      for (int c = 0; c < 3; c++)
        for (int r = 0; r < 3; r++) win[c][r] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        step   <= 2'd1;
        code_q <= in_code;
        col_q  <= in_col;
        row_q  <= in_row;
      end else if (step == 2'd1) begin
        step   <= 2'd2;
        above2 <= ram_rdata;
      end else if (step == 2'd2) begin
        step        <= 2'd0;
        win         <= nw;
        out_valid   <= 1'b1;
        out_code    <= border ? '0 : med;
        out_col     <= ccol;
        out_row     <= crow;
        out_changed <= !border && (med != nw[1][1]);
      end
    end
  end

endmodule
