// line_ram: single-port synchronous RAM used as a two-line ringbuffer.
//
// One access per clock: a write when `we` is high, otherwise a read whose data appears
// on `rdata` after the clock edge and stays there until the next read. The datapath
// runs many clocks per pixel, so one port is enough: the input buffer and the output
// filter each do two reads and one write per pixel. With DEPTH = 2 lines the input
// buffer RAM (16-bit words: left and right pixel) holds 1024 bytes and the output filter
// RAM (5-bit disparity codes) 320 bytes, 1344 bytes in all, which matches the on-chip
// RAM size of the fabricated chip (about 1.34 KBytes). The single-port organisation and
// the read timing are this implementation's choice. Contents are not reset; readers
// only use words they have written (see the row-validity rules of their users).
module line_ram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    else if (re) rdata <= mem[addr];
  end

endmodule
