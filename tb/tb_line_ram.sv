// tb_line_ram: checks the single-port line RAM: written words read back after one
// clock, read data held while writing, and the ringbuffer access pattern of the
// datapath (read slot A, read slot B, write slot A) against a model array.
`timescale 1ns/1ps
module tb_line_ram;

  localparam int WIDTH = 16;
  localparam int DEPTH = 512;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we, re;
  logic [8:0] addr;
  logic [WIDTH-1:0] wdata, rdata;

  line_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk, .we, .addr, .wdata, .re, .rdata);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];

  task automatic wr(int ad, logic [WIDTH-1:0] v);
    @(negedge clk);
    we = 1'b1; re = 1'b0; addr = 9'(ad); wdata = v;
    @(posedge clk);
    model[ad] = v;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic rd_check(int ad);
    @(negedge clk);
    we = 1'b0; re = 1'b1; addr = 9'(ad);
    @(negedge clk);
    re = 1'b0;
    checks++;
    if (rdata !== model[ad]) begin
      failures++; $display("read %0d: %h exp %h", ad, rdata, model[ad]);
    end
  endtask

  initial begin
    logic [WIDTH-1:0] held;
    we = 0; re = 0; addr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) wr(i, WIDTH'($urandom));
    for (int i = 0; i < DEPTH; i++) rd_check(i);
    // read data must hold through a write
    rd_check(7);
    held = rdata;
    wr(8, 16'h1234);
    checks++;
    if (rdata !== held) begin failures++; $display("read data changed by a write"); end
    // ringbuffer pattern over three lines of 256
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < 256; x++) begin
        rd_check((y % 2) * 256 + x);
        rd_check(((y + 1) % 2) * 256 + x);
        wr((y % 2) * 256 + x, WIDTH'($urandom));
      end
    for (int i = 0; i < DEPTH; i++) rd_check(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
