// tb_pixel_controller: checks the pixel-cycle sequence.
//
// With the input always valid, pixels must be accepted exactly every DISP_N + 3 = 28
// clocks; in each cycle rd_b, shift, the search steps d = 0..24 and commit must come
// at fixed offsets from the accept, each once. With a stalling input the controller
// must wait in phase 0 with in_ready high, and commit must still come 28 clocks
// after the previous accept.
`timescale 1ns/1ps
module tb_pixel_controller;

  localparam int D = 25;
  localparam int CYC = D + 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, accept, rd_b, shift, search, commit;
  logic [4:0] d;

  pixel_controller #(.DISP_N(D)) dut (.clk, .rst_n, .in_valid, .in_ready, .accept, .rd_b,
                                      .shift, .search, .d, .commit);

  int checks = 0, failures = 0;
  int t = 0, t_acc = -1, n_acc = 0, n_stallclk = 0;

  task automatic expect_(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("t=%0d (offset %0d): %s", t, t - t_acc, what);
    end
  endtask

  // in_valid: always during the first 40 pixels, then random gaps
  always @(negedge clk) in_valid <= (n_acc < 40) ? 1'b1 : ($urandom % 4 == 0);

  always @(posedge clk) begin
    if (rst_n) begin
      int off;
      off = t - t_acc;
      if (t_acc >= 0) begin
        expect_(rd_b   == (off == 1), "rd_b");
        expect_(shift  == (off == 2), "shift");
        expect_(search == (off >= 3 && off < CYC), "search");
        if (search) expect_(int'(d) == off - 3, "displacement");
        expect_(commit == (off == CYC), "commit");
        if (off > CYC) expect_(in_ready, "in_ready while waiting");
      end
      if (accept) begin
        if (t_acc >= 0) begin
          expect_(t - t_acc >= CYC, "accept too early");
          if (n_acc < 40) expect_(t - t_acc == CYC, "pixel cycle not 28 clocks");
        end
        t_acc = t;
        n_acc++;
      end
      if (in_ready && !in_valid) n_stallclk++;
      t++;
    end
  end

  initial begin
    in_valid = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (n_acc == 200);
    @(posedge clk);
    checks++;
    if (n_stallclk == 0) begin failures++; $display("no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * CYC * 8) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
