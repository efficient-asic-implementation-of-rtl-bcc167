// tb_merge_module: checks the consistency check and priority selection of
// merge_module with random intermediate disparities and configurations (most pairs
// are made close, so that every tolerance matters), against a rule written out here.
`timescale 1ns/1ps
module tb_merge_module;
  import stereo_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  merge_cfg_t cfg;
  logic in_valid, out_valid, out_ssd_ok, out_cen_ok;
  disp4_t in_disp;
  logic [7:0] in_col, out_col, in_row, out_row;
  disp_t out_code;

  merge_module dut (.clk, .rst_n, .cfg, .in_valid, .in_disp, .in_col, .in_row,
                    .out_valid, .out_code, .out_col, .out_row, .out_ssd_ok, .out_cen_ok);

  int checks = 0, failures = 0;
  int n_ssd = 0, n_cen = 0, n_none = 0;

  function automatic vdisp_t rnd_near(vdisp_t base);
    vdisp_t v;
    int dd;
    v.valid = ($urandom % 8) != 0;
    dd = int'(base.d) + int'($urandom % 5) - 2;
    if (dd < 0) dd = 0;
    if (dd > 24) dd = 24;
    v.d = ($urandom % 4 == 0) ? 5'($urandom % 25) : 5'(dd);
    return v;
  endfunction

  initial begin
    cfg = MERGE_CFG_DEFAULT;
    in_valid = 0; in_disp = '0; in_col = 0; in_row = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      int e, dssd, dcen;
      bit sok, cok;
      @(negedge clk);
      cfg = merge_cfg_t'($urandom);
      if (t < 100) cfg = MERGE_CFG_DEFAULT;
      in_disp.ssd_rl = '{valid: ($urandom % 8) != 0, d: 5'($urandom % 25)};
      in_disp.cen_rl = '{valid: ($urandom % 8) != 0, d: 5'($urandom % 25)};
      in_disp.ssd_lr = rnd_near(in_disp.ssd_rl);
      in_disp.cen_lr = rnd_near(in_disp.cen_rl);
      in_col = 8'($urandom); in_row = 8'($urandom % 192);
      in_valid = 1'b1;
      dssd = int'(in_disp.ssd_lr.d) - int'(in_disp.ssd_rl.d);
      dcen = int'(in_disp.cen_lr.d) - int'(in_disp.cen_rl.d);
      if (dssd < 0) dssd = -dssd;
      if (dcen < 0) dcen = -dcen;
      sok = cfg.en_ssd && in_disp.ssd_lr.valid && in_disp.ssd_rl.valid && dssd <= int'(cfg.tol);
      cok = cfg.en_census && in_disp.cen_lr.valid && in_disp.cen_rl.valid && dcen <= int'(cfg.tol);
      if (cok && sok) e = cfg.prefer_census ? int'(in_disp.cen_rl.d) + 1 : int'(in_disp.ssd_rl.d) + 1;
      else if (cok) e = int'(in_disp.cen_rl.d) + 1;
      else if (sok) e = int'(in_disp.ssd_rl.d) + 1;
      else e = 0;
      if (e == 0) n_none++; else if (cok && (cfg.prefer_census || !sok)) n_cen++; else n_ssd++;
      @(posedge clk);
      @(negedge clk);
      in_valid = 1'b0;
      checks += 4;
      if (!out_valid) begin failures++; $display("no out_valid"); end
      if (int'(out_code) != e) begin
        failures++;
        if (failures < 20) $display("t=%0d code %0d exp %0d cfg %p in %p", t, out_code, e, cfg, in_disp);
      end
      if (out_col != in_col || out_row != in_row) begin failures++; $display("position"); end
      if (out_ssd_ok != sok || out_cen_ok != cok) begin failures++; $display("flags"); end
    end
    checks++;
    if (n_ssd == 0 || n_cen == 0 || n_none == 0) begin failures++; $display("a case never occurred"); end
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
