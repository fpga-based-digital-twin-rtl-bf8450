// tb_dt_asset_error: random asset/twin voltage pairs, with quiet stretches
// and a stretch where the asset reads far off; checks the error
// PV_asset - PV_DT, the 15-sample moving average, and the warning
// (|window sum| > 15*thr) against a queue-based model, and that the warning
// both rises and falls.
module tb_dt_asset_error;
  import dt_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, err_valid, warning;
  pv_t pv_asset, pv_dt, thr, err, avg;
  int checks = 0, failures = 0, n_warn = 0, n_quiet = 0;

  dt_asset_error dut (.clk, .rst_n, .in_valid, .pv_asset, .pv_dt, .thr,
                      .err_valid, .err, .avg, .warning);
  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  longint q[$];

  initial begin
    pv_asset = 0; pv_dt = 0; thr = 3;
    for (int k = 0; k < 15; k++) q.push_back(0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      longint e, s, a;
      bit w;
      pv_dt = pv_t'($urandom_range(0, 40));
      if ((n / 100) % 3 == 1)      pv_asset = pv_t'(0);                      // lost sensor
      else if (n >= 1800)          pv_asset = pv_t'($urandom);               // anything
      else                         pv_asset = pv_dt + pv_t'($urandom_range(0, 4)) - 16'sd2;
      if (n == 1800) thr = 16'sd20000;
      e = longint'(pv_asset) - longint'(pv_dt);
      e = (e > 32767) ? 32767 : (e < -32768) ? -32768 : e;
      void'(q.pop_front());
      q.push_back(e);
      s = 0;
      foreach (q[k]) s += q[k];
      a = s / 15;
      w = ((s < 0) ? -s : s) > 15 * longint'(thr);
      @(negedge clk) in_valid = 1;
      @(negedge clk) in_valid = 0;
      chk(err_valid, 1, "err_valid");
      chk(err, e, "error");
      chk(avg, a, "moving average");
      chk(warning, w, "warning");
      if (w) n_warn++; else n_quiet++;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    checks++;
    if (n_warn == 0 || n_quiet == 0) begin failures++; $display("FAIL warning coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
