// tb_pi_controller: drives the PI controller with random errors and gains
// and compares MV, P and I actions against a behavioural model of
//   p = trunc(e*kp/kp_div), i = floor(S * 42950 / 2^32), S = clamped sum of
//   ki*e over earlier samples, MV = clamp(p + i, 3, 217).
// Also checks the 35-clock update latency, that the integrator clamp and
// both MV limits are reached, and that a zero divisor gives no P action.
module tb_pi_controller;
  import dt_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, busy;
  pv_t err, kp, kp_div, ki, p_action, i_action;
  mv_t mv;
  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_clamp = 0;

  pi_controller dut (.clk, .rst_n, .in_valid, .err, .kp, .kp_div, .ki,
                     .out_valid, .mv, .p_action, .i_action, .busy);
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
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint s16(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  longint S = 0;
  longint SMAX, SMIN;

  initial begin
    SMAX = (64'sd32767 * (64'sd1 << 32)) / 42950;
    SMIN = -((64'sd32768 * (64'sd1 << 32)) / 42950);
    err = 0; kp = 1; kp_div = 1; ki = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      longint p, i, u, m;
      int lat;
      if (n < 200) begin          // small errors, moderate gains
        err = pv_t'($urandom_range(0, 80)) - 16'sd40;
        kp = pv_t'($urandom_range(0, 20)); kp_div = pv_t'($urandom_range(1, 16));
        ki = pv_t'($urandom_range(0, 5000));
      end else if (n < 300) begin // large positive drive: windup to the clamp
        err = 16'sd30000; kp = 16'sd1; kp_div = (n == 250) ? 16'sd0 : 16'sd3; ki = 16'sd32767;
      end else if (n < 400) begin // large negative drive
        err = -16'sd30000; kp = -16'sd2; kp_div = -16'sd7; ki = 16'sd32767;
      end else begin              // anything
        err = pv_t'($urandom); kp = pv_t'($urandom); kp_div = pv_t'($urandom); ki = pv_t'($urandom);
      end
      p = (kp_div == 0) ? 0 : s16((longint'(err) * longint'(kp)) / longint'(kp_div));
      i = s16((S * 42950) >>> 32);
      u = p + i;
      m = (u > 217) ? 217 : (u < 3) ? 3 : u;
      S = S + longint'(err) * longint'(ki);
      if (S > SMAX) begin S = SMAX; n_clamp++; end
      if (S < SMIN) begin S = SMIN; n_clamp++; end
      if (m == 217) n_sat_hi++;
      if (m == 3) n_sat_lo++;
      @(negedge clk) in_valid = 1;
      @(negedge clk) in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
      chk(lat, 35, "latency in clocks");
      chk(p_action, p, "p_action");
      chk(i_action, i, "i_action");
      chk(mv, m, "mv");
      @(negedge clk);
      chk(busy, 0, "idle after update");
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0 || n_clamp == 0) begin
      failures++;
      $display("FAIL coverage hi=%0d lo=%0d clamp=%0d", n_sat_hi, n_sat_lo, n_clamp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
