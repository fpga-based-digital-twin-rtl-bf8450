// tb_flyback_dt: runs the digital twin loop for several setpoints and gain
// sets, and compares every step with a bit-exact behavioural model of the
// loop (integer PI with the 10 us integrator constant, Q16 plant recursion,
// unit-delay feedback). Checks that each step takes 37 clocks, well within the
// 120-clock sampling period and that PV_DT settles on the setpoint.
module tb_flyback_dt;
  import dt_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0, valid;
  pv_t sp, kp, kp_div, ki, pv_dt, p_action, i_action, error;
  mv_t mv_dt;
  int checks = 0, failures = 0;

  flyback_dt dut (.clk, .rst_n, .tick, .sp, .kp, .kp_div, .ki, .valid,
                  .pv_dt, .mv_dt, .p_action, .i_action, .error);
  always #5 clk = ~clk;

  initial begin
    #200ms;
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

  // reference loop state
  longint acc = 0, u1 = 0, u2 = 0, y1 = 0, y2 = 0, pvr = 0;

  function automatic longint s16(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  task automatic ref_step(output longint e, p, i, m);
    longint u, y, a;
    e = s16(longint'(sp) - pvr);
    p = (kp_div == 0) ? 0 : s16((e * longint'(kp)) / longint'(kp_div));
    i = s16((acc * 42950) >>> 32);
    a = acc + e * longint'(ki);
    if (a > (64'sd32767 * (64'sd1 << 32)) / 42950) a = (64'sd32767 * (64'sd1 << 32)) / 42950;
    if (a < -((64'sd32768 * (64'sd1 << 32)) / 42950)) a = -((64'sd32768 * (64'sd1 << 32)) / 42950);
    acc = a;
    m = p + i;
    m = (m > 217) ? 217 : (m < 3) ? 3 : m;
    u = m * 256;                                  // mv * 1.0 with 8 fraction bits
    y = (18226 * u + 36445 * u1 + 18226 * u2 - 44060 * y1 - 61578 * y2) >>> 16;
    u2 = u1; u1 = u; y2 = y1; y1 = y;
    pvr = s16((y + 128) >>> 8);
  endtask

  initial begin
    sp = 4; kp = 1; kp_div = 8; ki = 1000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      longint e, p, i, m;
      int lat;
      case (n)
        1500: sp = 24;
        2500: begin sp = 39; kp = 0; kp_div = 1; ki = 5000; end
        3500: sp = 14;
        4500: begin sp = 120; kp = 1; kp_div = 8; ki = 1000; end  // needs MV 282: saturates
        default: ;
      endcase
      ref_step(e, p, i, m);
      @(negedge clk) tick = 1;
      @(negedge clk) tick = 0;
      lat = 1;
      while (!valid && lat < 200) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 37) begin failures++; $display("FAIL step latency %0d", lat); end
      chk(error, e, "error_dt");
      chk(p_action, p, "p_action_dt");
      chk(i_action, i, "i_action_dt");
      chk(mv_dt, m, "mv_dt");
      chk(pv_dt, pvr, "pv_dt");
      if (n == 1499 || n == 2499 || n == 3499 || n == 4499) chk(pv_dt, sp, "settled on setpoint");
      if (n >= 5000) chk(mv_dt, 217, "saturated at MV_MAX");
      repeat (120 - lat - 2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
