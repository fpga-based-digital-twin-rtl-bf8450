// tb_dt_top: end-to-end run of the whole design at its default parameters
// (12 MHz clock, 10 us sampling, 115200 baud) against a behavioural model of
// the converter and ADC whose gain is 3 % off the twin's and whose
// measurement is noisy.
// Scenario: setpoints 4, 24, 39 and 14 V selected by the switches, then the
// ADC input is disconnected for a while and reconnected. Checks:
//  * physical loop and twin both settle on each setpoint;
//  * no warning in settled fault-free operation, a warning during the
//    disconnection, and the warning clears after reconnection;
//  * the asset MV saturates at its upper limit during the disconnection;
//  * one ADC request per sampling period and a PWM high time equal to MV;
//  * serial lines arrive, are well formed and carry the selected setpoint.
// Each mechanism (setpoint change, PI saturation, event warning, serial line,
// ADC handshake) is counted and must occur at least once.
module tb_dt_top;
  import dt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] sw = 0;
  pv_t kp = 1, kp_div = 8, ki = 1000, event_thr = 3;
  logic adc_start, adc_done, pwm, uart_txd, event_warning, sample_tick;
  logic [11:0] adc_data;
  pv_t pv_asset, pv_dt, dt_err_avg, dt_error, dt_p_action, dt_i_action;
  log_rec_t monitor;
  logic disconnect = 0;
  real v_out;
  int checks = 0, failures = 0;
  int n_sp_change = 0, n_sat = 0, n_warn = 0, n_lines = 0, n_adc = 0, n_ticks = 0;

  dt_top dut (.clk, .rst_n, .sw, .kp, .kp_div, .ki, .event_thr, .adc_start, .adc_done,
              .adc_data, .pwm, .uart_txd, .event_warning, .pv_asset, .pv_dt, .dt_err_avg,
              .sample_tick, .dt_error, .dt_p_action, .dt_i_action, .monitor);

  flyback_asset_model plant (.clk, .pwm, .tick(sample_tick), .disconnect, .adc_start,
                             .adc_done, .adc_data, .v_out);

  logic [7:0] rx_data;
  logic rx_valid, rx_err;
  uart_rx_model #(.BIT_CLKS(104)) rx (.clk, .rxd(uart_txd | !rst_n), .data(rx_data),
                                      .byte_valid(rx_valid), .frame_err(rx_err));

  always #5 clk = ~clk;   // 100 time units per ... any unit: counts are in clocks

  initial begin
    #2s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (sp=%0d pv=%0d pv_dt=%0d avg=%0d)", what, dut.sp, pv_asset, pv_dt, dt_err_avg);
    end
  endtask

  // mechanism counters
  pv_t sp_prev = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.sp != sp_prev) n_sp_change++;
    sp_prev <= dut.sp;
    if (sample_tick) n_ticks++;
    if (adc_start) n_adc++;
    if (sample_tick && dut.mv == 8'd217) n_sat++;
    if (sample_tick && event_warning) n_warn++;
  end

  // serial lines: 8 fields, first field is the setpoint in force
  string cur = "";
  int n_err_lines = 0;
  function automatic int field(input string l, input int k);
    string f;
    f = l.substr(6 * k, 6 * k + 4);
    if (f[0] == "-") return -f.substr(1, 4).atoi();
    return f.atoi();
  endfunction
  always @(posedge clk) begin
    if (rx_err) chk(0, "uart framing");
    if (rx_valid) begin
      cur = {cur, string'(rx_data)};
      if (rx_data == 8'h0a) begin
        int spv;
        n_lines++;
        chk(cur.len() == 49, "serial line length");
        spv = cur.substr(0, 4).atoi();
        chk(spv == 4 || spv == 24 || spv == 39 || spv == 14, "serial setpoint field");
        chk(cur[5] == " " && cur[47] == 8'h0d, "serial separators");
        chk(field(cur, 3) == field(cur, 1) - field(cur, 2), "serial error field is PV asset - PV DT");
        if (field(cur, 3) != 0) n_err_lines++;
        cur = "";
      end
    end
  end

  // PWM high time per period equals the MV in force at the period start
  int hi = 0;
  mv_t duty_exp = 0;
  int n_pwm = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_pwm.period_start) begin
      if (n_pwm > 2) chk(hi == int'(duty_exp), "pwm high time");
      n_pwm++;
      hi = 0;
      duty_exp = dut.mv;
    end
    hi += int'(pwm);
  end

  task automatic run_samples(input int n);
    repeat (n) @(posedge sample_tick);
  endtask

  // settled checks over the last part of a window
  task automatic settle_window(input int sp_exp, input int n);
    int warn_before;
    run_samples(n - 300);
    chk(dut.sp == sp_exp, "setpoint selected");
    warn_before = n_warn;
    for (int k = 0; k < 300; k++) begin
      @(posedge sample_tick);
      #1;
      if (k % 50 == 0) begin
        chk(pv_dt == sp_exp, "twin on setpoint");
        chk(pv_asset >= sp_exp - 1 && pv_asset <= sp_exp + 1, "asset on setpoint");
      end
    end
    chk(n_warn == warn_before, "no warning in settled operation");
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    sw = 3'd0; settle_window(4, 2000);
    sw = 3'd4; settle_window(24, 2000);
    sw = 3'd7; settle_window(39, 2000);
    sw = 3'd2; settle_window(14, 2000);
    // sensor interruption
    begin
      int w0, s0;
      w0 = n_warn; s0 = n_sat;
      disconnect = 1;
      run_samples(1500);
      chk(n_warn > w0, "warning during ADC disconnection");
      chk(n_sat > s0, "MV saturates during ADC disconnection");
      chk(pv_dt == 14, "twin unaffected by the disconnection");
      disconnect = 0;
      run_samples(3000);
      chk(!event_warning, "warning clears after reconnection");
      chk(pv_asset >= 13 && pv_asset <= 15, "asset recovers");
    end
    chk(n_adc >= n_ticks - 1 && n_adc <= n_ticks, "one ADC request per sample");
    $display("mechanisms: setpoint changes=%0d saturated samples=%0d warning samples=%0d serial lines=%0d (with nonzero error %0d) adc requests=%0d pwm periods=%0d",
             n_sp_change, n_sat, n_warn, n_lines, n_err_lines, n_adc, n_pwm);
    chk(n_sp_change >= 3, "setpoint changes happened");
    chk(n_sat > 0, "saturation happened");
    chk(n_warn > 0, "warning happened");
    chk(n_lines > 10, "serial lines received");
    chk(n_err_lines > 0, "serial lines with a nonzero twin-asset error");
    // twin monitoring outputs follow the twin's own loop
    chk(dt_error == dut.sp - pv_dt, "twin error output");
    chk(n_adc > 0, "adc handshakes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
