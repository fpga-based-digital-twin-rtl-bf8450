// tb_dt_sensor_fault: the monitoring experiment run on the whole design at default
// parameters. The setpoint walks through 4, 24, 34, 39, 34, 14, 4 and 14 V
// (switch codes 0, 4, 6, 7, 6, 2, 0, 2); then, in steady state at 14 V, the
// ADC input is disconnected for 2000 samples and reconnected. The plant is
// the behavioural converter model (3 % gain mismatch, +-0.3 V noise).
// Reported and checked per setpoint: the largest |PV - PV_DT| and |average|
// over the settled part, which must stay within the 3 V threshold, and no
// warning there. For the interruption: the number of samples from the
// disconnection to the first warning (must be within the 15-sample window),
// that the average moves negative (the ADC reads 0 V, below the twin), the
// overshoot after reconnection, and that the warning then clears.
module tb_dt_sensor_fault;
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

  dt_top dut (.clk, .rst_n, .sw, .kp, .kp_div, .ki, .event_thr, .adc_start, .adc_done,
              .adc_data, .pwm, .uart_txd, .event_warning, .pv_asset, .pv_dt, .dt_err_avg,
              .sample_tick, .dt_error, .dt_p_action, .dt_i_action, .monitor);

  flyback_asset_model plant (.clk, .pwm, .tick(sample_tick), .disconnect, .adc_start,
                             .adc_done, .adc_data, .v_out);

  always #5 clk = ~clk;

  initial begin
    #3s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  localparam int NLEV = 8;
  int codes[NLEV] = '{0, 4, 6, 7, 6, 2, 0, 2};

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < NLEV; l++) begin
      int max_err, max_avg, warns;
      sw = 3'(codes[l]);
      repeat (1500) @(posedge sample_tick);
      max_err = 0; max_avg = 0; warns = 0;
      repeat (500) begin
        @(posedge sample_tick); #1;
        if (iabs(pv_asset - pv_dt) > max_err) max_err = iabs(pv_asset - pv_dt);
        if (iabs(dt_err_avg) > max_avg) max_avg = iabs(dt_err_avg);
        warns += int'(event_warning);
      end
      $display("setpoint %0d V: PV %0d V, PV_DT %0d V, max |error| %0d V, max |average| %0d V, warnings %0d",
               dut.sp, pv_asset, pv_dt, max_err, max_avg, warns);
      chk(dut.sp == 4 + 5 * codes[l], "setpoint");
      chk(pv_dt == dut.sp, "twin settled on setpoint");
      chk(max_avg <= 3 && warns == 0, "quiet error in settled operation");
    end
    begin
      int lat, peak, warns, quiet;
      disconnect = 1;
      lat = 0;
      while (!event_warning && lat < 2000) begin @(posedge sample_tick); #1; lat++; end
      $display("sensor interruption: warning after %0d samples, average %0d V", lat, dt_err_avg);
      chk(lat <= 15, "warning within the averaging window");
      chk(dt_err_avg < 0, "average negative while the ADC reads 0 V");
      repeat (2000 - lat) @(posedge sample_tick);
      #1 chk(event_warning, "warning held during the interruption");
      disconnect = 0;
      peak = 0; warns = 0; quiet = 0;
      repeat (1500) begin
        @(posedge sample_tick); #1;
        if (pv_asset > peak) peak = pv_asset;
        warns += int'(event_warning);
      end
      repeat (500) begin
        @(posedge sample_tick); #1;
        quiet += int'(event_warning);
      end
      $display("reconnection: asset peak %0d V, %0d warning samples while recovering, %0d in the last 500",
               peak, warns, quiet);
      chk(peak > 20, "overshoot after reconnection (integrator wound up)");
      chk(warns > 0, "recovery transient flagged");
      chk(quiet == 0 && iabs(pv_asset - 14) <= 1, "asset back on 14 V, warning cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
