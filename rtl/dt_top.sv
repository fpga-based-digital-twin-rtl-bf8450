// dt_top: flyback converter voltage regulation with an embedded digital twin.
//
// Two copies of the same voltage loop run side by side, stepped by one
// sampling strobe every TS_CLKS clocks (10 us at 12 MHz):
//  * physical loop: the setpoint selector gives SP, the ADC reader returns
//    the measured output voltage PV, the error calculator forms SP - PV, the
//    PI controller computes the pulse width MV and the PWM generator drives
//    the converter MOSFET;
//  * digital twin: the same setpoint and gains drive a PI controller closed
//    around the identified converter model (flyback_dt).
// On every strobe the DT-asset error block compares the latest measured PV
// with the twin's PV, keeps a 15-sample moving average of the difference and
// raises event_warning when that average leaves +-event_thr: a lost sensor
// connection, for example, makes the measurement depart from the twin. The
// serial logger sends SP, both PVs, the twin-versus-asset error, both MVs and
// the asset's P and I actions to the host as text lines whenever the UART is
// free; the record is taken one clock after the strobe, when the error of
// that strobe is ready, so its error field always equals PV_asset - PV_DT of
// the same record. The same record is visible on the monitor port.
// Interface: the ADC (start/done handshake, 12-bit code), the PWM pin and
// the UART line are the board connections; gains and the warning threshold
// are inputs. The sharing of one gain set, the strobe rate of the physical
// loop and all widths not fixed by the int16/int8 signal types are this
// design's choices.
module dt_top
  import dt_pkg::*;
#(
  parameter int unsigned CLK_HZ  = CLK_HZ_DEFAULT,
  parameter int unsigned TS_CLKS = TS_CLKS_DEFAULT,
  parameter int unsigned BAUD    = 115_200
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  sw,
  input  pv_t         kp,
  input  pv_t         kp_div,
  input  pv_t         ki,
  input  pv_t         event_thr,
  output logic        adc_start,
  input  logic        adc_done,
  input  logic [11:0] adc_data,
  output logic        pwm,
  output logic        uart_txd,
  output logic        event_warning,
  output pv_t         pv_asset,
  output pv_t         pv_dt,
  output pv_t         dt_err_avg,
  output logic        sample_tick,
  output pv_t         dt_error,
  output pv_t         dt_p_action,
  output pv_t         dt_i_action,
  output log_rec_t    monitor
);
  pv_t  sp;
  logic pv_valid;

  sample_timer #(.PERIOD(TS_CLKS)) u_timer (.clk, .rst_n, .tick(sample_tick));

  setpoint_selector u_sp (.clk, .rst_n, .sw, .sp);

  // ---------------- physical loop ----------------
  adc_reader u_adc (
    .clk, .rst_n,
    .tick    (sample_tick),
    .adc_start,
    .adc_done,
    .adc_data,
    .pv_valid,
    .pv      (pv_asset)
  );

  logic err_valid, pi_busy;
  pv_t  err, p_action, i_action;
  mv_t  mv;

  error_calc u_err (
    .clk, .rst_n,
    .in_valid (pv_valid && !pi_busy),
    .sp,
    .pv       (pv_asset),
    .err_valid(err_valid),
    .err      (err)
  );

  pi_controller u_pi (
    .clk, .rst_n,
    .in_valid (err_valid),
    .err,
    .kp, .kp_div, .ki,
    .out_valid(),
    .mv,
    .p_action,
    .i_action,
    .busy     (pi_busy)
  );

  pwm_generator u_pwm (.clk, .rst_n, .mv, .pwm, .period_start());

  // ---------------- digital twin ----------------
  mv_t  mv_dt;

  flyback_dt u_dt (
    .clk, .rst_n,
    .tick    (sample_tick),
    .sp,
    .kp, .kp_div, .ki,
    .valid   (),
    .pv_dt,
    .mv_dt,
    .p_action(dt_p_action),
    .i_action(dt_i_action),
    .error   (dt_error)
  );

  // ---------------- twin versus asset ----------------
  logic dae_valid;
  pv_t  dae_err;

  dt_asset_error u_dae (
    .clk, .rst_n,
    .in_valid (sample_tick),
    .pv_asset,
    .pv_dt,
    .thr      (event_thr),
    .err_valid(dae_valid),
    .err      (dae_err),
    .avg      (dt_err_avg),
    .warning  (event_warning)
  );

  // ---------------- serial log ----------------
  log_rec_t rec;

  always_comb begin
    rec.sp       = sp;
    rec.pv_asset = pv_asset;
    rec.pv_dt    = pv_dt;
    rec.error    = dae_err;
    rec.mv_asset = pv_t'(mv);
    rec.mv_dt    = pv_t'(mv_dt);
    rec.p_action = p_action;
    rec.i_action = i_action;
  end
  assign monitor = rec;

  serial_logger #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_log (
    .clk, .rst_n,
    .rec,
    .rec_valid(dae_valid),
    .txd      (uart_txd),
    .busy     (),
    .line_done()
  );

  // The physical loop (ADC conversion plus PI update) must finish within one
  // sampling period; otherwise samples are lost.
  a_asset_in_period: assert property (@(posedge clk) disable iff (!rst_n) sample_tick |-> !pi_busy);
endmodule
