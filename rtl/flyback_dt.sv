// flyback_dt: closed-loop digital twin of the voltage-regulated flyback
// converter.
//
// A copy of the control loop runs against the converter model instead of the
// hardware: the error calculator forms SP - PV_DT from the setpoint and the
// twin's previous output (the unit delay in the feedback path), the PI
// controller computes the pulse width and the flyback model produces the new
// PV_DT. The twin gets the same setpoint and gains as the physical loop, so
// in fault-free operation its PV_DT tracks the measured voltage.
// Timing: each tick starts one step; valid pulses when PV_DT of that step is
// ready, 37 clocks after the tick, which must be shorter than the tick
// period. Ticks arriving while a step is in progress are ignored.
module flyback_dt
  import dt_pkg::*;
#(
  parameter int MV_MIN = 3,
  parameter int MV_MAX = 217,
  parameter int GAIN_Q = 256
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  pv_t  sp,
  input  pv_t  kp,
  input  pv_t  kp_div,
  input  pv_t  ki,
  output logic valid,
  output pv_t  pv_dt,
  output mv_t  mv_dt,
  output pv_t  p_action,
  output pv_t  i_action,
  output pv_t  error
);
  logic err_valid, pi_valid, pi_busy;

  error_calc u_err (
    .clk, .rst_n,
    .in_valid (tick && !pi_busy && !err_valid),
    .sp,
    .pv       (pv_dt),
    .err_valid(err_valid),
    .err      (error)
  );

  pi_controller #(.MV_MIN(MV_MIN), .MV_MAX(MV_MAX)) u_pi (
    .clk, .rst_n,
    .in_valid (err_valid),
    .err      (error),
    .kp, .kp_div, .ki,
    .out_valid(pi_valid),
    .mv       (mv_dt),
    .p_action,
    .i_action,
    .busy     (pi_busy)
  );

  flyback_model #(.GAIN_Q(GAIN_Q)) u_plant (
    .clk, .rst_n,
    .u_valid(pi_valid),
    .mv     (mv_dt),
    .y_valid(valid),
    .pv     (pv_dt)
  );

  // Each twin step must be complete before the next sampling strobe.
  a_step_in_period: assert property (@(posedge clk) disable iff (!rst_n) tick |-> !pi_busy && !err_valid);
endmodule
