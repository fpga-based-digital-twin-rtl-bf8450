// error_calc: control error of one sample, e = SP - PV.
//
// On each in_valid the difference is formed, saturated to int16 and
// registered; err_valid pulses one clock later with the new value, which is
// then held. The sign convention (setpoint minus measurement) is that of the
// controller's summing junction.
module error_calc
  import dt_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pv_t  sp,
  input  pv_t  pv,
  output logic err_valid,
  output pv_t  err
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      err_valid <= 1'b0;
      err       <= '0;
    end else begin
      err_valid <= in_valid;
      if (in_valid) err <= sat16(64'(sp) - 64'(pv));
    end
  end
endmodule
