// dt_asset_error: mismatch between the physical converter and its digital
// twin, used as an event-awareness signal.
//
// For each sample pair the error err = PV_asset - PV_DT is formed (positive
// when the measurement reads above the twin). The last N errors sit in a
// shift window with a running sum; avg is that sum divided by N (truncated
// toward zero). warning is raised while |sum| > N*thr, i.e. while the
// N-sample moving average lies outside +-thr, with no rounding. thr is meant
// to be set to a multiple (six) of the standard deviation of the error in
// fault-free steady state, so that a persistent offset such as a lost sensor
// connection is flagged while noise spikes are averaged out.
// Timing: err, avg and warning update one clock after in_valid (err_valid).
// The window starts cleared after reset.
module dt_asset_error
  import dt_pkg::*;
#(
  parameter int unsigned N = 15
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pv_t  pv_asset,
  input  pv_t  pv_dt,
  input  pv_t  thr,
  output logic err_valid,
  output pv_t  err,
  output pv_t  avg,
  output logic warning
);
  pv_t                win [N];
  logic signed [31:0] sum;
  pv_t                e_new;
  logic signed [31:0] sum_next, mag_next;

  always_comb begin
    e_new    = sat16(64'(pv_asset) - 64'(pv_dt));
    sum_next = sum + 32'(e_new) - 32'(win[N-1]);
    mag_next = sum_next[31] ? -sum_next : sum_next;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) win[i] <= '0;
      sum       <= '0;
      err_valid <= 1'b0;
      err       <= '0;
      avg       <= '0;
      warning   <= 1'b0;
    end else begin
      err_valid <= in_valid;
      if (in_valid) begin
        win[0] <= e_new;
        for (int i = 1; i < int'(N); i++) win[i] <= win[i-1];
        sum     <= sum_next;
        err     <= e_new;
        avg     <= pv_t'(sum_next / $signed(32'(N)));
        warning <= (64'(mag_next) > 64'(N) * 64'(thr));
      end
    end
  end
endmodule
