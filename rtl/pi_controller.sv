// pi_controller: discrete PI controller of the voltage loop,
//   u = e*kp/kp_div + ki * t_s * sum(e)   (forward-Euler integral),
// saturated to the pulse-width range [MV_MIN, MV_MAX].
//
// The gain is given as a numerator kp and a divisor kp_div so that fractional
// proportional gains can be set with integers. On in_valid the error is
// latched and e*kp is handed to a sequential divider; meanwhile the integral
// action is read from the integrator state. t_s is applied as the fixed-point
// constant TS_Q / 2^TS_FRAC (10 us by default), so i_action is
// floor(acc * TS_Q / 2^TS_FRAC) where acc is the running sum of ki*e. The
// integrator is forward Euler: i_action of a sample covers the errors of the
// earlier samples only, then ki*e of the present one is added.
// The sum is clamped so that i_action stays inside int16 (wrap-around guard,
// this design's choice); a zero kp_div gives no proportional action.
// Timing: out_valid pulses 35 clocks after in_valid (32-bit divider plus two
// stages); mv, p_action and i_action then hold until the next update. A new
// in_valid while busy is ignored.
module pi_controller
  import dt_pkg::*;
#(
  parameter int          MV_MIN  = 3,      // 0.01 of full scale
  parameter int          MV_MAX  = 217,    // 0.85 of full scale
  parameter longint      TS_Q    = 42950,  // round(1e-5 * 2^32)
  parameter int unsigned TS_FRAC = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pv_t  err,
  input  pv_t  kp,
  input  pv_t  kp_div,
  input  pv_t  ki,
  output logic out_valid,
  output mv_t  mv,
  output pv_t  p_action,
  output pv_t  i_action,
  output logic busy
);
  // Integrator limits: largest sums whose scaled value still fits int16.
  localparam longint ACC_MAX = ((64'sd32767 <<< TS_FRAC) / TS_Q);
  localparam longint ACC_MIN = -((64'sd32768 <<< TS_FRAC) / TS_Q);

  typedef enum logic [1:0] {IDLE, DIVIDE, UPDATE} state_t;
  state_t state;

  logic signed [47:0] acc;
  pv_t                e_q, ki_q, i_now;
  logic               div_start, div_done;
  logic signed [31:0] div_quot;

  sdiv_seq #(.NW(32), .DW(16)) u_div (
    .clk, .rst_n,
    .start(div_start),
    .num  (32'(err) * 32'(kp)),
    .den  (kp_div),
    .busy (),
    .done (div_done),
    .quot (div_quot)
  );

  assign div_start = (state == IDLE) && in_valid;
  assign busy      = (state != IDLE);

  // Scaled integral action of the present integrator state.
  logic signed [63:0] i_scaled;
  assign i_scaled = (64'(acc) * TS_Q) >>> TS_FRAC;

  // Next integrator state, clamped.
  logic signed [63:0] acc_next;
  always_comb begin
    acc_next = 64'(acc) + 64'(e_q) * 64'(ki_q);
    if (acc_next > ACC_MAX)      acc_next = ACC_MAX;
    else if (acc_next < ACC_MIN) acc_next = ACC_MIN;
  end

  // Saturated sum of both actions.
  logic signed [63:0] u_sum;
  mv_t                mv_next;
  always_comb begin
    u_sum = 64'(sat16(64'(div_quot))) + 64'(i_now);
    if (u_sum > 64'(MV_MAX))      mv_next = mv_t'(MV_MAX);
    else if (u_sum < 64'(MV_MIN)) mv_next = mv_t'(MV_MIN);
    else                          mv_next = mv_t'(u_sum);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      acc       <= '0;
      e_q       <= '0;
      ki_q      <= '0;
      i_now     <= '0;
      out_valid <= 1'b0;
      mv        <= mv_t'(MV_MIN);
      p_action  <= '0;
      i_action  <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        IDLE: if (in_valid) begin
          e_q   <= err;
          ki_q  <= ki;
          i_now <= sat16(i_scaled);
          state <= DIVIDE;
        end
        DIVIDE: if (div_done) state <= UPDATE;
        UPDATE: begin
          p_action  <= sat16(64'(div_quot));
          i_action  <= i_now;
          mv        <= mv_next;
          acc       <= 48'(acc_next);
          out_valid <= 1'b1;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
