// flyback_model: data-driven model of the flyback converter, the discrete
// transfer function from duty command to output voltage
//
//   P(z) = (0.2781 z^2 + 0.5561 z + 0.2781) / (z^2 + 0.6723 z + 0.9396),
//
// identified for a 10 us sampling time around a 30 % duty cycle. It runs as a
// direct-form-I recursion
//   y[n] = b0 u[n] + b1 u[n-1] + b2 u[n-2] - a1 y[n-1] - a2 y[n-2]
// with coefficients in Q16 (B0..A2) and the signal state in fixed point with
// YF fractional bits. The input is u = mv * GAIN_Q / 256; GAIN_Q stands for
// the input gain of the model and defaults to 1.0 (this design's choice).
// The output pv is y rounded to whole units and saturated to int16.
// Timing: one step per u_valid; y_valid pulses one clock later with the new
// pv. Reset clears the state (zero initial condition).
module flyback_model
  import dt_pkg::*;
#(
  parameter int          B0     = 18226,  // 0.2781 * 2^16
  parameter int          B1     = 36445,  // 0.5561 * 2^16
  parameter int          B2     = 18226,  // 0.2781 * 2^16
  parameter int          A1     = 44060,  // 0.6723 * 2^16
  parameter int          A2     = 61578,  // 0.9396 * 2^16
  parameter int          GAIN_Q = 256,    // input gain, Q8.8
  parameter int unsigned YF     = 8       // fractional bits of the state
) (
  input  logic clk,
  input  logic rst_n,
  input  logic u_valid,
  input  mv_t  mv,
  output logic y_valid,
  output pv_t  pv
);
  localparam int unsigned CF = 16;  // coefficient fractional bits

  logic signed [39:0] u1, u2, y1, y2;  // delayed input and output, YF fraction
  logic signed [39:0] u0, y0;
  logic signed [79:0] acc;

  always_comb begin
    // mv * GAIN_Q has 8 fractional bits; align to YF.
    u0  = 40'((64'(mv) * 64'(GAIN_Q) <<< YF) >>> 8);
    acc = 80'(B0) * 80'(u0) + 80'(B1) * 80'(u1) + 80'(B2) * 80'(u2)
        - 80'(A1) * 80'(y1) - 80'(A2) * 80'(y2);
    y0  = 40'(acc >>> CF);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u1 <= '0; u2 <= '0; y1 <= '0; y2 <= '0;
      y_valid <= 1'b0;
      pv      <= '0;
    end else begin
      y_valid <= u_valid;
      if (u_valid) begin
        u2 <= u1; u1 <= u0;
        y2 <= y1; y1 <= y0;
        pv <= sat16((64'(y0) + (64'sd1 <<< (YF - 1))) >>> YF);
      end
    end
  end
endmodule
