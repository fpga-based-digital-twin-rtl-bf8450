// flyback_asset_model: behavioural stand-in for the physical converter board
// and its ADC, for system testbenches. Not synthesizable.
//
// The gate signal is integrated over consecutive 256-clock windows; the high
// count of the last full window is the applied pulse width. On every sampling
// tick the output voltage follows the converter's discrete transfer function
//   (0.2781z^2 + 0.5561z + 0.2781) / (z^2 + 0.6723z + 0.9396)
// with an input gain GAIN (a real converter differs a little from its twin)
// plus uniform noise of +-NOISE volts. The ADC answers adc_start after
// ADC_LAT clocks with round(v * 4096 / 60), clamped to 12 bits; while
// `disconnect` is high the ADC input is open and reads zero.
module flyback_asset_model #(
  parameter real GAIN    = 1.03,
  parameter real NOISE   = 0.3,
  parameter int  ADC_LAT = 26
) (
  input  logic        clk,
  input  logic        pwm,
  input  logic        tick,
  input  logic        disconnect,
  input  logic        adc_start,
  output logic        adc_done,
  output logic [11:0] adc_data,
  output real         v_out
);
  int  win_cnt = 0, hi_cnt = 0, width = 0;
  real u1 = 0, u2 = 0, y1 = 0, y2 = 0;

  initial begin
    adc_done = 0;
    adc_data = 0;
    v_out    = 0;
  end

  always @(posedge clk) begin
    hi_cnt  <= hi_cnt + int'(pwm);
    win_cnt <= win_cnt + 1;
    if (win_cnt == 255) begin
      width   <= hi_cnt + int'(pwm);
      hi_cnt  <= 0;
      win_cnt <= 0;
    end
  end

  always @(posedge clk) begin
    if (tick) begin
      real u0, y0;
      u0 = GAIN * real'(width);
      y0 = 0.2781 * u0 + 0.5561 * u1 + 0.2781 * u2 - 0.6723 * y1 - 0.9396 * y2;
      u2 = u1; u1 = u0; y2 = y1; y1 = y0;
      v_out = y0;
    end
  end

  initial begin
    forever begin
      @(posedge clk);
      adc_done <= 1'b0;
      if (adc_start) begin
        real v;
        int  c;
        repeat (ADC_LAT) @(posedge clk);
        v = disconnect ? 0.0
                       : v_out + NOISE * (2.0 * real'($urandom_range(0, 1000)) / 1000.0 - 1.0);
        c = int'(v * 4096.0 / 60.0);
        if (c < 0) c = 0;
        if (c > 4095) c = 4095;
        adc_data <= 12'(c);
        adc_done <= 1'b1;
      end
    end
  end
endmodule
