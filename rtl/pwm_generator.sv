// pwm_generator: gate drive for the converter MOSFET.
//
// A free-running counter of PERIOD clocks (256 by default, 46.9 kHz at
// 12 MHz) compares against the pulse width: pwm is high for the first
// `mv` clocks of each period. The pulse width is sampled on the first clock
// of a period (period_start) so that an MV update never cuts a pulse short or
// doubles it. The period length is this design's choice.
module pwm_generator
  import dt_pkg::*;
#(
  parameter int unsigned PERIOD = 256
) (
  input  logic clk,
  input  logic rst_n,
  input  mv_t  mv,
  output logic pwm,
  output logic period_start
);
  localparam int unsigned CW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [CW-1:0] cnt;
  mv_t           duty;

  assign period_start = (cnt == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      duty <= '0;
      pwm  <= 1'b0;
    end else begin
      cnt <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
      if (period_start) begin
        duty <= mv;
        pwm  <= (mv != '0);
      end else begin
        pwm  <= (32'(cnt) < 32'(duty));
      end
    end
  end

  // The gate is never driven high with a zero pulse width in force.
  a_zero_width_low: assert property (@(posedge clk) disable iff (!rst_n) (pwm && !$past(period_start)) |-> duty != '0);
endmodule
